// tb_resp_monitor: self-checking test of the MISR response monitor.
//
// Random responses with random enable, plus clear pulses. The reference
// divides by the feedback polynomial x^5 + x^2 + 1 bit by bit: the outgoing
// top bit is fed back into taps 0 and 2.
module tb_resp_monitor;
  logic clk = 0, rst_n = 0, clear = 0, enable = 0;
  logic [4:0] resp, signature, model;
  int checks = 0, failures = 0;

  resp_monitor dut (.*);

  always #5 clk = ~clk;

  function automatic logic [4:0] step(logic [4:0] s, logic [4:0] r);
    logic fb = s[4];
    step[0] = fb ^ r[0];
    step[1] = s[0] ^ r[1];
    step[2] = s[1] ^ fb ^ r[2];
    step[3] = s[2] ^ r[3];
    step[4] = s[3] ^ r[4];
  endfunction

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0; resp = '0;
    #12 rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      clear  = ($urandom_range(30) == 0);
      enable = ($urandom_range(3) != 0);
      resp   = 5'($urandom);
      @(posedge clk);
      if (clear) model = '0;
      else if (enable) model = step(model, resp);
      #1;
      checks++;
      if (signature !== model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: got %b expected %b", k, signature, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

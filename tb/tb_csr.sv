// tb_csr: self-checking test of the circular shift register.
//
// First replays the worked example of the method (load 0011, rotate to 1001,
// 1100, 0110, reading I1..I4 left to right), then applies random commands to
// a 9-bit register and compares it each cycle with a reference model.
module tb_csr;
  import bist_pkg::*;

  localparam int unsigned N = 9;

  logic clk = 0, rst_n = 0;
  csr_mode_e mode4, mode9;
  logic [3:0]   fb4, pat4;
  logic [N-1:0] fb9, pat9, model;
  int checks = 0, failures = 0;

  csr #(.N(4)) dut4 (.clk, .rst_n, .mode(mode4), .fb_pattern(fb4), .pattern(pat4));
  csr #(.N(N)) dut9 (.clk, .rst_n, .mode(mode9), .fb_pattern(fb9), .pattern(pat9));

  always #5 clk = ~clk;

  // Pattern written I1 first, as in the worked example.
  function automatic logic [3:0] p4(string s);
    for (int i = 0; i < 4; i++) p4[i] = (s[i] == "1");
  endfunction

  task automatic check4(string s);
    checks++;
    if (pat4 !== p4(s)) begin
      failures++;
      $display("FAIL example: expected %s got I1..I4=%b%b%b%b", s, pat4[0], pat4[1], pat4[2], pat4[3]);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode4 = CSR_HOLD; mode9 = CSR_HOLD; fb4 = '0; fb9 = '0; model = '0;
    #12 rst_n = 1;
    checks++;
    if (pat4 !== '0 || pat9 !== '0) begin failures++; $display("FAIL reset"); end
    // Worked example.
    @(negedge clk); mode4 = CSR_LOAD; fb4 = p4("0011");
    @(negedge clk); check4("0011"); mode4 = CSR_ROTATE;
    @(negedge clk); check4("1001");
    @(negedge clk); check4("1100");
    @(negedge clk); check4("0110"); mode4 = CSR_HOLD;
    @(negedge clk); check4("0110"); mode4 = CSR_CLEAR;
    @(negedge clk); check4("0000");
    // Random commands.
    for (int k = 0; k < 150; k++) begin
      @(negedge clk);
      mode9 = csr_mode_e'($urandom_range(3));
      fb9   = N'($urandom);
      @(posedge clk);
      case (mode9)
        CSR_CLEAR:  model = '0;
        CSR_LOAD:   model = fb9;
        CSR_ROTATE: model = {model[N-2:0], model[N-1]};
        default:    model = model;
      endcase
      #1;
      checks++;
      if (pat9 !== model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d mode %s: got %b expected %b", k, mode9.name(), pat9, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

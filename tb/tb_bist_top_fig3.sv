// tb_bist_top_fig3: the complete BIST at its default sizes on the worked
// example of the method.
//
// The CUT is the behavioural model fig3_cut. The test expects the pattern
// sequence of the example, I1..I4 per test cycle:
//   0000 (all-zero initial pattern), 0011 (feedback TP1), 1001, 1100, 0110,
//   1011 (feedback TP2), 1101, 1110, 0111
// i.e. 9 test cycles, and a signature equal to the MISR (x^5 + x^2 + 1) of
// the nine net responses, computed here from the response table. The
// observed nets are also the monitored responses.
module tb_bist_top_fig3;
  import bist_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] cut_pattern;
  logic [4:0] cut_nets, signature;
  logic test_valid, busy, done, known;
  int checks = 0, failures = 0;

  bist_top dut (
    .clk, .rst_n, .start, .cut_pattern, .cut_nets, .cut_resp(cut_nets),
    .test_valid, .busy, .done, .signature
  );
  fig3_cut cut (.pattern(cut_pattern), .nets(cut_nets), .known);

  always #5 clk = ~clk;

  string exp_pat[9] = '{"0000", "0011", "1001", "1100", "0110", "1011", "1101", "1110", "0111"};
  string exp_net[9] = '{"11100", "01100", "01100", "11001", "11101", "10111", "01111", "10010", "11011"};

  function automatic string show(logic [3:0] p);
    return $sformatf("%b%b%b%b", p[0], p[1], p[2], p[3]);
  endfunction

  function automatic logic [4:0] misr(logic [4:0] s, logic [4:0] r);
    logic fb = s[4];
    return {s[3], s[2], s[1] ^ fb, s[0], fb} ^ r;
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [4:0] sig_ref = '0;
    automatic int n = 0;
    #12 rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (test_valid) begin
      if (n < 9) begin
        logic [4:0] r;
        chk(show(cut_pattern) == exp_pat[n],
            $sformatf("cycle %0d pattern %s expected %s", n + 1, show(cut_pattern), exp_pat[n]));
        for (int i = 0; i < 5; i++) r[i] = (exp_net[n][i] == "1");
        sig_ref = misr(sig_ref, r);
      end
      chk(known, $sformatf("cycle %0d pattern outside the example", n + 1));
      n++;
      @(negedge clk);
    end
    chk(n == 9, $sformatf("session took %0d test cycles, expected 9", n));
    chk(done && !busy, "done after the session");
    chk(signature == sig_ref, $sformatf("signature %b expected %b", signature, sig_ref));
    $display("Example session: %0d test cycles, signature %b", n, signature);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

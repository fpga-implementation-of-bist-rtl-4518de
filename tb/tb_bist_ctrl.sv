// tb_bist_ctrl: self-checking test of the BIST control unit.
//
// Schedule for an 8-bit CSR: one full-rotation segment (2 feedback patterns,
// 7 rotations each, configuration 0) and two variable-rotation groups
// (configuration 1 with 3 rotations, configuration 2 with 1 rotation). The
// expected command of every test cycle is listed independently of the DUT,
// and the session length 1 + 2*8 + 2*4 + 3*2 = 31 test cycles is checked.
// The session is run twice to check that start restarts it.
module tb_bist_ctrl;
  import bist_pkg::*;

  localparam int unsigned N_CSR   = 8;
  localparam int unsigned NUM_SEG = 3;
  localparam seg_t [NUM_SEG-1:0] SEG = '{
    seg_t'{cfg: 4'd2, rot: 16'd1, count: 16'd3},
    seg_t'{cfg: 4'd1, rot: 16'd3, count: 16'd2},
    seg_t'{cfg: 4'd0, rot: 16'd7, count: 16'd2}};
  localparam int unsigned EXP_CYCLES = 31;

  logic clk = 0, rst_n = 0, start = 0;
  csr_mode_e csr_mode;
  logic [CFG_W-1:0] cfg_sel;
  logic mon_clear, test_valid, busy, done;
  int checks = 0, failures = 0;

  bist_ctrl #(.N_CSR(N_CSR), .NUM_SEG(NUM_SEG), .SEG(SEG)) dut (.*);

  always #5 clk = ~clk;

  // Expected (command, configuration) per test cycle.
  csr_mode_e exp_mode[$];
  int        exp_cfg[$];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic build_expect();
    int cfgs[3] = '{0, 1, 2};
    int rots[3] = '{7, 3, 1};
    int cnts[3] = '{2, 2, 3};
    exp_mode.delete(); exp_cfg.delete();
    for (int s = 0; s < 3; s++)
      for (int p = 0; p < cnts[s]; p++) begin
        exp_mode.push_back(CSR_LOAD); exp_cfg.push_back(cfgs[s]);
        for (int r = 0; r < rots[s]; r++) begin
          exp_mode.push_back(CSR_ROTATE); exp_cfg.push_back(-1);
        end
      end
    exp_mode.push_back(CSR_HOLD); exp_cfg.push_back(-1);  // last test cycle
  endtask

  task automatic run_session();
    int n = 0;
    @(negedge clk);
    chk(!busy, "idle before start");
    start = 1;
    #1;
    chk(csr_mode == CSR_CLEAR && mon_clear && !test_valid, "start clears CSR and monitor");
    @(negedge clk);
    start = 0;
    while (test_valid) begin
      chk(busy && !done, "busy during session");
      if (n < exp_mode.size()) begin
        chk(csr_mode == exp_mode[n], $sformatf("cycle %0d command %s", n, csr_mode.name()));
        if (exp_cfg[n] >= 0) chk(int'(cfg_sel) == exp_cfg[n], $sformatf("cycle %0d cfg %0d", n, cfg_sel));
      end
      n++;
      @(negedge clk);
    end
    chk(n == EXP_CYCLES, $sformatf("session length %0d", n));
    chk(done && !busy, "done after session");
    repeat (3) @(negedge clk);
    chk(done && !test_valid && csr_mode == CSR_HOLD, "done holds while idle");
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_expect();
    #12 rst_n = 1;
    chk(!done && !busy && !test_valid, "reset state");
    run_session();
    run_session();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

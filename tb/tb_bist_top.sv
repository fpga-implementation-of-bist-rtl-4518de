// tb_bist_top: end-to-end test of the complete BIST with two configurations
// and a four-segment schedule.
//
// Sizes: 8-bit CSR, 12 observed nets, 8 monitored responses. Configuration 0
// and configuration 1 together use all ten feedback operations. Schedule:
//   segment 0: configuration 0, 3 feedback patterns, full rotation (7)
//   segment 1: configuration 1, 2 feedback patterns, 3 rotations
//   segment 2: configuration 1, 2 feedback patterns, 1 rotation
//   segment 3: configuration 0, 1 feedback pattern,  2 rotations
// The CUT is a combinational model defined here. A reference model replays
// the method (all-zero pattern, feedback through the candidate table,
// right rotations) and the MISR independently of the RTL; every test pattern,
// the session length (1 + 3*8 + 2*4 + 2*2 + 1*3 = 40 cycles) and the final
// signature are compared. The session is run twice. Each mechanism is
// counted and must occur: all-zero pattern, feedback load, rotation,
// configuration switch, change of rotation number, each of the ten
// operations in a loaded configuration, done, restart.
module tb_bist_top;
  import bist_pkg::*;

  localparam int unsigned N_CSR   = 8;
  localparam int unsigned N_NETS  = 12;
  localparam int unsigned N_RESP  = 8;
  localparam int unsigned NUM_CFG = 2;
  localparam int unsigned NUM_SEG = 4;
  localparam logic [7:0]  POLY    = 8'h1D;  // x^8 + x^4 + x^3 + x^2 + 1
  localparam int unsigned EXP_CYCLES = 40;

  typedef fb_cand_t [NUM_CFG-1:0][N_CSR-1:0] cfg_tab_t;

  function automatic int op_of(int c, int i);
    return (c == 0) ? i % 5 * 2 : (i % 5) * 2 + 1;  // cfg0 even ops, cfg1 odd ops
  endfunction
  function automatic int na_of(int c, int i); return (5 * i + 3 * c + 2) % N_NETS; endfunction
  function automatic int nb_of(int c, int i); return (7 * i + c + 5) % N_NETS; endfunction

  function automatic cfg_tab_t make_tab();
    cfg_tab_t t;
    for (int c = 0; c < NUM_CFG; c++)
      for (int i = 0; i < N_CSR; i++) begin
        t[c][i].op = fb_op_e'(op_of(c, i));
        t[c][i].a  = NET_IDX_W'(na_of(c, i));
        t[c][i].b  = NET_IDX_W'(nb_of(c, i));
      end
    return t;
  endfunction

  localparam cfg_tab_t TAB = make_tab();
  localparam seg_t [NUM_SEG-1:0] SEG = '{
    seg_t'{cfg: 4'd0, rot: 16'd2, count: 16'd1},
    seg_t'{cfg: 4'd1, rot: 16'd1, count: 16'd2},
    seg_t'{cfg: 4'd1, rot: 16'd3, count: 16'd2},
    seg_t'{cfg: 4'd0, rot: 16'd7, count: 16'd3}};
  int seg_cfg[NUM_SEG] = '{0, 1, 1, 0};
  int seg_rot[NUM_SEG] = '{7, 3, 1, 2};
  int seg_cnt[NUM_SEG] = '{3, 2, 2, 1};

  logic clk = 0, rst_n = 0, start = 0;
  logic [N_CSR-1:0]  cut_pattern;
  logic [N_NETS-1:0] cut_nets;
  logic [N_RESP-1:0] cut_resp, signature;
  logic test_valid, busy, done;
  int checks = 0, failures = 0;

  bist_top #(
    .N_CSR(N_CSR), .N_NETS(N_NETS), .N_RESP(N_RESP), .NUM_CFG(NUM_CFG), .CFG(TAB),
    .NUM_SEG(NUM_SEG), .SEG(SEG), .MISR_POLY(POLY)
  ) dut (.*);

  always #5 clk = ~clk;

  // ---- CUT model: each net is a parity term plus an AND term of inputs.
  function automatic logic [N_NETS-1:0] cut_fn(logic [N_CSR-1:0] p);
    logic [N_NETS-1:0] n;
    for (int j = 0; j < N_NETS; j++) begin
      logic [N_CSR-1:0] m1 = N_CSR'(8'h5B * (j + 1) + 8'h21);
      logic [N_CSR-1:0] m2 = N_CSR'(8'hA7 ^ (8'h13 * j));
      n[j] = (^(p & m1)) ^ (&(p | m2));
    end
    return n;
  endfunction
  assign cut_nets = cut_fn(cut_pattern);
  assign cut_resp = cut_nets[N_RESP-1:0] ^ cut_pattern;

  // ---- Reference model of the method.
  function automatic logic ref_op(int op, logic x, logic y);
    case (op)
      0: return x;       1: return !x;
      2: return 1'b1;    3: return 1'b0;
      4: return x & y;   5: return !(x & y);
      6: return x | y;   7: return !(x | y);
      8: return x ^ y;   default: return !(x ^ y);
    endcase
  endfunction

  logic [N_CSR-1:0] exp_pat[$];
  logic [7:0]       exp_sig;

  task automatic build_reference();
    logic [N_CSR-1:0] p = '0;
    exp_pat.delete();
    exp_pat.push_back(p);
    for (int s = 0; s < NUM_SEG; s++)
      for (int k = 0; k < seg_cnt[s]; k++) begin
        logic [N_NETS-1:0] n = cut_fn(p);
        for (int i = 0; i < N_CSR; i++)
          p[i] = ref_op(op_of(seg_cfg[s], i), n[na_of(seg_cfg[s], i)], n[nb_of(seg_cfg[s], i)]);
        exp_pat.push_back(p);
        for (int r = 0; r < seg_rot[s]; r++) begin
          p = {p[N_CSR-2:0], p[N_CSR-1]};
          exp_pat.push_back(p);
        end
      end
    exp_sig = '0;
    foreach (exp_pat[t]) begin
      logic [7:0] r = cut_fn(exp_pat[t])[7:0] ^ exp_pat[t];
      exp_sig = ((exp_sig << 1) ^ (exp_sig[7] ? POLY : 8'h00)) ^ r;
    end
  endtask

  // ---- Mechanism counters.
  int n_zero = 0, n_load = 0, n_rot = 0, n_cfg_switch = 0, n_rot_change = 0;
  int n_done = 0, n_restart = 0;
  int op_seen[10];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_session(int idx);
    int n = 0, last_cfg = -1, run = 0, last_run = -1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (test_valid) begin
      chk(n < exp_pat.size() && cut_pattern == exp_pat[n],
          $sformatf("session %0d cycle %0d pattern %b", idx, n, cut_pattern));
      if (n == 0 && cut_pattern == '0) n_zero++;
      case (dut.csr_mode)
        CSR_ROTATE: begin n_rot++; run++; end
        CSR_LOAD: begin
          n_load++;
          if (last_cfg >= 0 && int'(dut.cfg_sel) != last_cfg) n_cfg_switch++;
          last_cfg = int'(dut.cfg_sel);
          for (int i = 0; i < N_CSR; i++) op_seen[op_of(last_cfg, i)]++;
          if (n > 0) begin
            if (last_run >= 0 && run != last_run) n_rot_change++;
            last_run = run;
          end
          run = 0;
        end
        default: ;
      endcase
      n++;
      @(negedge clk);
    end
    chk(n == EXP_CYCLES, $sformatf("session %0d took %0d test cycles, expected %0d", idx, n, EXP_CYCLES));
    chk(done && !busy, "done after the session");
    if (done) n_done++;
    chk(signature == exp_sig, $sformatf("signature %h expected %h", signature, exp_sig));
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_reference();
    chk(exp_pat.size() == EXP_CYCLES, "reference length");
    #12 rst_n = 1;
    run_session(0);
    repeat (4) @(negedge clk);
    n_restart++;
    run_session(1);
    $display("mechanisms: zero=%0d load=%0d rotate=%0d cfg_switch=%0d rot_change=%0d done=%0d restart=%0d",
             n_zero, n_load, n_rot, n_cfg_switch, n_rot_change, n_done, n_restart);
    chk(n_zero > 0, "all-zero initial pattern never applied");
    chk(n_load > 0, "no feedback load");
    chk(n_rot > 0, "no rotation");
    chk(n_cfg_switch > 0, "no configuration switch");
    chk(n_rot_change > 0, "rotation number never changed");
    chk(n_done > 0, "never done");
    chk(n_restart > 0, "never restarted");
    for (int o = 0; o < 10; o++) chk(op_seen[o] > 0, $sformatf("operation %0d never used", o));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

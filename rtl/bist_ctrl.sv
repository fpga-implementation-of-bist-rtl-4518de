// bist_ctrl: on-chip BIST control unit.
//
// Runs one test session as a fixed schedule. The first test cycle applies the
// all-zero initial pattern (CSR cleared). After that the schedule is a list
// of segments; segment s produces SEG[s].count feedback patterns through SFL
// configuration SEG[s].cfg, and after each feedback pattern the CSR is
// rotated SEG[s].rot times, one bit per test cycle. A segment with rotation
// number N_CSR-1 is a full-rotation (first-phase) segment; segments with
// smaller numbers are the groups of the variable-rotation phase. When the
// configuration changes between segments, the first feedback pattern of the
// new configuration is formed from the responses to the last pattern of the
// old one, so nothing is stored.
//
// Interface and timing: a one-cycle start pulse while idle clears the CSR and
// the response monitor (csr_mode = CSR_CLEAR, mon_clear = 1). From the next
// cycle on, test_valid is high in every test cycle, i.e. every cycle in which
// the CSR holds a test pattern; csr_mode and cfg_sel say how the CSR is to be
// updated at the end of that cycle. A session lasts
//   1 + sum over s of SEG[s].count * (1 + SEG[s].rot)
// test cycles; done then rises and stays high until the next start.
// The segment table, the start/busy/done handshake and the cycle-exact timing
// are this design's own choices; the method fixes the pattern sequence.
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned N_CSR   = FIG3_N_CSR,
  parameter int unsigned NUM_SEG = 1,
  parameter seg_t [NUM_SEG-1:0] SEG = FIG3_SEG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output csr_mode_e        csr_mode,
  output logic [CFG_W-1:0] cfg_sel,
  output logic             mon_clear,
  output logic             test_valid,
  output logic             busy,
  output logic             done
);

  localparam int unsigned SEG_IW = (NUM_SEG > 1) ? $clog2(NUM_SEG) : 1;

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_ZERO = 2'd1,   // the all-zero initial pattern is applied
    S_RUN  = 2'd2    // a feedback or rotation pattern is applied
  } state_e;

  state_e             state_q, state_d;
  logic [SEG_IW-1:0]  seg_q, seg_d;
  logic [ROT_W-1:0]   rot_q, rot_d;    // rotations still to do for this pattern
  logic [CNT_W-1:0]   pats_q, pats_d;  // feedback patterns still to do in segment
  logic               done_q, done_d;

  seg_t cur_seg, nxt_seg;
  assign cur_seg = SEG[seg_q];
  assign nxt_seg = (int'(seg_q) + 1 < NUM_SEG) ? SEG[seg_q + SEG_IW'(1)] : SEG[seg_q];

  always_comb begin
    state_d    = state_q;
    seg_d      = seg_q;
    rot_d      = rot_q;
    pats_d     = pats_q;
    done_d     = done_q;
    csr_mode   = CSR_HOLD;
    cfg_sel    = cur_seg.cfg;
    mon_clear  = 1'b0;
    test_valid = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        if (start) begin
          csr_mode  = CSR_CLEAR;
          mon_clear = 1'b1;
          done_d    = 1'b0;
          state_d   = S_ZERO;
        end
      end

      S_ZERO: begin
        // Load the first feedback pattern of the first segment.
        test_valid = 1'b1;
        csr_mode   = CSR_LOAD;
        cfg_sel    = SEG[0].cfg;
        seg_d      = '0;
        rot_d      = SEG[0].rot;
        pats_d     = SEG[0].count - CNT_W'(1);
        state_d    = S_RUN;
      end

      S_RUN: begin
        test_valid = 1'b1;
        if (rot_q != '0) begin
          csr_mode = CSR_ROTATE;
          rot_d    = rot_q - ROT_W'(1);
        end else if (pats_q != '0) begin
          // Next feedback pattern from the same configuration.
          csr_mode = CSR_LOAD;
          rot_d    = cur_seg.rot;
          pats_d   = pats_q - CNT_W'(1);
        end else if (int'(seg_q) + 1 < NUM_SEG) begin
          // Next segment: possibly a new configuration and rotation number.
          csr_mode = CSR_LOAD;
          cfg_sel  = nxt_seg.cfg;
          seg_d    = seg_q + SEG_IW'(1);
          rot_d    = nxt_seg.rot;
          pats_d   = nxt_seg.count - CNT_W'(1);
        end else begin
          state_d = S_IDLE;
          done_d  = 1'b1;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      seg_q   <= '0;
      rot_q   <= '0;
      pats_q  <= '0;
      done_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      seg_q   <= seg_d;
      rot_q   <= rot_d;
      pats_q  <= pats_d;
      done_q  <= done_d;
    end
  end

  assign busy = (state_q != S_IDLE);
  assign done = done_q;

  // Every segment must produce at least one feedback pattern and use an
  // existing rotation count (at most a full rotation).
  for (genvar s = 0; s < NUM_SEG; s++) begin : g_chk
    initial begin
      assert (SEG[s].count != '0)
        else $error("bist_ctrl: segment %0d has no feedback pattern", s);
      assert (int'(SEG[s].rot) < N_CSR)
        else $error("bist_ctrl: segment %0d rotates more than n-1 times", s);
    end
  end

  // A start pulse is only honoured while idle.
  property p_clear_only_from_idle;
    @(posedge clk) disable iff (!rst_n) (csr_mode == CSR_CLEAR) |-> (state_q == S_IDLE);
  endproperty
  a_clear_only_from_idle: assert property (p_clear_only_from_idle);

endmodule

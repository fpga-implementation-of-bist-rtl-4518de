// bist_top: deterministic self-feedback BIST around an external circuit under
// test (CUT).
//
// The CUT's primary inputs and scan cells form the circular shift register
// (csr). Its contents drive the CUT through cut_pattern. The CUT returns the
// responses of pre-selected internal nets on cut_nets, from which the
// self-feedback logic (sfl) forms the next initial pattern, and its observable
// responses on cut_resp, which the response monitor compacts into a
// signature. The control unit (bist_ctrl) applies the all-zero pattern, then
// alternates feedback loads and rotation runs according to its schedule.
//
// Timing: the CUT is taken to be combinational over one test cycle (test per
// clock): cut_nets and cut_resp must answer the cut_pattern of the same
// cycle. Pulse start for one cycle while idle; busy is high for the session,
// done rises after the last test cycle, and signature is then final. The
// defaults reproduce the 4-input, 5-net worked example of the method, which
// takes 9 test cycles. The CUT itself is not part of this module; the width
// of cut_resp is this design's choice.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N_CSR   = FIG3_N_CSR,
  parameter int unsigned N_NETS  = FIG3_N_NETS,
  parameter int unsigned N_RESP  = 5,
  parameter int unsigned NUM_CFG = 1,
  parameter fb_cand_t [NUM_CFG-1:0][N_CSR-1:0] CFG = FIG3_CFG,
  parameter int unsigned NUM_SEG = 1,
  parameter seg_t [NUM_SEG-1:0] SEG = FIG3_SEG,
  parameter logic [N_RESP-1:0] MISR_POLY = N_RESP'(5'b00101)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic [N_CSR-1:0]  cut_pattern,
  input  logic [N_NETS-1:0] cut_nets,
  input  logic [N_RESP-1:0] cut_resp,
  output logic              test_valid,
  output logic              busy,
  output logic              done,
  output logic [N_RESP-1:0] signature
);

  csr_mode_e        csr_mode;
  logic [CFG_W-1:0] cfg_sel;
  logic             mon_clear;
  logic [N_CSR-1:0] fb_pattern;

  bist_ctrl #(
    .N_CSR   (N_CSR),
    .NUM_SEG (NUM_SEG),
    .SEG     (SEG)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .csr_mode   (csr_mode),
    .cfg_sel    (cfg_sel),
    .mon_clear  (mon_clear),
    .test_valid (test_valid),
    .busy       (busy),
    .done       (done)
  );

  sfl #(
    .N_CSR   (N_CSR),
    .N_NETS  (N_NETS),
    .NUM_CFG (NUM_CFG),
    .CFG     (CFG)
  ) u_sfl (
    .nets       (cut_nets),
    .cfg_sel    (cfg_sel),
    .fb_pattern (fb_pattern)
  );

  csr #(
    .N (N_CSR)
  ) u_csr (
    .clk        (clk),
    .rst_n      (rst_n),
    .mode       (csr_mode),
    .fb_pattern (fb_pattern),
    .pattern    (cut_pattern)
  );

  resp_monitor #(
    .W    (N_RESP),
    .POLY (MISR_POLY)
  ) u_mon (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (mon_clear),
    .enable    (test_valid),
    .resp      (cut_resp),
    .signature (signature)
  );

endmodule

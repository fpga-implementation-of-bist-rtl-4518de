// sfl: self-feedback logic unit.
//
// Forms the next initial pattern ("feedback pattern") for the circular shift
// register from the current responses of pre-selected internal nets of the
// circuit under test, so that no seed storage is needed. Every CSR bit has
// one feedback candidate per configuration: no-op, inversion, tie to 1, tie
// to 0, or an AND/NAND, OR/NOR, XOR/XNOR of two response bits. The control
// unit picks the configuration with cfg_sel.
//
// The configurations are a design-time parameter table, so after synthesis
// each is plain wiring and gates followed by a configuration multiplexer.
// Purely combinational: fb_pattern follows nets and cfg_sel in the same
// cycle. Bit 0 of fb_pattern is input I1 of the CUT.
//
// The operation set is the method's; the table format, the index encoding
// and the default (the single configuration of the 4-input, 5-net worked
// example: I1<-N5, I2<-N4, I3<-N1, I4<-N1) are this design's choices.
module sfl
  import bist_pkg::*;
#(
  parameter int unsigned N_CSR   = FIG3_N_CSR,
  parameter int unsigned N_NETS  = FIG3_N_NETS,
  parameter int unsigned NUM_CFG = 1,
  parameter fb_cand_t [NUM_CFG-1:0][N_CSR-1:0] CFG = FIG3_CFG
) (
  input  logic [N_NETS-1:0] nets,
  input  logic [CFG_W-1:0]  cfg_sel,
  output logic [N_CSR-1:0]  fb_pattern
);

  // Every candidate of every configuration, evaluated in parallel.
  logic [NUM_CFG-1:0][N_CSR-1:0] cand_out;

  for (genvar c = 0; c < NUM_CFG; c++) begin : g_cfg
    for (genvar i = 0; i < N_CSR; i++) begin : g_bit
      localparam fb_cand_t C = CFG[c][i];
      initial begin
        assert (int'(C.a) < N_NETS && int'(C.b) < N_NETS)
          else $error("sfl: configuration %0d bit %0d names a net out of range", c, i);
      end
      // Indices are reduced into range so that a bad table cannot read
      // outside the net vector; the assertion above reports it.
      localparam int unsigned IA = int'(C.a) % N_NETS;
      localparam int unsigned IB = int'(C.b) % N_NETS;
      assign cand_out[c][i] = fb_eval(C.op, nets[IA], nets[IB]);
    end
  end

  always_comb begin
    fb_pattern = '0;
    for (int c = 0; c < NUM_CFG; c++) begin
      if (cfg_sel == CFG_W'(c)) fb_pattern = cand_out[c];
    end
  end

  initial begin
    assert (NUM_CFG >= 1 && NUM_CFG <= (1 << CFG_W))
      else $error("sfl: NUM_CFG out of range");
  end

endmodule

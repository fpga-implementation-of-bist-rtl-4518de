// bist_pkg: types and constants shared by the self-feedback BIST blocks.
//
// A feedback candidate is one logic operation on one or two internal-net
// responses of the circuit under test (CUT); it supplies one bit of the next
// CSR pattern. A configuration is one candidate per CSR bit. The operation
// set (no-op, inversion, tie to 1, tie to 0, AND/NAND, OR/NOR, XOR/XNOR)
// follows the method; the field widths below are this design's own choice
// and bound the sizes the parameters of the other modules may take.
package bist_pkg;

  localparam int unsigned NET_IDX_W = 8;   // up to 256 observed internal nets
  localparam int unsigned CFG_W     = 4;   // up to 16 configurations
  localparam int unsigned ROT_W     = 16;  // rotation number per feedback pattern
  localparam int unsigned CNT_W     = 16;  // feedback patterns per segment

  typedef enum logic [3:0] {
    OP_BUF  = 4'd0,  // no-operation: response bit as is
    OP_INV  = 4'd1,  // inversion
    OP_ONE  = 4'd2,  // short to VDD
    OP_ZERO = 4'd3,  // short to GND
    OP_AND  = 4'd4,
    OP_NAND = 4'd5,
    OP_OR   = 4'd6,
    OP_NOR  = 4'd7,
    OP_XOR  = 4'd8,
    OP_XNOR = 4'd9
  } fb_op_e;

  // One feedback candidate: operation and the indices of its response bits.
  typedef struct packed {
    fb_op_e                 op;
    logic [NET_IDX_W-1:0]   a;  // first net index (0 = N1)
    logic [NET_IDX_W-1:0]   b;  // second net index, binary operations only
  } fb_cand_t;

  // One segment of the test schedule: COUNT feedback patterns, each produced
  // by configuration CFG and followed by ROT single-bit rotations.
  typedef struct packed {
    logic [CFG_W-1:0] cfg;
    logic [ROT_W-1:0] rot;
    logic [CNT_W-1:0] count;
  } seg_t;

  // CSR command issued by the control unit for the next clock edge.
  typedef enum logic [1:0] {
    CSR_HOLD   = 2'd0,
    CSR_CLEAR  = 2'd1,  // load the all-zero initial pattern
    CSR_LOAD   = 2'd2,  // load the SFL feedback pattern
    CSR_ROTATE = 2'd3   // rotate by one bit
  } csr_mode_e;

  // Evaluate one feedback candidate on a vector of net responses.
  function automatic logic fb_eval(fb_op_e op, logic va, logic vb);
    unique case (op)
      OP_BUF:  return va;
      OP_INV:  return ~va;
      OP_ONE:  return 1'b1;
      OP_ZERO: return 1'b0;
      OP_AND:  return va & vb;
      OP_NAND: return ~(va & vb);
      OP_OR:   return va | vb;
      OP_NOR:  return ~(va | vb);
      OP_XOR:  return va ^ vb;
      OP_XNOR: return ~(va ^ vb);
      default: return 1'b0;
    endcase
  endfunction

  function automatic fb_cand_t cand(fb_op_e op, logic [NET_IDX_W-1:0] a,
                                    logic [NET_IDX_W-1:0] b = '0);
    cand.op = op;
    cand.a  = a;
    cand.b  = b;
  endfunction

  // Figure 3 example: 4 inputs I1..I4, 5 nets N1..N5. The single configuration
  // connects N5 to I1, N4 to I2 and N1 to both I3 and I4 (indices from 0).
  localparam int unsigned FIG3_N_CSR  = 4;
  localparam int unsigned FIG3_N_NETS = 5;
  localparam fb_cand_t [0:0][FIG3_N_CSR-1:0] FIG3_CFG = '{'{
      fb_cand_t'{op: OP_BUF, a: 8'd0, b: 8'd0},   // I4 <- N1
      fb_cand_t'{op: OP_BUF, a: 8'd0, b: 8'd0},   // I3 <- N1
      fb_cand_t'{op: OP_BUF, a: 8'd3, b: 8'd0},   // I2 <- N4
      fb_cand_t'{op: OP_BUF, a: 8'd4, b: 8'd0}}}; // I1 <- N5
  // Two feedback patterns (TP1, TP2), each fully rotated (n-1 = 3 rotations).
  localparam seg_t [0:0] FIG3_SEG = '{seg_t'{cfg: 4'd0, rot: 16'd3, count: 16'd2}};

endpackage

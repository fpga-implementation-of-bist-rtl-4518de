// csr: circular shift register.
//
// The primary inputs and scan cells of the circuit under test, chained into
// one ring of N bits. Its contents are the test pattern of the current test
// cycle. Per clock the control unit commands one of:
//   CSR_CLEAR  - load the all-zero initial pattern,
//   CSR_LOAD   - load a feedback pattern from the self-feedback logic,
//   CSR_ROTATE - rotate by one bit, producing the next rotation pattern,
//   CSR_HOLD   - keep the contents.
// Bit 0 is input I1. A rotation moves every bit one place towards the last
// input and the last bit into I1 (pattern I1..I4 = 0011 becomes 1001), the
// direction of the method's worked examples. Asynchronous active-low reset to
// all zeros is this design's choice. The new pattern appears one clock after
// the command.
module csr
  import bist_pkg::*;
#(
  parameter int unsigned N = FIG3_N_CSR
) (
  input  logic             clk,
  input  logic             rst_n,
  input  csr_mode_e        mode,
  input  logic [N-1:0]     fb_pattern,
  output logic [N-1:0]     pattern
);

  logic [N-1:0] rotated;

  if (N == 1) begin : g_one
    assign rotated = pattern;
  end else begin : g_ring
    assign rotated = {pattern[N-2:0], pattern[N-1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pattern <= '0;
    end else begin
      unique case (mode)
        CSR_CLEAR:  pattern <= '0;
        CSR_LOAD:   pattern <= fb_pattern;
        CSR_ROTATE: pattern <= rotated;
        default:    pattern <= pattern;
      endcase
    end
  end

endmodule

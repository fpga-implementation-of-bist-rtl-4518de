// resp_monitor: response monitor, a multiple-input signature register (MISR).
//
// Captures the responses of the circuit under test in every test cycle by
// compacting them into a W-bit signature; after the session the signature is
// compared with the fault-free one. The method only states that a monitor
// captures the responses; the MISR, its width and its feedback polynomial
// are this design's choices.
//
// Next state when enable is high: sig' = shift(sig) ^ resp, where shift
// moves bit i to bit i+1 and, if the old top bit was 1, XORs POLY (the
// polynomial without its x^W term) into the result. clear (synchronous)
// sets the signature to zero and takes priority. Both act at the clock edge.
module resp_monitor #(
  parameter int unsigned   W    = 5,
  parameter logic [W-1:0]  POLY = W'(5'b00101)   // x^5 + x^2 + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          enable,
  input  logic [W-1:0]  resp,
  output logic [W-1:0]  signature
);

  logic [W-1:0] shifted;

  always_comb begin
    shifted = signature << 1;
    if (signature[W-1]) shifted = shifted ^ POLY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      signature <= '0;
    end else if (clear) begin
      signature <= '0;
    end else if (enable) begin
      signature <= shifted ^ resp;
    end
  end

endmodule

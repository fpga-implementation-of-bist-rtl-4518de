// fig3_cut: behavioural model of the small circuit under test of the worked
// example (4 inputs I1..I4, 5 observed internal nets N1..N5).
//
// Only the nine input patterns of the example are known, with these
// responses (I1..I4 -> N1..N5): 0000->11100, 0011->01100, 1001->01100,
// 1100->11001, 0110->11101, 1011->10111, 1101->01111, 1110->10010,
// 0111->11011. For any other pattern the nets read 0 and known is low.
// Combinational; bit 0 of each vector is I1 or N1.
module fig3_cut (
  input  logic [3:0] pattern,
  output logic [4:0] nets,
  output logic       known
);
  // Vectors as written above, first letter first.
  function automatic logic [3:0] pi(string s);
    for (int i = 0; i < 4; i++) pi[i] = (s[i] == "1");
  endfunction
  function automatic logic [4:0] pn(string s);
    for (int i = 0; i < 5; i++) pn[i] = (s[i] == "1");
  endfunction

  always_comb begin
    known = 1'b1;
    if      (pattern == pi("0000")) nets = pn("11100");
    else if (pattern == pi("0011")) nets = pn("01100");
    else if (pattern == pi("1001")) nets = pn("01100");
    else if (pattern == pi("1100")) nets = pn("11001");
    else if (pattern == pi("0110")) nets = pn("11101");
    else if (pattern == pi("1011")) nets = pn("10111");
    else if (pattern == pi("1101")) nets = pn("01111");
    else if (pattern == pi("1110")) nets = pn("10010");
    else if (pattern == pi("0111")) nets = pn("11011");
    else begin
      nets  = '0;
      known = 1'b0;
    end
  end
endmodule

// coef_fcp: first coding pass of the coefficient generator.
//
// The filter holds two coefficient sets for each of its three lengths (25, 37
// and 49 taps), the two sets differing only in roll-off factor. The three
// lengths are handled by three coding blocks side by side; in each, every
// coefficient bit is a 2:1 multiplexer between the bit of set A and the bit of
// set B, steered by FLT_SEL. Where the two sets agree in a bit position the
// multiplexer reduces to a constant, which is the vertical bit matching
// between the two sets of one length. Only the unique half of each symmetric
// filter is produced: 13, 19 and 25 words, 57 in all. Without the 2:1
// multiplexers the three lengths would need 111 taps per roll-off set, 222
// for both; without the symmetry, 111 after them.
//
// The coefficient values themselves (roll-offs 0.22 and 0.35, formula in
// rrc_pkg) are this design's choice.
//
// Interface: flt_sel in; h25, h37, h49 (rrc_pkg::coef_t, tap 0 first, centre
// last) out. Combinational.
module coef_fcp
  import rrc_pkg::*;
(
  input  logic  flt_sel,
  output coef_t h25 [13],
  output coef_t h37 [19],
  output coef_t h49 [25]
);

  always_comb begin
    for (int i = 0; i < 13; i++) h25[i] = flt_sel ? H25_B[i] : H25_A[i];
    for (int i = 0; i < 19; i++) h37[i] = flt_sel ? H37_B[i] : H37_A[i];
    for (int i = 0; i < 25; i++) h49[i] = flt_sel ? H49_B[i] : H49_A[i];
  end

endmodule

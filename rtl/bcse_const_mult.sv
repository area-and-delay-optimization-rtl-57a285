// bcse_const_mult: 2-bit binary common sub-expression elimination (BCSE)
// constant multiplier.
//
// Multiplies a signed input sample by a sign-magnitude coefficient drawn from
// a fixed coefficient set. The partial product generator forms x, 2x and 3x
// (one adder, for BCS pattern 11); each of the eight 2-bit groups of the
// coefficient magnitude drives the select of a 4:1 multiplexer over
// {0, x, 2x, 3x}; the eight terms are preshifted and summed by a three-level
// adder tree and the sign is applied by a 2:1 complement multiplexer. The
// critical path is four adders plus one 4:1 multiplexer (and the 2:1 sign
// multiplexer). The coefficient bits act only as multiplexer selects, so a
// constant coefficient collapses to a shift-and-add network in synthesis.
//
// By default the product's 15 fraction bits are not computed: the preshifted
// terms are truncated to 2N+1 bits and a compensation constant is added (see
// bcse_final_add), so p is x*coef rounded to an integer within 4 LSB.
// FRAC_DROP = 0 gives the exact product with 15 fraction bits.
//
// Interface: x (signed DATA_W), coef (rrc_pkg::coef_t: sign, 16-bit magnitude
// with weights 2^0..2^-15); p = x*coef * 2^(15-FRAC_DROP), signed,
// DATA_W+16-FRAC_DROP bits. Combinational.
module bcse_const_mult
  import rrc_pkg::coef_t, rrc_pkg::COEF_W;
#(
  parameter int unsigned DATA_W    = rrc_pkg::DATA_W,
  parameter int unsigned FRAC_DROP = rrc_pkg::FRAC_DROP
) (
  input  logic signed [DATA_W-1:0]                  x,
  input  coef_t                                     coef,
  output logic signed [DATA_W+COEF_W-FRAC_DROP-1:0] p
);

  localparam int unsigned PP_W   = DATA_W + 2;
  localparam int unsigned GROUPS = COEF_W / 2;

  logic signed [PP_W-1:0] x1, x2, x3;
  logic signed [PP_W-1:0] sel [GROUPS];

  bcse_ppg #(.DATA_W(DATA_W)) u_ppg (
    .x(x), .x1(x1), .x2(x2), .x3(x3)
  );

  bcse_mux_unit #(.COEF_W(COEF_W), .PP_W(PP_W)) u_mu (
    .x1(x1), .x2(x2), .x3(x3), .mag(coef.mag), .sel(sel)
  );

  bcse_final_add #(
    .PP_W(PP_W), .GROUPS(GROUPS), .PROD_W(DATA_W+COEF_W), .FRAC_DROP(FRAC_DROP)
  ) u_fa (
    .sel(sel), .neg(coef.sign), .nz(|coef.mag), .p(p)
  );

endmodule

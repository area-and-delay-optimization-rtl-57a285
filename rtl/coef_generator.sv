// coef_generator: coefficient generator and branch multipliers.
//
// Produces the seven products of one polyphase branch. The first coding pass
// picks the roll-off set (FLT_SEL), the second coding pass picks the filter
// length (INTP_SEL), the coefficient selector steers the branch coefficients
// h[j*L+k], and seven 2-bit BCSE constant multipliers multiply them with the
// seven newest input samples. Because the coefficient sets are multiplexed
// ahead of the multipliers, seven multipliers serve all six filters: seven
// multiplications per output sample instead of 42 for six separate
// seven-tap branch filters.
//
// Interface: intp_sel, flt_sel, phase (branch k), taps[0..6] (taps[0] newest)
// in; products[j] = taps[j] * h[j*L+k] * 2^(15-FRAC_DROP), signed, out
// (truncated as described in bcse_final_add). Combinational.
module coef_generator
  import rrc_pkg::coef_t, rrc_pkg::COEF_W, rrc_pkg::HALF_MAX;
#(
  parameter int unsigned BRANCH = rrc_pkg::BRANCH,
  parameter int unsigned DATA_W    = rrc_pkg::DATA_W,
  parameter int unsigned FRAC_DROP = rrc_pkg::FRAC_DROP
) (
  input  logic [1:0]                                intp_sel,
  input  logic                                      flt_sel,
  input  logic [2:0]                                phase,
  input  logic signed [DATA_W-1:0]                  taps     [BRANCH],
  output logic signed [DATA_W+COEF_W-FRAC_DROP-1:0] products [BRANCH]
);

  coef_t h25 [13];
  coef_t h37 [19];
  coef_t h49 [25];
  coef_t half  [HALF_MAX];
  coef_t coefs [BRANCH];

  coef_fcp u_fcp (.flt_sel(flt_sel), .h25(h25), .h37(h37), .h49(h49));

  coef_scp u_scp (.intp_sel(intp_sel), .h25(h25), .h37(h37), .h49(h49), .half(half));

  coef_selector #(.BRANCH(BRANCH)) u_cs (
    .intp_sel(intp_sel), .phase(phase), .half(half), .coefs(coefs)
  );

  for (genvar j = 0; j < BRANCH; j++) begin : g_cm
    bcse_const_mult #(.DATA_W(DATA_W), .FRAC_DROP(FRAC_DROP)) u_cm (
      .x(taps[j]), .coef(coefs[j]), .p(products[j])
    );
  end

endmodule

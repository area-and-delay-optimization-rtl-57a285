// bcse_final_add: final addition of the 2-bit BCS constant multiplier.
//
// The eight group terms are preshifted by 2g (group g has weight 4^g) and
// summed by a balanced three-level adder tree, log2(16/2) = 3 adder levels;
// with the partial product adder this gives the logic depth of four adders
// of the 2-bit BCS multiplier. A final 2:1 multiplexer complements the sum
// for a negative coefficient, the coefficient being held in sign-magnitude
// form.
//
// Truncation. The FRAC_DROP least significant bits of the product are not
// computed: each preshifted term is cut to its bits at and above weight
// 2^FRAC_DROP before the adder tree (an arithmetic shift, i.e. floor). With
// 18-bit terms and FRAC_DROP = 15 the eight terms are 3, 5, ..., 17 bits
// wide, 2N+1 bits for N = 1..8, as in the design description; this keeps the
// adders narrow. Each cut term is low by less than one output LSB, the eight
// together by less than eight. To centre the error, the constant TRUNC_COMP
// (half the number of cut terms, 4 by default) is added in the same tree for
// any non-zero coefficient, so the result is within 4 LSB of the exact
// product. The use of half the maximum error, and skipping it for a zero
// coefficient, are this design's choices. FRAC_DROP = 0 gives the exact
// product.
//
// Interface: sel[0..GROUPS-1] (signed, PP_W bits), neg, nz (coefficient is
// non-zero); p = +/- (sum of sel[g]*4^g / 2^FRAC_DROP, truncated, + comp),
// signed PROD_W - FRAC_DROP bits. Combinational.
module bcse_final_add #(
  parameter int unsigned PP_W      = 18,
  parameter int unsigned GROUPS    = 8,         // power of two
  parameter int unsigned PROD_W    = 32,        // width of the exact product
  parameter int unsigned FRAC_DROP = 15,        // product LSBs not computed
  parameter int unsigned OUT_W     = PROD_W - FRAC_DROP
) (
  input  logic signed [PP_W-1:0]  sel [GROUPS],
  input  logic                    neg,
  input  logic                    nz,
  output logic signed [OUT_W-1:0] p
);

  localparam int unsigned LEVELS = $clog2(GROUPS);

  // Number of terms that lose bits, and the compensation constant.
  function automatic int unsigned cut_terms();
    int unsigned n = 0;
    for (int g = 0; g < int'(GROUPS); g++)
      if (2*g < int'(FRAC_DROP)) n++;
    return n;
  endfunction
  localparam int unsigned TRUNC_COMP = cut_terms() / 2;

  // tree[l][i]: node i of level l; level 0 holds the preshifted terms.
  logic signed [PROD_W-1:0] shifted [GROUPS];
  logic signed [OUT_W-1:0]  tree [LEVELS+1][GROUPS];
  logic signed [OUT_W-1:0]  sum;

  always_comb begin
    for (int l = 0; l <= LEVELS; l++)
      for (int i = 0; i < GROUPS; i++)
        tree[l][i] = '0;
    for (int g = 0; g < GROUPS; g++) begin
      shifted[g] = PROD_W'(sel[g]) <<< (2*g);
      tree[0][g] = OUT_W'(shifted[g] >>> FRAC_DROP);
    end
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < (GROUPS >> l); i++)
        tree[l][i] = tree[l-1][2*i] + tree[l-1][2*i+1];
    sum = tree[LEVELS][0] + ((nz && TRUNC_COMP != 0) ? OUT_W'(TRUNC_COMP) : '0);
    p   = neg ? -sum : sum;
  end

endmodule

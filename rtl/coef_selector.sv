// coef_selector: coefficient selector of the polyphase interpolator.
//
// An N-tap interpolation filter with factor L (N = 6L+1) is split into L
// branch filters of seven taps; branch k uses taps h[j*L + k], j = 0..6, and
// the last of these lies beyond the filter (is zero) for every branch but
// k = 0. Each cycle this block steers, for the branch being computed, the
// right coefficient to each of the seven constant multipliers. Only the
// unique half of the linear-phase filter is stored, so tap m is read as
// half[m] for m <= (N-1)/2 and as half[N-1-m] above it.
//
// Interface: intp_sel, phase (branch index k, 0..L-1) and half[] from the
// second coding pass in; coefs[0..BRANCH-1] out, coefs[j] for the sample
// j input periods old. Combinational.
module coef_selector
  import rrc_pkg::coef_t, rrc_pkg::HALF_MAX, rrc_pkg::interp_factor, rrc_pkg::num_taps;
#(
  parameter int unsigned BRANCH = rrc_pkg::BRANCH
) (
  input  logic [1:0] intp_sel,
  input  logic [2:0] phase,
  input  coef_t      half  [HALF_MAX],
  output coef_t      coefs [BRANCH]
);

  logic [3:0] l;
  logic [5:0] n;
  logic [5:0] c;

  always_comb begin
    l = interp_factor(intp_sel);
    n = num_taps(intp_sel);
    c = (n - 6'd1) >> 1;
    for (int j = 0; j < int'(BRANCH); j++) begin
      logic [6:0] m;      // tap index j*L + k
      logic [6:0] idx;    // folded through the symmetry
      m   = 7'(j) * 7'(l) + 7'(phase);
      idx = (m <= 7'(c)) ? m : 7'(n) - 7'd1 - m;
      if (m < 7'(n) && idx < 7'(HALF_MAX))
        coefs[j] = half[idx[4:0]];
      else
        coefs[j] = '0;
    end
  end

endmodule

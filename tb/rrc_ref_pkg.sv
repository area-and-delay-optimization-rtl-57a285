// rrc_ref_pkg: reference models shared by the interpolator testbenches.
//
// rrc_quant() computes a coefficient from the root-raised-cosine formula in
// double precision and quantises it the way the coefficient tables are
// specified: sign + floor(|h| * 2^15 + 0.5), centre tap = 1.0, roll-off 0.22
// for FLT_SEL = 0 and 0.35 for FLT_SEL = 1, L = 4/6/8 for INTP_SEL = 0/1/2.
// It is written independently of the RTL coefficient tables. trunc_prod()
// is the truncating 2-bit BCS product: the coefficient magnitude is cut into
// 2-bit groups b_g, each term x*b_g*4^g is floored to a multiple of
// 2^drop, the terms are summed, half the number of cut terms is added for a
// non-zero coefficient, and the sign is applied.
package rrc_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real rrc(input real t, input real b);
    if (t < 1.0e-12 && t > -1.0e-12)
      return 1.0 - b + 4.0*b/PI;
    if (rabs(rabs(t) - 1.0/(4.0*b)) < 1.0e-12)
      return b/$sqrt(2.0)*((1.0+2.0/PI)*$sin(PI/(4.0*b)) + (1.0-2.0/PI)*$cos(PI/(4.0*b)));
    return ($sin(PI*t*(1.0-b)) + 4.0*b*t*$cos(PI*t*(1.0+b))) / (PI*t*(1.0-(4.0*b*t)*(4.0*b*t)));
  endfunction

  function automatic real beta_of(input int flt);
    return (flt != 0) ? 0.35 : 0.22;
  endfunction

  function automatic int l_of(input int intp);
    return (intp == 0) ? 4 : (intp == 1) ? 6 : 8;
  endfunction

  // Signed quantised coefficient of tap m of the (flt, intp) filter.
  function automatic longint rrc_quant(input int flt, input int intp, input int m);
    int  l;
    int  c;
    real v;
    longint q;
    l = l_of(intp);
    c = 3*l;
    v = rrc(real'(m - c) / real'(l), beta_of(flt)) / rrc(0.0, beta_of(flt));
    q = longint'($floor(rabs(v) * 32768.0 + 0.5));
    if (q > 65535) q = 65535;
    return (v < 0.0) ? -q : q;
  endfunction

  function automatic longint trunc_prod(input longint x, input longint c, input int drop);
    longint mag, sum, term;
    int     cut;
    mag = (c < 0) ? -c : c;
    sum = 0;
    cut = 0;
    for (int g = 0; g < 8; g++) begin
      term = x * ((mag >> (2*g)) & 3) * (longint'(1) << (2*g));
      sum += term >>> drop;
      if (2*g < drop) cut++;
    end
    if (mag != 0) sum += longint'(cut) / 2;
    return (c < 0) ? -sum : sum;
  endfunction

endpackage

// bcse_ppg: partial product generator of the 2-bit binary common
// sub-expression (BCS) constant multiplier.
//
// A 16-bit coefficient is cut into eight 2-bit groups. Each group is one of
// the four BCS patterns 00, 01, 10, 11, whose products with the input are
// 0, x, 2x and 3x. 0, x and 2x are wiring; only pattern 11 costs an adder,
// 3x = x + 2x. This block computes those terms once for one input sample so
// that every coefficient group can pick from them (bcse_mux_unit). In the
// fractional notation of the coefficient (weights 2^0 .. 2^-15) the same
// sub-expression is x + 2^-1 x; here the coefficient is treated as an integer
// and the product is rescaled by 2^-15 at the end.
//
// Interface: x (signed, DATA_W bits) in; x1 = x, x2 = 2x, x3 = 3x out, all
// signed, DATA_W+2 bits so that 3x cannot overflow. Purely combinational:
// one adder on the path.
module bcse_ppg #(
  parameter int unsigned DATA_W = 16
) (
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W+1:0] x1,
  output logic signed [DATA_W+1:0] x2,
  output logic signed [DATA_W+1:0] x3
);

  always_comb begin
    x1 = (DATA_W+2)'(x);
    x2 = x1 <<< 1;
    x3 = x1 + x2;   // the only adder: BCS pattern 11
  end

endmodule

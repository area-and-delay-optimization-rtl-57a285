// bcse_mux_unit: multiplexer unit of the 2-bit BCS constant multiplier.
//
// One 4:1 multiplexer per 2-bit group of the coefficient magnitude. Group g
// holds magnitude bits [2g+1:2g] and selects 0 (00), x (01), 2x (10) or
// 3x (11) from the partial product generator. The shift by 2g that gives each
// group its weight is left to bcse_final_add, so all group terms have the
// same width here.
//
// Interface: x1/x2/x3 from bcse_ppg, the coefficient magnitude mag; sel[g]
// out. Combinational: one 4:1 multiplexer on the path.
module bcse_mux_unit #(
  parameter int unsigned COEF_W = 16,          // even
  parameter int unsigned PP_W   = 18,          // width of x1/x2/x3
  parameter int unsigned GROUPS = COEF_W / 2
) (
  input  logic signed [PP_W-1:0]   x1,
  input  logic signed [PP_W-1:0]   x2,
  input  logic signed [PP_W-1:0]   x3,
  input  logic        [COEF_W-1:0] mag,
  output logic signed [PP_W-1:0]   sel [GROUPS]
);

  always_comb begin
    for (int g = 0; g < GROUPS; g++) begin
      case (mag[2*g +: 2])
        2'b00:   sel[g] = '0;
        2'b01:   sel[g] = x1;
        2'b10:   sel[g] = x2;
        default: sel[g] = x3;
      endcase
    end
  end

endmodule

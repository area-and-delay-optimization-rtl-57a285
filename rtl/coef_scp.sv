// coef_scp: second coding pass of the coefficient generator.
//
// Merges the three coefficient sets left by the first coding pass (13, 19
// and 25 unique words for the 25-, 37- and 49-tap filters) into one 25-word
// set, chosen by INTP_SEL. Word i of the output is a 3:1 multiplexer of word i
// of each set; positions beyond a shorter set are zero, so words 19..24 are
// 2:1 multiplexers with zero and words 0..12 see all three sets. Bits common to
// the sets fall out in synthesis of these constant multiplexers.
//
// Interface: intp_sel (rrc_pkg::intp_sel_e code; 3 behaves as INTP_8), the
// three sets in; half[0..24] out (tap 0 first; for L = 4 the centre tap is
// half[12], for L = 6 half[18], for L = 8 half[24]). Combinational.
module coef_scp
  import rrc_pkg::*;
(
  input  logic [1:0] intp_sel,
  input  coef_t      h25 [13],
  input  coef_t      h37 [19],
  input  coef_t      h49 [25],
  output coef_t      half [HALF_MAX]
);

  always_comb begin
    for (int i = 0; i < int'(HALF_MAX); i++) begin
      case (intp_sel)
        INTP_4:  half[i] = (i < 13) ? h25[i] : '0;
        INTP_6:  half[i] = (i < 19) ? h37[i] : '0;
        default: half[i] = h49[i];
      endcase
    end
  end

endmodule

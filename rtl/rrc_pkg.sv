// rrc_pkg: types, sizes and coefficient tables shared by the reconfigurable
// root-raised-cosine (RRC) interpolation filter.
//
// The filter serves three interpolation factors, L = 4, 6 and 8, with 25-, 37-
// and 49-tap filters, each available at two roll-off factors; 6*L+1 taps means
// every polyphase branch has seven taps. The tap counts, the seven-tap branch,
// the two roll-off sets and the 16-bit coefficient word length follow the
// design description. The roll-off values (0.22 for set A, 0.35 for set B),
// the six-symbol span implied by N = 6*L+1, the sign-magnitude coding and the
// scaling are this design's own choices.
//
// Coefficient formula. For tap m of an N-tap filter (centre c = (N-1)/2) the
// value is h[m] = rrc((m-c)/L, beta) / rrc(0, beta), with
//   rrc(0)    = 1 - beta + 4*beta/pi
//   rrc(t)    = [sin(pi*t*(1-beta)) + 4*beta*t*cos(pi*t*(1+beta))]
//               / [pi*t*(1 - (4*beta*t)^2)]
// and quantised to sign + 16-bit magnitude, mag = floor(|h|*2^15 + 0.5), so the
// magnitude weights are 2^0 .. 2^-15 (one integer bit, fifteen fraction bits)
// and the centre tap is exactly 1.0 = 16'h8000. Because the filters are linear
// phase (h[m] = h[N-1-m]) only taps 0..c are stored: 13, 19 and 25 words.
package rrc_pkg;

  // Word lengths and polyphase structure.
  localparam int unsigned DATA_W   = 16;  // input sample, two's complement
  localparam int unsigned COEF_W   = 16;  // coefficient magnitude
  localparam int unsigned BRANCH   = 7;   // taps per polyphase branch
  localparam int unsigned HALF_MAX = 25;  // unique taps of the longest filter
  localparam int unsigned FRAC_W   = COEF_W - 1;  // coefficient fraction bits
  // Product fraction bits dropped by the truncating constant multiplier:
  // all of them, which gives the 2N+1-bit preshifted terms (N = 1..8).
  localparam int unsigned FRAC_DROP = FRAC_W;

  // Sign-magnitude coefficient word.
  typedef struct packed {
    logic              sign;  // 1: negative
    logic [COEF_W-1:0] mag;   // weights 2^0 .. 2^-15
  } coef_t;

  // INTP_SEL: interpolation factor / filter length.
  typedef enum logic [1:0] {
    INTP_4 = 2'd0,   // L = 4, 25 taps
    INTP_6 = 2'd1,   // L = 6, 37 taps
    INTP_8 = 2'd2    // L = 8, 49 taps (code 3 also selects this)
  } intp_sel_e;

  // FLT_SEL: roll-off factor.
  typedef enum logic {
    FLT_A = 1'b0,    // roll-off 0.22
    FLT_B = 1'b1     // roll-off 0.35
  } flt_sel_e;

  // Interpolation factor for an INTP_SEL code.
  function automatic logic [3:0] interp_factor(input logic [1:0] sel);
    case (sel)
      2'd0:    return 4'd4;
      2'd1:    return 4'd6;
      default: return 4'd8;
    endcase
  endfunction

  // Filter length N = 6*L + 1 for an INTP_SEL code.
  function automatic logic [5:0] num_taps(input logic [1:0] sel);
    case (sel)
      2'd0:    return 6'd25;
      2'd1:    return 6'd37;
      default: return 6'd49;
    endcase
  endfunction

  // Unique (half) coefficient tables, tap 0 first, centre tap last.
  localparam coef_t H25_A [13] = '{
    '{1'b1, 16'h049C}, '{1'b0, 16'h01CC}, '{1'b0, 16'h0953}, '{1'b0, 16'h0C21},
    '{1'b0, 16'h05FA}, '{1'b1, 16'h07E1}, '{1'b1, 16'h15A5}, '{1'b1, 16'h1820},
    '{1'b1, 16'h06EC}, '{1'b0, 16'h1DC7}, '{1'b0, 16'h4B7A}, '{1'b0, 16'h7155},
    '{1'b0, 16'h8000}
  };

  localparam coef_t H37_A [19] = '{
    '{1'b1, 16'h049C}, '{1'b1, 16'h00B7}, '{1'b0, 16'h0475}, '{1'b0, 16'h0953},
    '{1'b0, 16'h0C10}, '{1'b0, 16'h0B27}, '{1'b0, 16'h05FA}, '{1'b1, 16'h02C5},
    '{1'b1, 16'h0D03}, '{1'b1, 16'h15A5}, '{1'b1, 16'h1934}, '{1'b1, 16'h14C9},
    '{1'b1, 16'h06EC}, '{1'b0, 16'h0FD5}, '{1'b0, 16'h2CC7}, '{1'b0, 16'h4B7A},
    '{1'b0, 16'h66A9}, '{1'b0, 16'h7958}, '{1'b0, 16'h8000}
  };

  localparam coef_t H49_A [25] = '{
    '{1'b1, 16'h049C}, '{1'b1, 16'h01DB}, '{1'b0, 16'h01CC}, '{1'b0, 16'h05C6},
    '{1'b0, 16'h0953}, '{1'b0, 16'h0BAC}, '{1'b0, 16'h0C21}, '{1'b0, 16'h0A41},
    '{1'b0, 16'h05FA}, '{1'b1, 16'h0057}, '{1'b1, 16'h07E1}, '{1'b1, 16'h0F75},
    '{1'b1, 16'h15A5}, '{1'b1, 16'h18F7}, '{1'b1, 16'h1820}, '{1'b1, 16'h1238},
    '{1'b1, 16'h06EC}, '{1'b0, 16'h096C}, '{1'b0, 16'h1DC7}, '{1'b0, 16'h347D},
    '{1'b0, 16'h4B7A}, '{1'b0, 16'h607B}, '{1'b0, 16'h7155}, '{1'b0, 16'h7C3B},
    '{1'b0, 16'h8000}
  };

  localparam coef_t H25_B [13] = '{
    '{1'b1, 16'h02F9}, '{1'b1, 16'h01BA}, '{1'b0, 16'h02FE}, '{1'b0, 16'h07A2},
    '{1'b0, 16'h06AC}, '{1'b1, 16'h0294}, '{1'b1, 16'h0FCA}, '{1'b1, 16'h160A},
    '{1'b1, 16'h09E5}, '{1'b0, 16'h182B}, '{1'b0, 16'h4701}, '{1'b0, 16'h6FD2},
    '{1'b0, 16'h8000}
  };

  localparam coef_t H37_B [19] = '{
    '{1'b1, 16'h02F9}, '{1'b1, 16'h0296}, '{1'b1, 16'h0071}, '{1'b0, 16'h02FE},
    '{1'b0, 16'h0671}, '{1'b0, 16'h082E}, '{1'b0, 16'h06AC}, '{1'b0, 16'h0153},
    '{1'b1, 16'h06FC}, '{1'b1, 16'h0FCA}, '{1'b1, 16'h1585}, '{1'b1, 16'h1471},
    '{1'b1, 16'h09E5}, '{1'b0, 16'h0AAE}, '{1'b0, 16'h272A}, '{1'b0, 16'h4701},
    '{1'b0, 16'h642B}, '{1'b0, 16'h78A3}, '{1'b0, 16'h8000}
  };

  localparam coef_t H49_B [25] = '{
    '{1'b1, 16'h02F9}, '{1'b1, 16'h02D9}, '{1'b1, 16'h01BA}, '{1'b0, 16'h0055},
    '{1'b0, 16'h02FE}, '{1'b0, 16'h05AC}, '{1'b0, 16'h07A2}, '{1'b0, 16'h0827},
    '{1'b0, 16'h06AC}, '{1'b0, 16'h0301}, '{1'b1, 16'h0294}, '{1'b1, 16'h0944},
    '{1'b1, 16'h0FCA}, '{1'b1, 16'h1497}, '{1'b1, 16'h160A}, '{1'b1, 16'h12C2},
    '{1'b1, 16'h09E5}, '{1'b0, 16'h04AA}, '{1'b0, 16'h182B}, '{1'b0, 16'h2F08},
    '{1'b0, 16'h4701}, '{1'b0, 16'h5D79}, '{1'b0, 16'h6FD2}, '{1'b0, 16'h7BD3},
    '{1'b0, 16'h8000}
  };

endpackage

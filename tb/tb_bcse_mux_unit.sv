// tb_bcse_mux_unit: checks that each 2-bit coefficient group selects
// 0, x, 2x or 3x, for random terms and random magnitudes.
module tb_bcse_mux_unit;
  logic signed [17:0] x1, x2, x3;
  logic        [15:0] mag;
  logic signed [17:0] sel [8];
  int checks = 0, failures = 0;

  bcse_mux_unit #(.COEF_W(16), .PP_W(18)) dut (.x1(x1), .x2(x2), .x3(x3), .mag(mag), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      x1  = 18'($urandom);
      x2  = 18'($urandom);
      x3  = 18'($urandom);
      mag = (i == 0) ? 16'hFFFF : (i == 1) ? 16'h0000 : 16'($urandom);
      #1;
      for (int g = 0; g < 8; g++) begin
        logic signed [17:0] exp_v;
        int bits;
        bits  = (int'(mag) >> (2*g)) & 3;
        exp_v = (bits == 0) ? 18'sd0 : (bits == 1) ? x1 : (bits == 2) ? x2 : x3;
        checks++;
        if (sel[g] !== exp_v) begin
          failures++;
          $display("FAIL mag=%h g=%0d got=%0d exp=%0d", mag, g, sel[g], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

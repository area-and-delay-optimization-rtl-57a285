// tb_coef_generator: checks the seven branch products for every filter,
// every phase and random delay-line contents against tap * h[j*L+k], with h
// recomputed from the root-raised-cosine formula: exactly for the exact
// variant (FRAC_DROP = 0) and with the truncation rule of
// rrc_ref_pkg::trunc_prod for the default one.
module tb_coef_generator;
  import rrc_ref_pkg::*;
  logic [1:0]         intp_sel;
  logic               flt_sel;
  logic [2:0]         phase;
  logic signed [15:0] taps     [7];
  logic signed [31:0] products [7];
  logic signed [16:0] products_t [7];
  int checks = 0, failures = 0;

  coef_generator #(.BRANCH(7), .DATA_W(16), .FRAC_DROP(0)) dut (
    .intp_sel(intp_sel), .flt_sel(flt_sel), .phase(phase), .taps(taps), .products(products)
  );
  coef_generator dut_t (
    .intp_sel(intp_sel), .flt_sel(flt_sel), .phase(phase), .taps(taps), .products(products_t)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 10; r++)
      for (int f = 0; f < 2; f++)
        for (int s = 0; s < 3; s++)
          for (int k = 0; k < l_of(s); k++) begin
            intp_sel = 2'(s);
            flt_sel  = 1'(f);
            phase    = 3'(k);
            for (int j = 0; j < 7; j++) taps[j] = (r == 0) ? 16'sh8000 : 16'($urandom);
            #1;
            for (int j = 0; j < 7; j++) begin
              int m;
              longint e, c;
              m = j*l_of(s) + k;
              c = (m < 6*l_of(s)+1) ? rrc_quant(f, s, m) : 0;
              e = longint'(taps[j]) * c;
              checks++;
              if (longint'(products[j]) != e) begin
                failures++;
                $display("FAIL f=%0d s=%0d k=%0d j=%0d got=%0d exp=%0d", f, s, k, j, products[j], e);
              end
              checks++;
              if (longint'(products_t[j]) != trunc_prod(longint'(taps[j]), c, 15)) begin
                failures++;
                $display("FAIL truncated f=%0d s=%0d k=%0d j=%0d got=%0d", f, s, k, j, products_t[j]);
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

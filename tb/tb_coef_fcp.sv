// tb_coef_fcp: checks the first coding pass. Every coefficient of both
// roll-off sets and all three lengths is recomputed from the root-raised-
// cosine formula in double precision and must equal the selected output;
// the centre taps must be exactly 1.0.
module tb_coef_fcp;
  import rrc_pkg::coef_t;
  import rrc_ref_pkg::*;
  logic  flt_sel;
  coef_t h25 [13];
  coef_t h37 [19];
  coef_t h49 [25];
  int checks = 0, failures = 0;

  coef_fcp dut (.flt_sel(flt_sel), .h25(h25), .h37(h37), .h49(h49));

  task automatic cmp(input int f, input int intp, input int m, input coef_t w);
    longint got, e;
    got = w.sign ? -longint'(w.mag) : longint'(w.mag);
    e   = rrc_quant(f, intp, m);
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL flt=%0d intp=%0d tap=%0d got=%0d exp=%0d", f, intp, m, got, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      flt_sel = 1'(f);
      #1;
      for (int m = 0; m < 13; m++) cmp(f, 0, m, h25[m]);
      for (int m = 0; m < 19; m++) cmp(f, 1, m, h37[m]);
      for (int m = 0; m < 25; m++) cmp(f, 2, m, h49[m]);
      checks++;
      if (h25[12] != coef_t'({1'b0, 16'h8000}) || h37[18] != coef_t'({1'b0, 16'h8000}) ||
          h49[24] != coef_t'({1'b0, 16'h8000})) begin
        failures++;
        $display("FAIL centre taps not 1.0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

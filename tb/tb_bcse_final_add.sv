// tb_bcse_final_add: checks the preshifted adder tree and the sign
// complement, exact (FRAC_DROP = 0) against a 64-bit sum of term[g] * 4^g,
// and truncating (default, FRAC_DROP = 15) against the same terms each
// floored to a multiple of 2^15, plus the compensation constant 4 for a
// non-zero coefficient.
module tb_bcse_final_add;
  logic signed [17:0] sel [8];
  logic               neg, nz;
  logic signed [31:0] p_exact;
  logic signed [16:0] p_trunc;
  int checks = 0, failures = 0;

  bcse_final_add #(.PP_W(18), .GROUPS(8), .PROD_W(32), .FRAC_DROP(0)) dut_exact (
    .sel(sel), .neg(neg), .nz(nz), .p(p_exact)
  );
  bcse_final_add dut_trunc (.sel(sel), .neg(neg), .nz(nz), .p(p_trunc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint s, t;
      s   = 0;
      t   = 0;
      neg = 1'($urandom);
      nz  = ($urandom_range(0, 7) != 0);
      for (int g = 0; g < 8; g++) begin
        // Terms a real multiplier can produce: 0, x, 2x or 3x of a 16-bit x.
        longint xv, term;
        xv     = longint'($signed(16'($urandom)));
        sel[g] = 18'(xv * longint'($urandom_range(0, 3)));
        term   = longint'(sel[g]) * (longint'(1) << (2*g));
        s      = s + term;
        t      = t + (term >>> 15);
      end
      if (nz) t = t + 4;
      if (neg) begin
        s = -s;
        t = -t;
      end
      #1;
      checks++;
      if (longint'(p_exact) != s) begin
        failures++;
        $display("FAIL exact got=%0d exp=%0d", p_exact, s);
      end
      checks++;
      if (longint'(p_trunc) != t) begin
        failures++;
        $display("FAIL truncated got=%0d exp=%0d", p_trunc, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

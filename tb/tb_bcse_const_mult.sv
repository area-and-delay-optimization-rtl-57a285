// tb_bcse_const_mult: checks the 2-bit BCSE multiplier on the worst-case
// all-ones coefficient, extreme inputs, every single 2-bit group pattern and
// random operands of both signs. The exact variant (FRAC_DROP = 0) must equal
// integer multiplication; the default truncating variant must match the
// truncation rule of rrc_ref_pkg::trunc_prod and lie within 4 LSB of the
// exact product / 2^15.
module tb_bcse_const_mult;
  import rrc_pkg::coef_t;
  import rrc_ref_pkg::trunc_prod;
  logic signed [15:0] x;
  coef_t              coef;
  logic signed [31:0] p_exact;
  logic signed [16:0] p_trunc;
  int checks = 0, failures = 0;
  longint max_err = 0;

  bcse_const_mult #(.DATA_W(16), .FRAC_DROP(0)) dut_exact (.x(x), .coef(coef), .p(p_exact));
  bcse_const_mult dut_trunc (.x(x), .coef(coef), .p(p_trunc));

  task automatic apply(input logic signed [15:0] xv, input logic s, input logic [15:0] m);
    longint e, c, t, err;
    x = xv;
    coef.sign = s;
    coef.mag  = m;
    #1;
    c = s ? -longint'(m) : longint'(m);
    e = longint'(xv) * c;
    t = trunc_prod(longint'(xv), c, 15);
    err = longint'(p_trunc) * 32768 - e;
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (longint'(p_exact) != e) begin
      failures++;
      $display("FAIL exact x=%0d sign=%0d mag=%h got=%0d exp=%0d", xv, s, m, p_exact, e);
    end
    checks++;
    if (longint'(p_trunc) != t || err > 4 * 32768) begin
      failures++;
      $display("FAIL truncated x=%0d sign=%0d mag=%h got=%0d exp=%0d", xv, s, m, p_trunc, t);
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
    apply(16'sh7FFF, 1'b0, 16'hFFFF);
    apply(16'sh8000, 1'b0, 16'hFFFF);
    apply(16'sh8000, 1'b1, 16'hFFFF);
    apply(16'sh7FFF, 1'b1, 16'h8000);
    apply(16'sd1234, 1'b1, 16'h0000);
    for (int g = 0; g < 8; g++)
      for (int b = 1; b < 4; b++)
        apply(16'($urandom), 1'($urandom), 16'(b << (2*g)));
    for (int i = 0; i < 3000; i++)
      apply(16'($urandom), 1'($urandom), 16'($urandom));
    $display("largest truncation error: %0d/32768 LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

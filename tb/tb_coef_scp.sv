// tb_coef_scp: checks the second coding pass with random input sets:
// each INTP_SEL code must pass its set through and zero the rest.
module tb_coef_scp;
  import rrc_pkg::coef_t;
  logic [1:0] intp_sel;
  coef_t h25 [13];
  coef_t h37 [19];
  coef_t h49 [25];
  coef_t half [25];
  int checks = 0, failures = 0;

  coef_scp dut (.intp_sel(intp_sel), .h25(h25), .h37(h37), .h49(h49), .half(half));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < 13; i++) h25[i] = 17'($urandom);
      for (int i = 0; i < 19; i++) h37[i] = 17'($urandom);
      for (int i = 0; i < 25; i++) h49[i] = 17'($urandom);
      for (int s = 0; s < 4; s++) begin
        intp_sel = 2'(s);
        #1;
        for (int i = 0; i < 25; i++) begin
          coef_t e;
          if (s == 0)      e = (i < 13) ? h25[i] : '0;
          else if (s == 1) e = (i < 19) ? h37[i] : '0;
          else             e = h49[i];
          checks++;
          if (half[i] !== e) begin
            failures++;
            $display("FAIL sel=%0d i=%0d got=%h exp=%h", s, i, half[i], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

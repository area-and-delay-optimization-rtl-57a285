// tb_coef_selector: checks the polyphase coefficient steering. From a random
// half table the testbench builds the full symmetric filter of each length
// and expects branch tap j of phase k to carry tap j*L+k (zero past the end).
module tb_coef_selector;
  import rrc_pkg::coef_t;
  logic [1:0] intp_sel;
  logic [2:0] phase;
  coef_t half  [25];
  coef_t coefs [7];
  int checks = 0, failures = 0;

  coef_selector #(.BRANCH(7)) dut (.intp_sel(intp_sel), .phase(phase), .half(half), .coefs(coefs));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 25; i++) half[i] = 17'($urandom);
      for (int s = 0; s < 4; s++) begin
        int l, n;
        coef_t full [56];
        l = (s == 0) ? 4 : (s == 1) ? 6 : 8;
        n = 6*l + 1;
        for (int m = 0; m < 56; m++) full[m] = '0;
        for (int m = 0; m <= (n-1)/2; m++) begin
          full[m]     = half[m];
          full[n-1-m] = half[m];
        end
        intp_sel = 2'(s);
        for (int k = 0; k < l; k++) begin
          phase = 3'(k);
          #1;
          for (int j = 0; j < 7; j++) begin
            checks++;
            if (coefs[j] !== full[j*l + k]) begin
              failures++;
              $display("FAIL L=%0d k=%0d j=%0d got=%h exp=%h", l, k, j, coefs[j], full[j*l+k]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

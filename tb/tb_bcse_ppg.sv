// tb_bcse_ppg: checks the partial product generator's x, 2x and 3x terms
// against integer arithmetic for edge values and random inputs.
module tb_bcse_ppg;
  logic signed [15:0] x;
  logic signed [17:0] x1, x2, x3;
  int checks = 0, failures = 0;

  bcse_ppg #(.DATA_W(16)) dut (.x(x), .x1(x1), .x2(x2), .x3(x3));

  task automatic apply(input logic signed [15:0] v);
    x = v;
    #1;
    checks++;
    if (longint'(x1) != longint'(v) || longint'(x2) != 2*longint'(v) ||
        longint'(x3) != 3*longint'(v)) begin
      failures++;
      $display("FAIL x=%0d x1=%0d x2=%0d x3=%0d", v, x1, x2, x3);
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
    apply(16'sd0); apply(16'sd1); apply(-16'sd1);
    apply(16'sh7FFF); apply(16'sh8000);
    for (int i = 0; i < 2000; i++) apply(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

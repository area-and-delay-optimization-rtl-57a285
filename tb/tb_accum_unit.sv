// tb_accum_unit: checks the sum of seven random products, the one-clock
// latency, the valid flag and the phase tag, including idle cycles.
module tb_accum_unit;
  logic               clk = 1'b0;
  logic               rst_n;
  logic signed [31:0] products [7];
  logic               in_valid;
  logic [2:0]         in_phase;
  logic signed [34:0] y;
  logic               y_valid;
  logic [2:0]         y_phase;
  int checks = 0, failures = 0;
  longint exp_sum;
  logic   exp_valid;
  logic [2:0] exp_phase;

  accum_unit #(.BRANCH(7), .PROD_W(32), .OUT_W(35)) dut (
    .clk(clk), .rst_n(rst_n), .products(products), .in_valid(in_valid), .in_phase(in_phase),
    .y(y), .y_valid(y_valid), .y_phase(y_phase)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_phase = '0;
    for (int j = 0; j < 7; j++) products[j] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (y_valid !== 1'b0) begin failures++; $display("FAIL valid after reset"); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_phase = 3'($urandom);
      exp_sum  = 0;
      for (int j = 0; j < 7; j++) begin
        products[j] = (i < 4) ? ((i[0]) ? 32'sh80000000 : 32'sh7FFFFFFF) : 32'($urandom);
        exp_sum     = exp_sum + longint'(products[j]);
      end
      exp_valid = in_valid;
      exp_phase = in_phase;
      @(posedge clk);
      #1;
      checks++;
      if (y_valid !== exp_valid || (exp_valid && (longint'(y) != exp_sum || y_phase !== exp_phase))) begin
        failures++;
        $display("FAIL valid=%0d y=%0d exp=%0d phase=%0d/%0d", y_valid, y, exp_sum, y_phase, exp_phase);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

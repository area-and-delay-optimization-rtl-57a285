// tb_rrc_interp_filter: end-to-end test of the interpolation filter at its
// default configuration.
//
// Stimulus, in order: for each of the six filters (three interpolation
// factors x two roll-offs) an impulse (whose response must reproduce the
// filter's taps) followed by random samples with random gaps; then a long
// random stretch with frequent mode changes. The reference keeps its own
// seven-sample history and, for every accepted sample, predicts the L output
// samples y[k] = sum_j P(x[n-j], h[j*L+k]), with h recomputed from the
// root-raised-cosine formula and P the truncating 2-bit BCS product
// (rrc_ref_pkg::trunc_prod), together with the clock at which each must
// appear (branch k at the (k+1)-th rising edge after the sample is taken). Every
// output must also lie within 7 x 4 LSB of the exact sum / 2^15. Each output
// is compared in value, branch index and timing. The test also counts input
// stalls, mode changes, uses of each filter, gap-free stretches in which a
// sample was taken exactly every L clocks, and negative outputs, and fails if
// any of them never happened.
module tb_rrc_interp_filter;
  import rrc_ref_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [1:0]         intp_sel;
  logic               flt_sel;
  logic signed [15:0] rrcin;
  logic               rrcin_valid;
  logic               rrcin_ready;
  logic signed [19:0] rrcout;
  logic               rrcout_valid;
  logic [2:0]         rrcout_phase;

  int checks = 0, failures = 0;

  rrc_interp_filter dut (
    .clk(clk), .rst_n(rst_n), .intp_sel(intp_sel), .flt_sel(flt_sel), .rrcin(rrcin),
    .rrcin_valid(rrcin_valid), .rrcin_ready(rrcin_ready), .rrcout(rrcout),
    .rrcout_valid(rrcout_valid), .rrcout_phase(rrcout_phase)
  );

  always #5 clk = ~clk;

  // Reference coefficients: h[f][s][m].
  longint h [2][3][56];

  typedef struct {
    longint value;
    longint exact;
    int     phase;
    int     cycle;
  } expect_t;
  expect_t exp_q [$];

  longint hist [7];
  int cycle = 0;
  int stalls = 0, switches = 0, negatives = 0, impulses = 0, rate_checks = 0;
  int cfg_uses [2][3];
  int last_take = -1000;
  int prev_f = 0, prev_s = 0;
  int outputs = 0;
  longint max_err = 0;

  // Stimulus plan for the current cycle.
  bit         gapless;
  logic [15:0] next_x;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // Output checker.
  always @(posedge clk) begin
    #1;
    if (rst_n && rrcout_valid) begin
      expect_t e;
      outputs++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d at cycle %0d", rrcout, cycle);
      end else begin
        e = exp_q.pop_front();
        if (longint'(rrcout) != e.value || int'(rrcout_phase) != e.phase || cycle != e.cycle) begin
          failures++;
          $display("FAIL cycle=%0d y=%0d exp=%0d phase=%0d/%0d due=%0d", cycle, rrcout, e.value,
                   rrcout_phase, e.phase, e.cycle);
        end
        if (e.value < 0) negatives++;
        begin
          longint err;
          err = longint'(rrcout) * 32768 - e.exact;
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > 28 * 32768) begin
            failures++;
            $display("FAIL cycle=%0d y=%0d too far from exact %0d/32768", cycle, rrcout, e.exact);
          end
        end
      end
    end
  end

  // Offer one sample and wait until it is taken; counts the stall cycles
  // of an idle gap before it.
  task automatic send(input logic signed [15:0] x, input int f, input int s, input int gap);
    repeat (gap) begin
      @(negedge clk);
      rrcin_valid = 1'b0;
      #1;
      if (rrcin_ready) stalls++;
    end
    @(negedge clk);
    rrcin_valid = 1'b1;
    rrcin       = x;
    intp_sel    = 2'(s);
    flt_sel     = 1'(f);
    #1;
    while (!rrcin_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    // Taken at this edge; cycle still holds the count before it.
    if (gap == 0 && cycle - last_take == l_of(prev_s) && exp_q.size() > 0) rate_checks++;
    else if (gap == 0 && last_take >= 0 && cycle - last_take != l_of(prev_s)) begin
      checks++;
      failures++;
      $display("FAIL gap-free sample interval %0d, L=%0d", cycle - last_take, l_of(prev_s));
    end
    for (int j = 6; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = longint'(x);
    if (f != prev_f || s != prev_s) switches++;
    cfg_uses[f][s]++;
    for (int k = 0; k < l_of(s); k++) begin
      expect_t e;
      e.value = 0;
      e.exact = 0;
      for (int j = 0; j < 7; j++) begin
        e.value += trunc_prod(hist[j], h[f][s][j*l_of(s) + k], 15);
        e.exact += hist[j] * h[f][s][j*l_of(s) + k];
      end
      e.phase = k;
      e.cycle = cycle + 2 + k;
      exp_q.push_back(e);
    end
    last_take = cycle;
    prev_f = f;
    prev_s = s;
    #1;
    rrcin_valid = 1'b0;
  endtask

  initial begin
    for (int f = 0; f < 2; f++)
      for (int s = 0; s < 3; s++)
        for (int m = 0; m < 56; m++)
          h[f][s][m] = (m < 6*l_of(s) + 1) ? rrc_quant(f, s, m) : 0;
    for (int j = 0; j < 7; j++) hist[j] = 0;
    rst_n = 1'b0; rrcin_valid = 1'b0; rrcin = '0; intp_sel = 2'd0; flt_sel = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Impulse response and random data, one filter at a time.
    for (int f = 0; f < 2; f++)
      for (int s = 0; s < 3; s++) begin
        for (int i = 0; i < 7; i++) send(16'sd0, f, s, 0);
        send(16'sd1, f, s, 0);
        impulses++;
        for (int i = 0; i < 7; i++) send(16'sd0, f, s, 0);
        for (int i = 0; i < 300; i++)
          send(16'($urandom), f, s, ($urandom_range(0, 5) == 0) ? $urandom_range(1, 4) : 0);
      end

    // Frequent mode changes, full-scale data included.
    begin
      int f, s;
      f = 0; s = 0;
      for (int i = 0; i < 2000; i++) begin
        logic signed [15:0] x;
        if ($urandom_range(0, 15) == 0) begin
          f = $urandom_range(0, 1);
          s = $urandom_range(0, 2);
        end
        x = ($urandom_range(0, 9) == 0) ? (($urandom_range(0, 1) != 0) ? 16'sh7FFF : 16'sh8000)
                                        : 16'($urandom);
        send(x, f, s, ($urandom_range(0, 7) == 0) ? $urandom_range(1, 3) : 0);
      end
    end

    repeat (20) @(posedge clk);
    #2;
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    $display("largest error against the exact sum: %0d/32768 LSB", max_err);
    $display("outputs=%0d stalls=%0d mode_switches=%0d impulses=%0d rate_checks=%0d negatives=%0d",
             outputs, stalls, switches, impulses, rate_checks, negatives);
    for (int f = 0; f < 2; f++)
      for (int s = 0; s < 3; s++) begin
        $display("filter L=%0d roll-off set %0d: %0d samples", l_of(s), f, cfg_uses[f][s]);
        checks++;
        if (cfg_uses[f][s] == 0) failures++;
      end
    checks++;
    if (stalls == 0 || switches == 0 || impulses == 0 || rate_checks == 0 || negatives == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

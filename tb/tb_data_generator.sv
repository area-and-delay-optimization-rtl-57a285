// tb_data_generator: drives the data generator with randomly gapped input
// and random mode changes and checks, cycle by cycle, the ready signal, the
// seven-sample delay line, the branch index sequence 0..L-1 and the captured
// configuration against a reference. It also checks that with input always
// available a sample is taken exactly every L clocks.
module tb_data_generator;
  import rrc_ref_pkg::l_of;
  logic               clk = 1'b0;
  logic               rst_n;
  logic [1:0]         intp_sel;
  logic               flt_sel;
  logic signed [15:0] rrcin;
  logic               rrcin_valid;
  logic               rrcin_ready;
  logic signed [15:0] taps [7];
  logic [2:0]         phase;
  logic [1:0]         cfg_intp;
  logic               cfg_flt;
  logic               active;
  int checks = 0, failures = 0;
  int stalls = 0, switches = 0;

  // Reference state.
  logic signed [15:0] hist [7];
  int  m_phase, m_l, m_intp, m_flt;
  bit  m_active;
  int  last_take, gap_checks;

  data_generator #(.BRANCH(7), .DATA_W(16)) dut (
    .clk(clk), .rst_n(rst_n), .intp_sel(intp_sel), .flt_sel(flt_sel), .rrcin(rrcin),
    .rrcin_valid(rrcin_valid), .rrcin_ready(rrcin_ready), .taps(taps), .phase(phase),
    .cfg_intp(cfg_intp), .cfg_flt(cfg_flt), .active(active)
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_ready;
    rst_n = 1'b0; rrcin_valid = 1'b0; rrcin = '0; intp_sel = 2'd0; flt_sel = 1'b0;
    for (int j = 0; j < 7; j++) hist[j] = '0;
    m_phase = 0; m_l = 4; m_intp = 0; m_flt = 0; m_active = 0;
    last_take = -1; gap_checks = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // Long gap-free stretches (to see the L-clock rate) alternate with
      // randomly gapped ones.
      rrcin_valid = ((cyc / 500) % 2 == 0) ? 1'b1 : ($urandom_range(0, 2) == 0);
      rrcin       = 16'($urandom);
      if ($urandom_range(0, 30) == 0) begin
        intp_sel = 2'($urandom);
        flt_sel  = 1'($urandom);
      end
      #1;
      exp_ready = !m_active || (m_phase == m_l - 1);
      checks++;
      if (rrcin_ready !== exp_ready || active !== m_active ||
          (m_active && (int'(phase) != m_phase || int'(cfg_intp) != m_intp || int'(cfg_flt) != m_flt))) begin
        failures++;
        $display("FAIL cyc=%0d ready=%0d/%0d active=%0d/%0d phase=%0d/%0d", cyc, rrcin_ready,
                 exp_ready, active, m_active, phase, m_phase);
      end
      for (int j = 0; j < 7; j++) begin
        checks++;
        if (taps[j] !== hist[j]) begin
          failures++;
          $display("FAIL cyc=%0d tap %0d=%0d exp %0d", cyc, j, taps[j], hist[j]);
        end
      end
      if (exp_ready && !rrcin_valid && m_active) stalls++;
      @(posedge clk);
      if (exp_ready && rrcin_valid) begin
        if ((cyc / 500) % 2 == 0 && last_take >= 0 && last_take / 500 == cyc / 500 && m_active) begin
          checks++;
          gap_checks++;
          if (cyc - last_take != m_l) begin
            failures++;
            $display("FAIL sample interval %0d, L=%0d", cyc - last_take, m_l);
          end
        end
        for (int j = 6; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = rrcin;
        if (int'(intp_sel) != m_intp || int'(flt_sel) != m_flt) switches++;
        m_intp = int'(intp_sel); m_flt = int'(flt_sel); m_l = l_of(m_intp);
        m_phase = 0; m_active = 1; last_take = cyc;
      end else if (m_active) begin
        if (m_phase == m_l - 1) m_active = 0;
        else m_phase++;
      end
    end
    $display("stalls=%0d mode_switches=%0d interval_checks=%0d", stalls, switches, gap_checks);
    if (stalls == 0 || switches == 0 || gap_checks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

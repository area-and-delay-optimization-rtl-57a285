// data_generator: input sampling and branch sequencing of the interpolator.
//
// The filter runs at the output rate and computes one polyphase branch per
// clock, so it needs a new input sample every L clocks, L being set by
// INTP_SEL. This block takes RRCIN on a valid/ready handshake, shifts it into
// a seven-sample delay line (the data of a seven-tap branch filter) and then
// counts the branch index 0..L-1, one per clock. After branch L-1 it asks for
// the next sample; if none is offered it stalls, keeping the delay line and
// computing nothing until one arrives. INTP_SEL and FLT_SEL are captured with
// each accepted sample, so a mode change takes effect on a sample boundary.
//
// Interface: rrcin/rrcin_valid/rrcin_ready (a sample is taken on a rising
// edge where both are high); taps[0..6] (taps[0] newest), phase, cfg_intp,
// cfg_flt and active (a branch is to be computed this cycle) are registers.
// The first branch of a sample is computed in the clock after it is taken.
// Reset (rst_n, asynchronous, active low) clears the delay line. The
// sampling rule follows the design description; the handshake, stall and
// configuration capture are this design's own choices.
module data_generator
  import rrc_pkg::interp_factor, rrc_pkg::INTP_4, rrc_pkg::FLT_A;
#(
  parameter int unsigned BRANCH = rrc_pkg::BRANCH,
  parameter int unsigned DATA_W = rrc_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [1:0]               intp_sel,
  input  logic                     flt_sel,
  input  logic signed [DATA_W-1:0] rrcin,
  input  logic                     rrcin_valid,
  output logic                     rrcin_ready,
  output logic signed [DATA_W-1:0] taps [BRANCH],
  output logic [2:0]               phase,
  output logic [1:0]               cfg_intp,
  output logic                     cfg_flt,
  output logic                     active
);

  logic last_phase;

  always_comb begin
    last_phase  = (4'(phase) == interp_factor(cfg_intp) - 4'd1);
    rrcin_ready = !active || last_phase;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(BRANCH); j++) taps[j] <= '0;
      phase    <= '0;
      cfg_intp <= INTP_4;
      cfg_flt  <= FLT_A;
      active   <= 1'b0;
    end else if (rrcin_ready && rrcin_valid) begin
      taps[0] <= rrcin;
      for (int j = 1; j < int'(BRANCH); j++) taps[j] <= taps[j-1];
      phase    <= '0;
      cfg_intp <= intp_sel;
      cfg_flt  <= flt_sel;
      active   <= 1'b1;
    end else if (active) begin
      if (last_phase) active <= 1'b0;   // stall: no sample offered
      else            phase  <= phase + 3'd1;
    end
  end

  // The branch index never leaves 0..L-1 (active is low during reset).
  a_phase_range: assert property (@(posedge clk)
    active |-> 4'(phase) < interp_factor(cfg_intp));

endmodule

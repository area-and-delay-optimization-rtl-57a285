// rrc_interp_filter: reconfigurable root-raised-cosine interpolation filter
// for a multistandard digital up converter.
//
// One datapath serves six pulse-shaping filters: 25, 37 or 49 taps for
// interpolation by 4, 6 or 8 (INTP_SEL), each at two roll-off factors
// (FLT_SEL). Every filter has N = 6L+1 taps, so it splits into L polyphase
// branch filters of seven taps each, and one set of seven multipliers and six
// adders computes all of them, one branch per output clock:
//   data_generator  takes an input sample every L clocks, 7-sample delay line
//   coef_generator  first/second coding pass select the coefficient set,
//                   coefficient selector picks the branch taps, seven 2-bit
//                   BCSE constant multipliers form the products
//   accum_unit      sums the seven products into the registered output
//
// Interface: clk at the output sample rate; rst_n asynchronous, active low.
// rrcin (signed 16 bits) is taken on a rising edge with rrcin_valid and
// rrcin_ready high; ready is high once every L clocks while samples keep
// coming, and the filter stalls when none is offered. rrcout (signed,
// OUT_W bits) = sum_j rrcin[n-j] * h[j*L+k] * 2^(15-FRAC_DROP), each product
// truncated and compensated as in bcse_final_add; with the default
// FRAC_DROP = 15 it is a 20-bit integer in rrcin units, within 28 LSB of the
// exact sum. It is valid with rrcout_valid, with branch index k on
// rrcout_phase. Branch k of the sample taken at rising edge t is on rrcout
// from edge t+1+k, so branch 0 has one clock of latency. Mode changes take
// effect at the next accepted sample.
module rrc_interp_filter
  import rrc_pkg::DATA_W, rrc_pkg::COEF_W, rrc_pkg::BRANCH;
#(
  parameter int unsigned FRAC_DROP = rrc_pkg::FRAC_DROP,  // product LSBs dropped
  localparam int unsigned PROD_W   = DATA_W + COEF_W - FRAC_DROP,
  localparam int unsigned OUT_W    = PROD_W + 3            // sum of 7 products
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              intp_sel,
  input  logic                    flt_sel,
  input  logic signed [DATA_W-1:0] rrcin,
  input  logic                    rrcin_valid,
  output logic                    rrcin_ready,
  output logic signed [OUT_W-1:0] rrcout,
  output logic                    rrcout_valid,
  output logic [2:0]              rrcout_phase
);

  logic signed [DATA_W-1:0] taps     [BRANCH];
  logic signed [PROD_W-1:0] products [BRANCH];
  logic [2:0]               phase;
  logic [1:0]               cfg_intp;
  logic                     cfg_flt;
  logic                     active;

  data_generator u_dg (
    .clk(clk), .rst_n(rst_n), .intp_sel(intp_sel), .flt_sel(flt_sel),
    .rrcin(rrcin), .rrcin_valid(rrcin_valid), .rrcin_ready(rrcin_ready),
    .taps(taps), .phase(phase), .cfg_intp(cfg_intp), .cfg_flt(cfg_flt),
    .active(active)
  );

  coef_generator #(.BRANCH(BRANCH), .DATA_W(DATA_W), .FRAC_DROP(FRAC_DROP)) u_cg (
    .intp_sel(cfg_intp), .flt_sel(cfg_flt), .phase(phase), .taps(taps),
    .products(products)
  );

  accum_unit #(.BRANCH(BRANCH), .PROD_W(PROD_W), .OUT_W(OUT_W)) u_au (
    .clk(clk), .rst_n(rst_n), .products(products), .in_valid(active),
    .in_phase(phase), .y(rrcout), .y_valid(rrcout_valid), .y_phase(rrcout_phase)
  );

endmodule

// accum_unit: accumulation unit of the interpolator.
//
// Adds the seven products of one polyphase branch with six adders and
// registers the sum as the filter output, together with a valid flag and the
// branch index. The sum is kept at full precision, PROD_W + 3 bits; the
// default PROD_W is that of the truncated 16 x 16-bit product.
//
// Interface: products[0..BRANCH-1], in_valid, in_phase in; y, y_valid,
// y_phase are registered one clock later. Reset (rst_n, asynchronous, active
// low) clears the outputs.
module accum_unit #(
  parameter int unsigned BRANCH = 7,
  parameter int unsigned PROD_W = 17,
  parameter int unsigned OUT_W  = PROD_W + $clog2(BRANCH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [PROD_W-1:0] products [BRANCH],
  input  logic                     in_valid,
  input  logic [2:0]               in_phase,
  output logic signed [OUT_W-1:0]  y,
  output logic                     y_valid,
  output logic [2:0]               y_phase
);

  logic signed [OUT_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int j = 0; j < int'(BRANCH); j++) sum = sum + OUT_W'(products[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
      y_phase <= '0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        y       <= sum;
        y_phase <= in_phase;
      end
    end
  end

endmodule

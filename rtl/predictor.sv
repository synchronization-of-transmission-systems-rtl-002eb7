// predictor: the staircase accumulator of the ANS-DM coder and decoder.
//
// s(t_{i+1}) = s(t_i) + k_i d_i: at every sampling instant (update) the step
// k_i is added when d_i = +1 (up) and subtracted otherwise. The result
// saturates at 0 and 2^DATA_W - 1 so that the 12-bit D/A word never wraps;
// saturation and the mid-scale start value are this design's choice.
//
// Timing: s changes on the clock edge of the update cycle.
module predictor #(
  parameter int unsigned DATA_W = ansdm_pkg::DATA_W,
  parameter int unsigned S_INIT = 1 << (DATA_W - 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clk_en,
  input  logic              update,
  input  logic              up,
  input  logic [DATA_W-1:0] step,
  output logic [DATA_W-1:0] s
);

  localparam int unsigned SMAX = (1 << DATA_W) - 1;

  logic [DATA_W:0] sum;      // one extra bit for the carry / borrow

  always_comb begin
    if (up) begin
      sum = {1'b0, s} + {1'b0, step};
      if (sum > (DATA_W+1)'(SMAX)) sum = (DATA_W+1)'(SMAX);
    end else begin
      sum = {1'b0, s} - {1'b0, step};
      if (step > s) sum = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      s <= DATA_W'(S_INIT);
    else if (clk_en && update)
      s <= sum[DATA_W-1:0];
  end

endmodule

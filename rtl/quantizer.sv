// quantizer: the one-bit comparator of the ANS-DM coder.
//
// At a sampling instant it compares the 12-bit input sample x with the
// predictor output s and decides b_i = 1 when x is the greater
// (d_i = sgn(x - s) = +1) and b_i = 0 otherwise. b_now is the combinational
// decision used by the adaptation logic and the predictor in the same cycle;
// b is the registered output bit, which stays on the line until the next
// sampling instant, so its duration is the current sampling interval. A tie
// (x equal to s) gives 1: this design's choice.
module quantizer #(
  parameter int unsigned DATA_W = ansdm_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sample,
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] s,
  output logic              b_now,
  output logic              b
);

  assign b_now = (x >= s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      b <= 1'b0;
    else if (sample)
      b <= b_now;
  end

endmodule

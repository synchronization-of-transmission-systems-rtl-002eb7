// interval_timer: marks the non-uniform sampling instants t_{i+1} = t_i + tau.
//
// It counts base clock events (tick) since the last sampling instant and
// raises `sample` on the tick that completes `tau` base periods; the adaptation
// logic then supplies the next tau. START_DELAY base ticks after reset are
// ignored before counting starts: the coder uses 0, the decoder 1, because the
// decoder base clock runs half a base period behind the coder's and its first
// tick falls before the coder's first sample. Intervals are counted in whole
// base periods, as on the trainer where all sampling is paced by the 720 ns
// base clock.
//
// Timing: sample is combinational (tick and the count register).
module interval_timer #(
  parameter int unsigned TAU_W       = ansdm_pkg::TAU_W,
  parameter int unsigned START_DELAY = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clk_en,
  input  logic             tick,
  input  logic [TAU_W-1:0] tau,
  output logic             sample
);

  logic [TAU_W-1:0] ic;
  logic [1:0]       start_cnt;
  logic             running;

  assign running = (start_cnt == 2'(START_DELAY));
  assign sample  = tick && running && (ic >= tau - TAU_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ic        <= '0;
      start_cnt <= '0;
    end else if (clk_en && tick) begin
      if (!running)
        start_cnt <= start_cnt + 2'd1;
      else if (sample)
        ic <= '0;
      else
        ic <= ic + TAU_W'(1);
    end
  end

  initial assert (START_DELAY <= 3) else $error("START_DELAY must be 0..3");

endmodule

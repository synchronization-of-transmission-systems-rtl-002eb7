// decimation: reduces the A/D converter stream to one 12-bit sample per base
// clock.
//
// The A/D converter delivers a 14-bit word every main clock. Once per base
// clock (tick) this block keeps the current word and drops its two least
// significant bits, so the comparator sees the resolution of the D/A
// converter used in the decoder. Keeping one word per base period, without
// filtering, is this design's choice: the simplest decimation that gives the
// 12-bit, base-rate stream the trainer uses.
//
// The two dropped bits of adc_data are unused by design.
//
// Timing: x changes on the main clock edge that ends the tick cycle and holds
// for one base period.
module decimation #(
  parameter int unsigned ADC_W  = ansdm_pkg::ADC_W,
  parameter int unsigned DATA_W = ansdm_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic [ADC_W-1:0]  adc_data,
  output logic [DATA_W-1:0] x
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      x <= DATA_W'(1 << (DATA_W - 1));     // mid scale
    else if (tick)
      x <= adc_data[ADC_W-1 -: DATA_W];
  end

endmodule

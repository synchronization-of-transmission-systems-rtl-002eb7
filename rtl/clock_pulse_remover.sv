// clock_pulse_remover: removes single periods of the decoder main clock.
//
// This is the "clock periods removing" stage in front of the decoder's
// divider. A one-cycle `remove` request sets a flag that is high for exactly
// the next main clock period. During that period:
//   * clk_en is low, so every register of the decoder that is enabled by it
//     (divider, predictor, adaptation, D/A interface) sees no clock pulse;
//   * gclk, the main clock passed on to the D/A converter, stays low: its
//     low level is stretched by one period, the pulse is gone.
// The decoder's logic uses the enable rather than the gated clock, which is
// the synchronous equivalent and keeps one clock tree; gclk is for parts
// outside the chip that need the clock itself.
//
// gclk comes from a latch-based clock gate: the enable is captured by a latch
// that is transparent while clk is low, so gclk = clk & latched enable has no
// glitch. The latch is intentional and is the only one in the design.
module clock_pulse_remover (
  input  logic clk,
  input  logic rst_n,
  input  logic remove,
  output logic clk_en,
  output logic gclk
);

  logic drop_q;
  logic en_lat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      drop_q <= 1'b0;
    else
      drop_q <= remove && !drop_q;   // never two removed periods in a row
  end

  assign clk_en = !drop_q;

  always_latch begin
    if (!clk)
      en_lat = clk_en;
  end

  assign gclk = clk & en_lat;

endmodule

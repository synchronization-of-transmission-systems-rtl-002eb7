// ansdm_coder: digital part of the ANS-DM encoder.
//
// A 14-bit A/D sample arrives every main clock (20 ns). The divider makes the
// 720 ns base clock; once per base period the decimation stage keeps one
// sample, cut to 12 bits. The interval timer marks the non-uniform sampling
// instants. At each of them the comparator decides b_i = [x >= s], the
// adaptation logic derives the step k_i and the next interval tau_i from the
// last three bits, the predictor moves s by +-k_i, and b_i is put on the
// serial output, where it stays for tau_i base periods. The serial stream
// therefore carries bits of variable duration, and a decoder that runs the
// same adaptation can recover both the staircase and the bit timing.
//
// The structure (PGA and A/D outside, decimation, comparator and predictor
// paced by the base clock, divider by 36) is the trainer's; the adaptation
// constants are this design's (see ansdm_pkg).
//
// Interface: b is the serial output, registered; sample marks the cycle of a
// sampling instant; s is the predictor value (updated on that cycle's edge);
// tick is the coder base clock event.
module ansdm_coder #(
  parameter int unsigned BASE_DIV = ansdm_pkg::BASE_DIV
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [ansdm_pkg::ADC_W-1:0]    adc_data,
  output logic                           b,
  output logic                           sample,
  output logic [ansdm_pkg::DATA_W-1:0]   s,
  output logic                           tick
);
  import ansdm_pkg::*;

  logic [CNT_W-1:0]  cnt;
  logic [DATA_W-1:0] x;
  logic              b_now;
  logic [DATA_W-1:0] k_next;
  logic [TAU_W-1:0]  tau_next, tau_cur;

  base_clock_divider #(.DIV(BASE_DIV), .RESET_CNT(BASE_DIV - 1)) u_div (
    .clk, .rst_n, .clk_en(1'b1), .skip(1'b0), .cnt, .tick
  );

  decimation u_dec (.clk, .rst_n, .tick, .adc_data, .x);

  interval_timer #(.START_DELAY(0)) u_timer (
    .clk, .rst_n, .clk_en(1'b1), .tick, .tau(tau_cur), .sample
  );

  quantizer u_q (.clk, .rst_n, .sample, .x, .s, .b_now, .b);

  adaptation_logic u_adapt (
    .clk, .rst_n, .clk_en(1'b1), .update(sample), .b_new(b_now),
    .k_next, .tau_next, .tau_cur
  );

  predictor u_pred (
    .clk, .rst_n, .clk_en(1'b1), .update(sample), .up(b_now), .step(k_next), .s
  );

  // tau_next is consumed inside the adaptation logic's own state; the coder
  // needs only the divider's tick, not its count.
  logic unused_ok;
  assign unused_ok = ^{tau_next, cnt};

endmodule

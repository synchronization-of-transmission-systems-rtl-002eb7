// ansdm_decoder: ANS-DM decoder with base clock synchronization.
//
// The decoder has its own main clock crystal, nominally equal to the coder's
// but never exactly so. Its base clock must nevertheless stay in step with
// the coder's, otherwise it samples the variable-duration bits at the wrong
// moments and the reconstruction is lost. Synchronization works on the main
// clock pulses that make up a base period:
//   * the measuring circuit compares each transition of the received stream
//     with the decoder's divider count;
//   * the decision circuit turns a drift into one correction per base period;
//   * if the decoder is fast, one main clock pulse is removed (the whole
//     decoder stands still for one period, its base period becomes m+2 long);
//   * if the decoder is slow, the divider divides by m instead of m+1 once.
// Both corrections act in the first main period of a base period, where they
// disturb neither the predictor nor the D/A converter. `mode` selects one
// method, both (the combined method, for either sign of the frequency
// difference) or none.
//
// Decoding: the decoder base clock is kept half a base period behind the
// coder's, so it samples each bit mid-way through a base period. At the
// sampling instants given by its own copy of the adaptation logic it takes
// the synchronised bit, updates the predictor with the step from the same
// adaptation table as the coder, and so rebuilds the coder's staircase s.
// The D/A interface passes s to the converter once per base period.
//
// Interface: rx is the serial line (asynchronous to clk); sample marks a
// decoded bit; s is the rebuilt predictor value; remove/skip mark the
// corrections (remove in the tick cycle before the removed period, skip in
// the cycle whose count is BASE_DIV-1); dac_clk is the main clock with the
// removed pulses missing.
module ansdm_decoder #(
  parameter int unsigned BASE_DIV = ansdm_pkg::BASE_DIV
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           rx,
  input  ansdm_pkg::sync_mode_e          mode,
  output logic                           sample,
  output logic [ansdm_pkg::DATA_W-1:0]   s,
  output logic [ansdm_pkg::DATA_W-1:0]   dac_data,
  output logic                           dac_cs_n,
  output logic                           dac_clk,
  output logic                           remove,
  output logic                           skip
);
  import ansdm_pkg::*;

  logic                   clk_en;
  logic [CNT_W-1:0]       cnt;
  logic                   tick;
  logic                   rx_sync;
  logic                   meas_valid;
  logic signed [PH_W-1:0] phase_err;
  logic [DATA_W-1:0]      k_next;
  logic [TAU_W-1:0]       tau_next, tau_cur;

  clock_pulse_remover u_rm (.clk, .rst_n, .remove, .clk_en, .gclk(dac_clk));

  base_clock_divider #(.DIV(BASE_DIV), .RESET_CNT(BASE_DIV / 2 - 1)) u_div (
    .clk, .rst_n, .clk_en, .skip, .cnt, .tick
  );

  measuring_circuit #(.DIV(BASE_DIV), .LOCK_CNT(BASE_DIV / 2 - 3)) u_meas (
    .clk, .rst_n, .clk_en, .rx, .cnt, .rx_sync, .meas_valid, .phase_err
  );

  decision_circuit u_dec (
    .clk, .rst_n, .mode, .meas_valid, .phase_err, .tick, .remove, .skip
  );

  interval_timer #(.START_DELAY(1)) u_timer (
    .clk, .rst_n, .clk_en, .tick, .tau(tau_cur), .sample
  );

  adaptation_logic u_adapt (
    .clk, .rst_n, .clk_en, .update(sample), .b_new(rx_sync),
    .k_next, .tau_next, .tau_cur
  );

  predictor u_pred (
    .clk, .rst_n, .clk_en, .update(sample), .up(rx_sync), .step(k_next), .s
  );

  dac_interface #(.DIV(BASE_DIV)) u_dac (
    .clk, .rst_n, .clk_en, .cnt, .tick, .s, .dac_data, .dac_cs_n
  );

  logic unused_ok;
  assign unused_ok = ^tau_next;

endmodule

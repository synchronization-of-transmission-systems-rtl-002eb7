// ansdm_link_top: an ANS-DM transmission link with independent clocks.
//
// The coder, in the enc_clk domain, turns A/D samples into an ANS-DM bit
// stream whose bits last a variable number of base periods. The stream goes
// over a single serial line to the decoder, in the dec_clk domain, which
// keeps its base clock locked to the coder's by removing main clock pulses or
// shortening a base period (sync_mode chooses which), and rebuilds the
// coder's staircase for the D/A converter. Both main clocks are nominally
// 50 MHz; the analog parts (amplifier, A/D, D/A, crystals, output filter) are
// outside: the A/D word comes in on adc_data and the D/A signals go out.
//
// Monitoring outputs: enc_sample/enc_pred (coder domain) and dec_sample/
// dec_pred (decoder domain) give each coded and decoded predictor value, so
// that a correct link shows the same sequence on both; sync_remove and
// sync_skip show the corrections.
module ansdm_link_top #(
  parameter int unsigned BASE_DIV = ansdm_pkg::BASE_DIV
) (
  input  logic                           enc_clk,
  input  logic                           enc_rst_n,
  input  logic [ansdm_pkg::ADC_W-1:0]    adc_data,
  input  logic                           dec_clk,
  input  logic                           dec_rst_n,
  input  ansdm_pkg::sync_mode_e          sync_mode,
  output logic                           serial_line,
  output logic                           enc_sample,
  output logic [ansdm_pkg::DATA_W-1:0]   enc_pred,
  output logic                           enc_tick,
  output logic                           dec_sample,
  output logic [ansdm_pkg::DATA_W-1:0]   dec_pred,
  output logic [ansdm_pkg::DATA_W-1:0]   dac_data,
  output logic                           dac_cs_n,
  output logic                           dac_clk,
  output logic                           sync_remove,
  output logic                           sync_skip
);

  ansdm_coder #(.BASE_DIV(BASE_DIV)) u_coder (
    .clk(enc_clk), .rst_n(enc_rst_n), .adc_data,
    .b(serial_line), .sample(enc_sample), .s(enc_pred), .tick(enc_tick)
  );

  ansdm_decoder #(.BASE_DIV(BASE_DIV)) u_decoder (
    .clk(dec_clk), .rst_n(dec_rst_n), .rx(serial_line), .mode(sync_mode),
    .sample(dec_sample), .s(dec_pred), .dac_data, .dac_cs_n, .dac_clk,
    .remove(sync_remove), .skip(sync_skip)
  );

endmodule

// dac_interface: hands the decoder's predictor word to the 12-bit D/A
// converter once per base period.
//
// At each base clock event (tick, count 0) the current predictor value is
// loaded into dac_data, which is then stable for the whole next base period.
// The active-low chip select dac_cs_n is low while the divider count lies in
// [CS_LAST, CS_FIRST] (delayed by one register stage), well after the load
// and away from count DIV-1, where clock corrections are made. The D/A
// converter is clocked by the main clock with pulses removed, so a removed
// pulse stretches every D/A signal along with it. The write window is this
// design's choice; the trainer only shows that the D/A strobe and the data
// are decoded from the base clock counter.
module dac_interface #(
  parameter int unsigned DATA_W   = ansdm_pkg::DATA_W,
  parameter int unsigned DIV      = ansdm_pkg::BASE_DIV,
  parameter int unsigned CNT_W    = ansdm_pkg::CNT_W,
  parameter int unsigned CS_FIRST = DIV - 5,
  parameter int unsigned CS_LAST  = DIV - 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clk_en,
  input  logic [CNT_W-1:0]  cnt,
  input  logic              tick,
  input  logic [DATA_W-1:0] s,
  output logic [DATA_W-1:0] dac_data,
  output logic              dac_cs_n
);

  logic in_window;
  assign in_window = (cnt <= CNT_W'(CS_FIRST)) && (cnt >= CNT_W'(CS_LAST));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_data <= DATA_W'(1 << (DATA_W - 1));
      dac_cs_n <= 1'b1;
    end else if (clk_en) begin
      if (tick)
        dac_data <= s;
      dac_cs_n <= !in_window;
    end
  end

  initial assert (CS_LAST >= 1 && CS_LAST <= CS_FIRST && CS_FIRST < DIV - 2)
    else $error("chip select window must avoid counts 0, DIV-1 and DIV-2");

endmodule

// measuring_circuit: measures the phase of the decoder base clock against the
// received bit stream.
//
// The serial input comes from the coder's clock domain. It passes a two-stage
// synchroniser into the decoder domain; a third stage detects its transitions.
// Every bit boundary of the ANS-DM stream falls on a coder base clock event,
// so at each transition the decoder's divider count tells how far the two
// base clocks have drifted. The block reports the error
//     phase_err = cnt - LOCK_CNT, wrapped into [-DIV/2, DIV/2),
// in main clock periods: negative means the decoder counted further than it
// should have (its main clock is faster), positive that it lags.
// LOCK_CNT is the count seen at a transition when both base clocks are in
// step and the decoder samples half a base period after the coder; its value
// follows from the coder-to-decoder latency of this implementation.
// The method (measure the base clock phase at data transitions) is the
// trainer's; the synchroniser and the error format are this design's.
//
// Timing: meas_valid is a one-cycle strobe, registered, one cycle after the
// transition reaches the third synchroniser stage; phase_err holds until the
// next strobe. rx_sync is the synchronised data for the decoder.
module measuring_circuit #(
  parameter int unsigned DIV      = ansdm_pkg::BASE_DIV,
  parameter int unsigned CNT_W    = ansdm_pkg::CNT_W,
  parameter int unsigned PH_W     = ansdm_pkg::PH_W,
  parameter int unsigned LOCK_CNT = DIV / 2 - 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clk_en,
  input  logic                   rx,
  input  logic [CNT_W-1:0]       cnt,
  output logic                   rx_sync,
  output logic                   meas_valid,
  output logic signed [PH_W-1:0] phase_err
);

  logic s1, s2, s3;
  logic edge_seen;
  logic signed [PH_W-1:0] diff, wrapped;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else if (clk_en) begin
      s1 <= rx;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign rx_sync   = s2;
  assign edge_seen = clk_en && (s2 != s3);

  always_comb begin
    diff = PH_W'($signed({1'b0, cnt})) - PH_W'($signed(LOCK_CNT));
    if (diff >= PH_W'($signed(DIV / 2)))
      wrapped = diff - PH_W'($signed(DIV));
    else if (diff < -PH_W'($signed(DIV / 2)))
      wrapped = diff + PH_W'($signed(DIV));
    else
      wrapped = diff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meas_valid <= 1'b0;
      phase_err  <= '0;
    end else begin
      meas_valid <= edge_seen;
      if (edge_seen)
        phase_err <= wrapped;
    end
  end

  initial assert (LOCK_CNT < DIV && DIV < (1 << (PH_W - 1))) else $error("bad LOCK_CNT or PH_W");

endmodule

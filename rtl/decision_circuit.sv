// decision_circuit: turns phase measurements into clock corrections.
//
// For each measurement outside the dead band (|phase_err| > DEADBAND) it
// arms one correction, if the synchronization mode allows it:
//   * phase_err < -DEADBAND, the decoder main clock is faster: remove one
//     main clock pulse (modes SYNC_REMOVE and SYNC_BOTH);
//   * phase_err > +DEADBAND, the decoder main clock is slower: divide by m
//     instead of m+1 for one base period (modes SYNC_DIVIDE and SYNC_BOTH).
// An armed correction waits for the next decoder base clock event and is then
// issued, so it always acts on the first count (DIV-1) of a base period, the
// slot where neither the predictor nor the D/A converter is working. At most
// one correction is issued per base period; a newer measurement replaces an
// older armed one, and the mode is checked again when the correction is
// issued, so a correction armed before a mode change is dropped. The correction directions and the slot follow the
// synchronization method; the dead band, which keeps synchroniser jitter of
// one main period from triggering corrections, is this design's choice.
//
// It runs on the raw decoder main clock, because it controls the removal of
// that clock's pulses.
// Timing: remove is combinational, high in the base tick cycle (the pulse
// remover registers it, so the following period, count DIV-1, is removed);
// skip is registered, high in the cycle after the tick, while the divider
// shows DIV-1.
module decision_circuit #(
  parameter int unsigned PH_W     = ansdm_pkg::PH_W,
  parameter int unsigned DEADBAND = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  ansdm_pkg::sync_mode_e  mode,
  input  logic                   meas_valid,
  input  logic signed [PH_W-1:0] phase_err,
  input  logic                   tick,
  output logic                   remove,
  output logic                   skip
);
  import ansdm_pkg::*;

  logic pend_remove, pend_skip;
  logic allow_remove, allow_skip;
  logic too_early, too_late;

  assign allow_remove = (mode == SYNC_REMOVE) || (mode == SYNC_BOTH);
  assign allow_skip   = (mode == SYNC_DIVIDE) || (mode == SYNC_BOTH);
  assign too_early    = phase_err < -PH_W'($signed(DEADBAND));
  assign too_late     = phase_err >  PH_W'($signed(DEADBAND));

  assign remove = tick && pend_remove && allow_remove;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_remove <= 1'b0;
      pend_skip   <= 1'b0;
      skip        <= 1'b0;
    end else begin
      skip <= tick && pend_skip && allow_skip;
      if (meas_valid) begin
        pend_remove <= too_early && allow_remove;
        pend_skip   <= too_late  && allow_skip;
      end else if (tick) begin
        pend_remove <= 1'b0;
        pend_skip   <= 1'b0;
      end
    end
  end

  // Never both corrections at once (both flags reset to 0 asynchronously).
  assert property (@(posedge clk) !(pend_remove && pend_skip));

endmodule

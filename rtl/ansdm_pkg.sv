// ansdm_pkg: types and constants shared by the ANS-DM coder, decoder and
// their synchronization logic.
//
// The main clock runs at 50 MHz (20 ns) and is divided by 36 into the 720 ns
// base clock that paces the predictor, the comparator and the D/A converter.
// Samples are 14 bits wide at the A/D converter and 12 bits wide everywhere
// after the decimation stage, the resolution of the D/A converter. Those
// numbers are the trainer's own. The step-size and interval constants
// (K0, KMAX, P, TAU0, TAU_MIN, TAU_MAX, K1, K2) are this design's choice:
// they are free parameters of the ANS-DM algorithm. Multiplying factors are
// unsigned fixed point with four fraction bits (16 = 1.0).
package ansdm_pkg;

  localparam int unsigned ADC_W    = 14;   // A/D converter word
  localparam int unsigned DATA_W   = 12;   // predictor and D/A word
  localparam int unsigned BASE_DIV = 36;   // main clocks per base clock (m+1)
  localparam int unsigned CNT_W    = 6;    // width of the base clock counter
  localparam int unsigned TAU_W    = 8;    // sampling interval, in base periods
  localparam int unsigned PH_W     = 7;    // signed phase error, in main periods

  // Adaptation constants (fixed point, Q4 for the factors).
  localparam int unsigned FRAC     = 4;
  localparam int unsigned K0       = 4;    // starting (and minimum) step, LSBs
  localparam int unsigned KMAX     = 512;  // maximum step, LSBs
  localparam int unsigned P_Q4     = 32;   // step growth P = 2.0
  localparam int unsigned TAU0     = 4;    // starting interval, base periods
  localparam int unsigned TAU_MIN  = 1;
  localparam int unsigned TAU_MAX  = 16;
  localparam int unsigned K1_Q4    = 8;    // interval shrink K1 = 0.5
  localparam int unsigned K2_Q4    = 32;   // interval growth K2 = 2.0

  // Synchronization mode of the decoder.
  //   SYNC_OFF    : free running, no correction
  //   SYNC_REMOVE : remove main clock pulses only (decoder clock faster)
  //   SYNC_DIVIDE : divide by m instead of m+1 only (decoder clock slower)
  //   SYNC_BOTH   : both, works for either sign of the frequency difference
  typedef enum logic [1:0] {
    SYNC_OFF    = 2'd0,
    SYNC_REMOVE = 2'd1,
    SYNC_DIVIDE = 2'd2,
    SYNC_BOTH   = 2'd3
  } sync_mode_e;

endpackage

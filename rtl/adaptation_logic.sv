// adaptation_logic: step-size and sampling-interval adaptation of ANS-DM.
//
// The block holds the two previous output bits b_{i-1}, b_{i-2} (the D(tau)
// delay elements of the codec diagram), two flags saying whether the step
// (kf) and the interval (tf) currently differ from their starting values, and
// the current step k and interval tau. When a new bit b_i is decided (update)
// it applies the modification table of the ANS-DM algorithm:
//
//   b_{i-2} b_{i-1} b_i   kf tf  ->  kf tf   step        interval
//   000 or 111 (a run)     0  0       0  1   k0          K1 * tau
//                          0  1       1  0   P * k       tau0
//                          1  0       1  1   P * k       K1 * tau
//                          1  1       1  1   P * k       K1 * tau
//   010 or 101 (alternate) -  -       0  1   k0          K2 * tau
//   any other pattern      -  -       0  0   k0          tau0
//
// A run of equal bits means slope overload: the step grows by P and the
// interval shrinks by K1 < 1. Alternating bits mean a flat signal: the step
// returns to k0 and the interval grows by K2 > 1. Everything else returns
// both to their starting values, which also re-synchronises a decoder that is
// switched on late or has taken a channel error. The step is limited to KMAX
// and the interval to [TAU_MIN, TAU_MAX]. The table and the limits are the
// algorithm's; the numeric constants come from ansdm_pkg and are this
// design's choice.
//
// Interface: k_next and tau_next are combinational from the state and b_new:
// k_next is the step k_i used by the predictor in the update cycle, tau_next
// the interval to the next sampling instant. The state (and tau_cur) changes
// on the clock edge of the update cycle.
module adaptation_logic #(
  parameter int unsigned DATA_W  = ansdm_pkg::DATA_W,
  parameter int unsigned TAU_W   = ansdm_pkg::TAU_W,
  parameter int unsigned K0      = ansdm_pkg::K0,
  parameter int unsigned KMAX    = ansdm_pkg::KMAX,
  parameter int unsigned P_Q4    = ansdm_pkg::P_Q4,
  parameter int unsigned TAU0    = ansdm_pkg::TAU0,
  parameter int unsigned TAU_MIN = ansdm_pkg::TAU_MIN,
  parameter int unsigned TAU_MAX = ansdm_pkg::TAU_MAX,
  parameter int unsigned K1_Q4   = ansdm_pkg::K1_Q4,
  parameter int unsigned K2_Q4   = ansdm_pkg::K2_Q4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clk_en,
  input  logic              update,
  input  logic              b_new,
  output logic [DATA_W-1:0] k_next,
  output logic [TAU_W-1:0]  tau_next,
  output logic [TAU_W-1:0]  tau_cur
);

  localparam int unsigned FRAC = ansdm_pkg::FRAC;
  localparam int unsigned PW   = DATA_W + 8;   // product widths
  localparam int unsigned TW   = TAU_W + 8;

  typedef enum logic {KEEP_K0, GROW_K}                   step_op_e;
  typedef enum logic [1:0] {TAU_START, SHRINK, STRETCH}   tau_op_e;

  logic              b1, b2;          // b_{i-1}, b_{i-2}
  logic              kf, tf;          // modification flags
  logic [DATA_W-1:0] k;
  logic [TAU_W-1:0]  tau;

  logic              run, alt;
  logic              kf_n, tf_n;
  step_op_e          step_op;
  tau_op_e           tau_op;
  logic [PW-1:0]     k_grow;
  logic [TW-1:0]     tau_shrink, tau_stretch;

  assign run = (b2 == b1) && (b1 == b_new);
  assign alt = (b2 != b1) && (b1 != b_new);

  // Modification table.
  always_comb begin
    if (run) begin
      unique case ({kf, tf})
        2'b00:   begin step_op = KEEP_K0; tau_op = SHRINK;    kf_n = 1'b0; tf_n = 1'b1; end
        2'b01:   begin step_op = GROW_K;  tau_op = TAU_START; kf_n = 1'b1; tf_n = 1'b0; end
        default: begin step_op = GROW_K;  tau_op = SHRINK;    kf_n = 1'b1; tf_n = 1'b1; end
      endcase
    end else if (alt) begin
      step_op = KEEP_K0; tau_op = STRETCH;   kf_n = 1'b0; tf_n = 1'b1;
    end else begin
      step_op = KEEP_K0; tau_op = TAU_START; kf_n = 1'b0; tf_n = 1'b0;
    end
  end

  // Arithmetic with the limits.
  always_comb begin
    k_grow      = (PW'(k) * PW'(P_Q4)) >> FRAC;
    tau_shrink  = (TW'(tau) * TW'(K1_Q4)) >> FRAC;
    tau_stretch = (TW'(tau) * TW'(K2_Q4)) >> FRAC;

    if (step_op == GROW_K)
      k_next = (k_grow > PW'(KMAX)) ? DATA_W'(KMAX) : k_grow[DATA_W-1:0];
    else
      k_next = DATA_W'(K0);

    unique case (tau_op)
      SHRINK:  tau_next = (tau_shrink  < TW'(TAU_MIN)) ? TAU_W'(TAU_MIN) : tau_shrink[TAU_W-1:0];
      STRETCH: tau_next = (tau_stretch > TW'(TAU_MAX)) ? TAU_W'(TAU_MAX) : tau_stretch[TAU_W-1:0];
      default: tau_next = TAU_W'(TAU0);
    endcase
  end

  assign tau_cur = tau;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1  <= 1'b0;
      b2  <= 1'b1;
      kf  <= 1'b0;
      tf  <= 1'b0;
      k   <= DATA_W'(K0);
      tau <= TAU_W'(TAU0);
    end else if (clk_en && update) begin
      b2  <= b1;
      b1  <= b_new;
      kf  <= kf_n;
      tf  <= tf_n;
      k   <= k_next;
      tau <= tau_next;
    end
  end

  initial begin
    assert (K1_Q4 < (1 << FRAC) && K2_Q4 > (1 << FRAC) && P_Q4 > (1 << FRAC))
      else $error("need K1 < 1 < K2 and P > 1");
    assert (TAU_MIN >= 1 && TAU_MIN < TAU0 && TAU0 < TAU_MAX && TAU_MAX < (1 << TAU_W))
      else $error("need 1 <= TAU_MIN < TAU0 < TAU_MAX");
    assert (K0 >= 1 && K0 < KMAX && KMAX < (1 << DATA_W)) else $error("need K0 < KMAX");
  end

endmodule

// ansdm_ref_pkg: reference model of the ANS-DM algorithm for the testbenches.
//
// Written from the algorithm's equations with plain integer arithmetic,
// independently of the RTL: the step and interval tables, their limits and
// the saturating staircase. All constants are repeated here as literals so a
// wrong constant in the RTL shows up as a mismatch.
package ansdm_ref_pkg;

  localparam int K0 = 4, KMAX = 512, TAU0 = 4, TAU_MIN = 1, TAU_MAX = 16;

  typedef struct {
    bit b1, b2;      // previous two bits
    bit kf, tf;      // step / interval modified
    int k, tau;      // current step and interval
    int s;           // staircase value
  } ref_state_t;

  function automatic ref_state_t ref_reset();
    ref_state_t st;
    st.b1 = 0; st.b2 = 1; st.kf = 0; st.tf = 0;
    st.k = K0; st.tau = TAU0; st.s = 2048;
    return st;
  endfunction

  // Applies one bit; returns the step used via k_used.
  function automatic void ref_step(ref ref_state_t st, input bit b, output int k_used);
    int k_new, tau_new;
    bit kf_new, tf_new;
    if (st.b2 == st.b1 && st.b1 == b) begin
      if (!st.kf && !st.tf) begin
        k_new = K0;          tau_new = st.tau / 2; kf_new = 0; tf_new = 1;
      end else if (!st.kf && st.tf) begin
        k_new = st.k * 2;    tau_new = TAU0;       kf_new = 1; tf_new = 0;
      end else begin
        k_new = st.k * 2;    tau_new = st.tau / 2; kf_new = 1; tf_new = 1;
      end
    end else if (st.b2 != st.b1 && st.b1 != b) begin
      k_new = K0; tau_new = st.tau * 2; kf_new = 0; tf_new = 1;
    end else begin
      k_new = K0; tau_new = TAU0; kf_new = 0; tf_new = 0;
    end
    if (k_new > KMAX) k_new = KMAX;
    if (tau_new < TAU_MIN) tau_new = TAU_MIN;
    if (tau_new > TAU_MAX) tau_new = TAU_MAX;
    st.s = b ? st.s + k_new : st.s - k_new;
    if (st.s > 4095) st.s = 4095;
    if (st.s < 0) st.s = 0;
    st.b2 = st.b1; st.b1 = b; st.kf = kf_new; st.tf = tf_new;
    st.k = k_new; st.tau = tau_new;
    k_used = k_new;
  endfunction

  // Test signal for the A/D input, 14 bits, at time t (microseconds). It
  // cycles through four 600 us segments: a nearly flat sine (long intervals),
  // a fast large sine (step growth), a slow sine, and a square wave (slope
  // overload up to the step limit).
  function automatic logic [13:0] adc_wave(real t_us);
    real ph, v;
    ph = t_us - 600.0 * $floor(t_us / 600.0);
    if (ph < 150.0)      v = 8192.0 + 40.0   * $sin(2.0 * 3.14159265 * 0.002 * t_us);
    else if (ph < 300.0) v = 8192.0 + 6000.0 * $sin(2.0 * 3.14159265 * 0.003 * t_us);
    else if (ph < 450.0) v = 8192.0 + 3000.0 * $sin(2.0 * 3.14159265 * 0.0005 * t_us);
    else                 v = ($sin(2.0 * 3.14159265 * 0.01 * t_us) > 0.0) ? 14000.0 : 2000.0;
    return 14'(int'(v));
  endfunction

endpackage

// tb_ansdm_link_top: end-to-end run of the link with two independent main
// clocks, all parameters at their defaults.
//
// The coder clock is exactly 20 ns; the decoder clock is offset by
// a number of parts per million that changes between phases. The A/D input
// is the test waveform. Every value the decoder rebuilds is compared with the
// value the coder produced for the same bit. Phases:
//   1. SYNC_BOTH,   +100 ppm     -> pulses removed (two +-50 ppm crystals)
//   2. SYNC_BOTH,   -100 ppm     -> base periods shortened (divide by m)
//   3. SYNC_BOTH,   +500 ppm     -> pulses removed, near the 12-bit limit
//   4. SYNC_BOTH,   -500 ppm     -> base periods shortened
//   5. SYNC_REMOVE, +500 ppm     -> method A alone
//   6. SYNC_DIVIDE, -500 ppm     -> method B alone
//   7. SYNC_OFF,    +500 ppm     -> the link must lose synchronism
// In every correcting phase the number of corrections must match the drift:
// one per main period the two clocks slip apart.
// Phases 1-4 must decode without a single error; each correction kind and
// each mode switch is counted and must have happened; phase 5 must show
// errors, which proves the corrections are what keeps the link in step.
module tb_ansdm_link_top;
  import ansdm_ref_pkg::*;
  import ansdm_pkg::*;

  localparam real PPM     = 500.0;     // frequency offset between the crystals
  localparam int  PHASE_US = 2000;     // length of each 500 ppm phase
  localparam int  LONG_US  = 8000;     // length of each 100 ppm phase

  logic enc_clk = 0, dec_clk = 0, enc_rst_n = 0, dec_rst_n = 0;
  logic [13:0] adc_data = 14'd8192;
  sync_mode_e sync_mode = SYNC_OFF;
  logic serial_line, enc_sample, enc_tick, dec_sample, dac_cs_n, dac_clk, sync_remove, sync_skip;
  logic [11:0] enc_pred, dec_pred, dac_data;

  real dec_half = 10.0;
  int checks = 0, failures = 0;
  int phase = 0, errors_in_phase = 0, decoded_in_phase = 0;
  int n_remove = 0, n_skip = 0, n_mode_switch = 0, n_sent = 0, n_dec = 0, n_dac_writes = 0;
  int q[$];
  bit enc_pend = 0, dec_pend = 0;

  ansdm_link_top dut (
    .enc_clk, .enc_rst_n, .adc_data, .dec_clk, .dec_rst_n, .sync_mode,
    .serial_line, .enc_sample, .enc_pred, .enc_tick, .dec_sample, .dec_pred,
    .dac_data, .dac_cs_n, .dac_clk, .sync_remove, .sync_skip
  );

  always #10.0 enc_clk = ~enc_clk;
  always #(dec_half) dec_clk = ~dec_clk;

  // A/D converter model: a new sample every coder main clock
  always @(negedge enc_clk) adc_data <= adc_wave($realtime / 1000.0);

  // coder side: record each staircase value after its sampling instant
  always @(negedge enc_clk) begin
    if (enc_pend) begin q.push_back(int'(enc_pred)); n_sent++; end
    enc_pend = enc_rst_n && enc_sample;
  end

  // decoder side: compare each rebuilt value
  always @(negedge dec_clk) begin
    if (dec_pend) begin
      automatic int want = (q.size() > 0) ? q.pop_front() : -1;
      n_dec++; decoded_in_phase++;
      if (int'(dec_pred) != want) errors_in_phase++;
    end
    dec_pend = dec_rst_n && dec_sample;
    if (dec_rst_n && sync_remove) n_remove++;
    if (dec_rst_n && sync_skip) n_skip++;
    if (dec_rst_n && !dac_cs_n) n_dac_writes++;
  end

  // independent check of the removed pulses: the gated clock loses one
  // rising edge per removal
  int dec_edges = 0, gated_edges = 0;
  always @(posedge dec_clk) if (dec_rst_n) dec_edges++;
  always @(posedge dac_clk) if (dec_rst_n) gated_edges++;

  initial begin
    #((6 * PHASE_US + 3 * LONG_US) * 1000 * 1.0ns);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(sync_mode_e m, real ppm, int us, bit must_hold, ref int rm, ref int sk);
    int r0 = n_remove, s0 = n_skip;
    real expected;
    if (m != sync_mode) n_mode_switch++;
    sync_mode = m;
    dec_half = 10.0 / (1.0 + ppm * 1.0e-6);
    errors_in_phase = 0; decoded_in_phase = 0;
    phase++;
    #(us * 1000 * 1.0ns);
    rm = n_remove - r0; sk = n_skip - s0;
    // one correction per main period of accumulated drift: |ppm| * T / 20 ns
    expected = ((ppm < 0.0) ? -ppm : ppm) * 1.0e-6 * real'(us) * 1000.0 / 20.0;
    if (m != SYNC_OFF) begin
      checks++;
      if (real'(rm + sk) < 0.8 * expected - 2.0 || real'(rm + sk) > 1.2 * expected + 2.0) begin
        failures++; $display("  %0d corrections, %0.1f expected from the frequency offset", rm + sk, expected);
      end
    end
    $display("phase %0d mode %s ppm %0.0f: decoded %0d errors %0d removals %0d skips %0d",
             phase, m.name(), ppm, decoded_in_phase, errors_in_phase, rm, sk);
    checks++;
    if (must_hold && errors_in_phase != 0) begin failures++; $display("  link lost synchronism"); end
    checks++;
    if (decoded_in_phase < 100) begin failures++; $display("  too few bits decoded"); end
  endtask

  initial begin
    int rm, sk;
    #100ns;
    enc_rst_n = 1; dec_rst_n = 1;
    // crystals within +-50 ppm each: 100 ppm apart at worst
    run_phase(SYNC_BOTH, 100.0, LONG_US, 1, rm, sk);
    checks++; if (rm == 0 || sk != 0) begin failures++; $display("  wrong correction at +100 ppm"); end
    run_phase(SYNC_BOTH, -100.0, LONG_US, 1, rm, sk);
    checks++; if (sk == 0 || rm != 0) begin failures++; $display("  wrong correction at -100 ppm"); end
    // the limit worked out for 12-bit converters, about 500 ppm
    run_phase(SYNC_BOTH, PPM, PHASE_US, 1, rm, sk);
    checks++; if (rm == 0) begin failures++; $display("  no pulse removed"); end
    run_phase(SYNC_BOTH, -PPM, PHASE_US, 1, rm, sk);
    checks++; if (sk == 0) begin failures++; $display("  no period shortened"); end
    run_phase(SYNC_REMOVE, PPM, PHASE_US, 1, rm, sk);
    checks++; if (rm == 0 || sk != 0) begin failures++; $display("  method A misbehaved"); end
    run_phase(SYNC_DIVIDE, -PPM, PHASE_US, 1, rm, sk);
    checks++; if (sk == 0 || rm != 0) begin failures++; $display("  method B misbehaved"); end
    run_phase(SYNC_OFF, PPM, PHASE_US, 0, rm, sk);
    checks++; if (rm != 0 || sk != 0) begin failures++; $display("  correction with synchronization off"); end
    checks++; if (errors_in_phase == 0) begin failures++; $display("  no loss of synchronism without correction"); end
    // mechanisms
    checks++; if (n_mode_switch < 4) begin failures++; $display("  mode switches %0d", n_mode_switch); end
    checks++; if (n_dac_writes == 0) begin failures++; $display("  no D/A write"); end
    checks++;
    if (dec_edges - gated_edges != n_remove) begin
      failures++; $display("  gated clock lost %0d edges for %0d removals", dec_edges - gated_edges, n_remove);
    end
    $display("sent %0d decoded %0d removals %0d skips %0d mode switches %0d",
             n_sent, n_dec, n_remove, n_skip, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

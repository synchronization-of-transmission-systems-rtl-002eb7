// tb_ansdm_coder: runs the coder on the test waveform and follows it with a
// cycle-level reference: base clock every 36 main clocks, one decimated sample
// per base period, sampling instants tau base periods apart, b = [x >= s] and
// the staircase from the reference adaptation model. Checks every sampling
// instant (position, bit, staircase), the base clock period, and that step
// growth to the limit and the longest interval both occur.
module tb_ansdm_coder;
  import ansdm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [13:0] adc_data = 14'd8192;
  logic b, sample, tick;
  logic [11:0] s;
  int checks = 0, failures = 0;
  int cyc = 0, since = 0, samples = 0, n_kmax = 0, n_taumax = 0, n_taumin = 0;
  int x_ref = 2048, k_used;
  bit b_ref = 0;
  ref_state_t st;

  ansdm_coder dut (.clk, .rst_n, .adc_data, .b, .sample, .s, .tick);
  always #10 clk = ~clk;     // 20 ns main clock

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit want_tick, want_sample;
    st = ref_reset();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 300000; cyc++) begin
      // inputs and expectations for this cycle, checked before the edge
      adc_data = adc_wave(real'(cyc) * 0.02);
      want_tick   = (cyc % 36 == 35);
      want_sample = want_tick && (since + 1 == st.tau);
      #1;
      checks++;
      if (tick !== want_tick || sample !== want_sample) begin
        failures++;
        if (failures < 10) $display("cycle %0d: tick %0d/%0d sample %0d/%0d", cyc, tick, want_tick, sample, want_sample);
      end
      if (want_tick) begin
        if (want_sample) begin
          b_ref = (x_ref >= st.s);
          ref_step(st, b_ref, k_used);
          since = 0;
          samples++;
          if (k_used == KMAX) n_kmax++;
          if (st.tau == TAU_MAX) n_taumax++;
          if (st.tau == TAU_MIN) n_taumin++;
        end else
          since++;
        x_ref = int'(adc_data >> 2);
      end
      @(negedge clk);
      checks += 2;
      if (b !== b_ref) begin failures++; if (failures < 10) $display("cycle %0d: b %0d ref %0d", cyc, b, b_ref); end
      if (s !== 12'(st.s)) begin failures++; if (failures < 10) $display("cycle %0d: s %0d ref %0d", cyc, s, st.s); end
    end
    checks++;
    if (n_kmax == 0 || n_taumax == 0 || n_taumin == 0) begin
      failures++; $display("limits reached: kmax %0d taumax %0d taumin %0d", n_kmax, n_taumax, n_taumin);
    end
    $display("coder: %0d samples, kmax %0d, tau max %0d, tau min %0d", samples, n_kmax, n_taumax, n_taumin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ansdm_decoder: a reference transmitter, on the decoder's own clock,
// sends random ANS-DM bits with the durations the reference adaptation model
// gives. Its base period is normally 36 main clocks; in drift phases every
// DRIFT_EVERY-th period is made 37 (transmitter slower: the decoder must
// remove pulses) or 35 (transmitter faster: the decoder must divide by m).
// Every decoded staircase value is compared with the transmitter's, and the
// corrections are counted by direction.
module tb_ansdm_decoder;
  import ansdm_ref_pkg::*;
  import ansdm_pkg::sync_mode_e;
  import ansdm_pkg::SYNC_BOTH;

  localparam int DRIFT_EVERY = 20;

  logic clk = 0, rst_n = 0, rx = 0;
  sync_mode_e mode = SYNC_BOTH;
  logic sample, dac_cs_n, dac_clk, remove, skip;
  logic [11:0] s, dac_data;
  int checks = 0, failures = 0;
  int n_remove = 0, n_skip = 0, n_decoded = 0, n_sent = 0, n_dac = 0;
  int drift = 0;             // 0 none, +1 transmitter periods of 37, -1 of 35
  int s_queue[$];
  ref_state_t tx;
  bit pend_sample = 0;

  ansdm_decoder dut (.clk, .rst_n, .rx, .mode, .sample, .s, .dac_data, .dac_cs_n, .dac_clk, .remove, .skip);
  always #10 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference transmitter
  initial begin
    int cnt = 35, since = 0, period_no = 0, k_used;
    bit b;
    tx = ref_reset();
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (cnt == 0) begin
        period_no++;
        if (since + 1 == tx.tau) begin
          // random bits with bursts of runs so the step limit is reached
          b = (period_no % 400 < 60) ? 1'b1 : 1'($urandom_range(0, 1));
          ref_step(tx, b, k_used);
          s_queue.push_back(tx.s);
          n_sent++;
          since = 0;
          rx <= b;
        end else
          since++;
        cnt = (drift != 0 && period_no % DRIFT_EVERY == 0) ? 35 + drift : 35;
      end else
        cnt--;
    end
  end

  // decoder side monitor
  always @(negedge clk) begin
    if (pend_sample) begin
      checks++;
      if (s_queue.size() == 0) begin
        failures++; $display("decoded a bit that was never sent");
      end else begin
        automatic int want = s_queue.pop_front();
        if (s !== 12'(want)) begin
          failures++; if (failures < 10) $display("%t: decoded %0d sent %0d", $time, s, want);
        end
      end
    end
    pend_sample = rst_n && sample;
    if (rst_n && sample) n_decoded++;
    if (rst_n && remove) n_remove++;
    if (rst_n && skip) n_skip++;
    if (rst_n && !dac_cs_n) n_dac++;
  end

  initial begin
    int r0, s0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // in step: no correction expected
    repeat (60000) @(negedge clk);
    checks++;
    if (n_remove + n_skip != 0) begin failures++; $display("corrections while in step: %0d %0d", n_remove, n_skip); end
    // transmitter slower: removals only
    drift = 1; r0 = n_remove; s0 = n_skip;
    repeat (150000) @(negedge clk);
    checks += 2;
    if (n_remove - r0 < 50) begin failures++; $display("too few removals: %0d", n_remove - r0); end
    if (n_skip - s0 > 2) begin failures++; $display("skips while decoder fast: %0d", n_skip - s0); end
    // transmitter faster: divide by m only
    drift = -1; r0 = n_remove; s0 = n_skip;
    repeat (150000) @(negedge clk);
    checks += 2;
    if (n_skip - s0 < 50) begin failures++; $display("too few skips: %0d", n_skip - s0); end
    if (n_remove - r0 > 2) begin failures++; $display("removals while decoder slow: %0d", n_remove - r0); end
    drift = 0;
    repeat (2000) @(negedge clk);
    checks++;
    if (n_decoded < 1000 || n_dac == 0) begin failures++; $display("decoded %0d", n_decoded); end
    $display("decoder: sent %0d decoded %0d removals %0d skips %0d", n_sent, n_decoded, n_remove, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

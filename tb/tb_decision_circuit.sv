// tb_decision_circuit: feeds phase errors in every synchronization mode and
// checks which correction is issued at the next base tick: a removal for an
// error below -1, a divide-by-m for an error above +1, nothing inside the
// dead band or when the mode forbids it, and at most one per tick.
module tb_decision_circuit;
  import ansdm_pkg::*;
  logic clk = 0, rst_n = 0, meas_valid = 0, tick = 0;
  logic signed [6:0] phase_err = 0;
  sync_mode_e mode = SYNC_BOTH;
  logic remove, skip;
  int checks = 0, failures = 0, n_remove = 0, n_skip = 0;

  decision_circuit dut (.clk, .rst_n, .mode, .meas_valid, .phase_err, .tick, .remove, .skip);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      automatic int e = $urandom_range(0, 35) - 18;
      bit want_rm, want_sk;
      mode = sync_mode_e'($urandom_range(0, 3));
      @(negedge clk);
      phase_err = 7'(e); meas_valid = 1;
      @(negedge clk);
      meas_valid = 0;
      repeat ($urandom_range(0, 5)) begin
        @(negedge clk);
        checks++;
        if (remove || skip) begin failures++; $display("correction before tick"); end
      end
      want_rm = (e < -1) && (mode == SYNC_REMOVE || mode == SYNC_BOTH);
      want_sk = (e >  1) && (mode == SYNC_DIVIDE || mode == SYNC_BOTH);
      tick = 1; #1;
      checks++;
      if (remove !== want_rm) begin failures++; $display("remove %0d want %0d (e=%0d mode=%0d)", remove, want_rm, e, mode); end
      @(negedge clk);
      tick = 0;
      checks++;
      if (skip !== want_sk) begin failures++; $display("skip %0d want %0d (e=%0d mode=%0d)", skip, want_sk, e, mode); end
      n_remove += int'(want_rm); n_skip += int'(want_sk);
      // a second tick without a new measurement issues nothing
      tick = 1; #1;
      checks++;
      if (remove) begin failures++; $display("second removal"); end
      @(negedge clk); tick = 0;
      checks++;
      if (skip) begin failures++; $display("second skip"); end
    end
    checks++;
    if (n_remove == 0 || n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

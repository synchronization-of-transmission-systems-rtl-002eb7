// tb_measuring_circuit: toggles the input line at chosen moments of a free
// running divider count and checks that the reported error is the count seen
// three cycles after the toggle minus LOCK_CNT (15), wrapped into [-18, 18),
// that one strobe comes per transition and that the data is synchronised.
module tb_measuring_circuit;
  logic clk = 0, rst_n = 0, clk_en = 1, rx = 0;
  logic [5:0] cnt = 6'd35;
  logic rx_sync, meas_valid;
  logic signed [6:0] phase_err;
  int checks = 0, failures = 0, strobes = 0, toggles = 0;
  int expect_err;

  measuring_circuit dut (.clk, .rst_n, .clk_en, .rx, .cnt, .rx_sync, .meas_valid, .phase_err);
  always #5 clk = ~clk;

  // free running count 35..0
  always @(posedge clk) cnt <= (cnt == 0) ? 6'd35 : cnt - 6'd1;
  always @(posedge clk) if (rst_n && meas_valid) strobes++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      automatic int wait_c = $urandom_range(8, 60);
      int c_at;
      repeat (wait_c) @(negedge clk);
      rx = ~rx; toggles++;
      // rx sampled at the next edge, then two more stages: edge seen in the
      // cycle where cnt has advanced by two from the toggle cycle's value
      @(posedge clk); @(posedge clk); #1;
      c_at = int'(cnt);
      checks++;
      if (rx_sync !== rx) begin failures++; $display("rx_sync lags too much"); end
      @(posedge clk); #1;
      checks++;
      if (!meas_valid) begin failures++; $display("no strobe"); end
      expect_err = c_at - 15;
      if (expect_err >= 18) expect_err -= 36;
      if (expect_err < -18) expect_err += 36;
      checks++;
      if (int'(phase_err) != expect_err) begin
        failures++; $display("phase_err %0d expected %0d (cnt %0d)", phase_err, expect_err, c_at);
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (strobes != toggles) begin failures++; $display("strobes %0d toggles %0d", strobes, toggles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_base_clock_divider: checks the 36-period base clock, the count sequence
// 35..0, a removed main clock pulse (count 35 held, period 37) and the divide
// by m correction (35 followed by 33, period 35).
module tb_base_clock_divider;
  logic clk = 0, rst_n = 0, clk_en = 1, skip = 0;
  logic [5:0] cnt;
  logic tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, period;

  base_clock_divider dut (.clk, .rst_n, .clk_en, .skip, .cnt, .tick);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure the period in raw main clock cycles
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tick) begin period = cyc - last_tick; last_tick = cyc; end
  end

  task automatic wait_tick();
    do @(posedge clk); while (!tick);
  endtask

  task automatic expect_period(int p);
    @(negedge clk); wait_tick(); @(negedge clk);
    checks++;
    if (period != p) begin failures++; $display("period %0d expected %0d", period, p); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (cnt !== 6'd35) failures++;
    rst_n = 1;
    wait_tick();
    // plain periods, with the count sequence
    for (int j = 0; j < 3; j++) begin
      for (int c = 35; c >= 0; c--) begin
        @(negedge clk);
        checks++;
        if (cnt !== 6'(c)) begin failures++; $display("count %0d expected %0d", cnt, c); end
      end
    end
    expect_period(36);
    // remove one pulse at count 35
    @(negedge clk); wait_tick(); @(negedge clk);
    checks++; if (cnt !== 6'd35) failures++;
    clk_en = 0; @(negedge clk); clk_en = 1;
    checks++; if (cnt !== 6'd35) begin failures++; $display("count not held"); end
    @(negedge clk);
    checks++; if (cnt !== 6'd34) failures++;
    wait_tick(); @(negedge clk);
    checks++; if (period != 37) begin failures++; $display("held period %0d", period); end
    // skip: 35 then 33
    checks++; if (cnt !== 6'd35) failures++;
    skip = 1; @(negedge clk); skip = 0;
    checks++; if (cnt !== 6'd33) begin failures++; $display("after skip %0d", cnt); end
    wait_tick(); @(negedge clk);
    checks++; if (period != 35) begin failures++; $display("skip period %0d", period); end
    // skip high away from count 35 has no effect
    skip = 1; repeat (10) @(negedge clk); skip = 0;
    wait_tick(); @(negedge clk);
    expect_period(36);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

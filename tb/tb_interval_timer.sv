// tb_interval_timer: random intervals; a sampling instant must come exactly
// tau base ticks after the previous one, and the first after START_DELAY + tau.
module tb_interval_timer;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [7:0] tau = 8'd4;
  logic sample;
  int checks = 0, failures = 0, ticks = 0, since = 0;

  interval_timer #(.START_DELAY(1)) dut (.clk, .rst_n, .clk_en(1'b1), .tick, .tau, .sample);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      tick = (i % 3 == 2);
      #1;
      if (tick) begin
        ticks++;
        if (ticks > 1) since++;        // first tick is the start delay
        checks++;
        if (sample !== (ticks > 1 && since == int'(tau))) begin
          failures++; $display("tick %0d: sample=%0d since=%0d tau=%0d", ticks, sample, since, tau);
        end
        if (sample) begin
          since = 0;
          @(posedge clk); #1 tau = 8'($urandom_range(1, 16));
        end
      end else begin
        checks++;
        if (sample) begin failures++; $display("sample without tick"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

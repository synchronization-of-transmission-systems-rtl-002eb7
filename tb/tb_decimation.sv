// tb_decimation: the 12-bit output must be the top 12 bits of the A/D word
// present at the base clock event, and hold between events.
module tb_decimation;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [13:0] adc_data = 0;
  logic [11:0] x;
  logic [11:0] expect_x = 12'h800;
  int checks = 0, failures = 0;

  decimation dut (.clk, .rst_n, .tick, .adc_data, .x);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (x !== 12'h800) failures++;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      adc_data = 14'($urandom);
      tick = (i % 36 == 35);
      if (tick) expect_x = adc_data >> 2;
      @(posedge clk); #1;
      checks++;
      if (x !== expect_x) begin failures++; $display("x %h expected %h", x, expect_x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

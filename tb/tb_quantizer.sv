// tb_quantizer: random input and predictor values; the registered bit must
// follow x >= s at sampling instants and hold in between.
module tb_quantizer;
  logic clk = 0, rst_n = 0, sample = 0;
  logic [11:0] x = 0, s = 0;
  logic b_now, b;
  bit expect_b = 0;
  int checks = 0, failures = 0;

  quantizer dut (.clk, .rst_n, .sample, .x, .s, .b_now, .b);
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
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x = 12'($urandom);
      s = (i % 10 == 0) ? x : 12'($urandom);
      sample = $urandom_range(0, 2) == 0;
      #1;
      checks++;
      if (b_now !== (x >= s)) begin failures++; $display("b_now wrong x=%0d s=%0d", x, s); end
      if (sample) expect_b = (x >= s);
      @(posedge clk); #1;
      checks++;
      if (b !== expect_b) begin failures++; $display("b wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

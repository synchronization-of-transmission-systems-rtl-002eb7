// tb_clock_pulse_remover: each one-cycle request removes exactly the next main
// clock period: clk_en is low for that period only and the gated clock has
// no rising edge in it; otherwise gclk follows clk.
module tb_clock_pulse_remover;
  logic clk = 0, rst_n = 0, remove = 0;
  logic clk_en, gclk;
  int checks = 0, failures = 0;
  int clk_edges = 0, gclk_edges = 0, requests = 0;

  clock_pulse_remover dut (.clk, .rst_n, .remove, .clk_en, .gclk);
  always #5 clk = ~clk;

  always @(posedge clk)  if (rst_n) clk_edges++;
  always @(posedge gclk) if (rst_n) gclk_edges++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      automatic bit req = ($urandom_range(0, 4) == 0);
      remove = req;
      @(posedge clk); #1;
      remove = 0;
      checks++;
      if (clk_en !== !req) begin failures++; $display("clk_en %0d after request %0d", clk_en, req); end
      if (req) requests++;
      // the next rising edge of clk is the removed one
      @(posedge clk); #3;
      checks++;
      if (gclk !== !req) begin failures++; $display("gclk %0d in high phase after request %0d", gclk, req); end
      checks++;
      if (clk_en !== 1'b1) begin failures++; $display("clk_en low for more than one period"); end
      @(negedge clk); #1;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("gclk high in low phase"); end
    end
    @(posedge clk); #1;
    checks++;
    if (clk_edges - gclk_edges != requests) begin
      failures++; $display("edges: clk %0d gclk %0d requests %0d", clk_edges, gclk_edges, requests);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

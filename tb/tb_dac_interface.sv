// tb_dac_interface: the D/A word must be the predictor value at each base
// tick, held for the base period, and the chip select must be low exactly one
// cycle after the count is inside [28, 31]; a disabled cycle freezes both.
module tb_dac_interface;
  logic clk = 0, rst_n = 0, clk_en = 1;
  logic [5:0] cnt = 6'd35;
  logic tick;
  logic [11:0] s = 0, dac_data;
  logic dac_cs_n;
  logic [11:0] expect_data = 12'h800;
  bit expect_cs = 1;
  int checks = 0, failures = 0, writes = 0;

  dac_interface dut (.clk, .rst_n, .clk_en, .cnt, .tick, .s, .dac_data, .dac_cs_n);
  always #5 clk = ~clk;
  assign tick = clk_en && cnt == 0;

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
      s = 12'($urandom);
      clk_en = ($urandom_range(0, 9) != 0);
      #1;
      if (clk_en) begin
        if (tick) expect_data = s;
        expect_cs = !(cnt <= 31 && cnt >= 28);
      end
      @(posedge clk);
      if (clk_en) cnt <= (cnt == 0) ? 6'd35 : cnt - 6'd1;
      #1;
      checks += 2;
      if (dac_data !== expect_data) begin failures++; $display("data %h expected %h", dac_data, expect_data); end
      if (dac_cs_n !== expect_cs) begin failures++; $display("cs %0d expected %0d", dac_cs_n, expect_cs); end
      if (!dac_cs_n) writes++;
    end
    checks++;
    if (writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

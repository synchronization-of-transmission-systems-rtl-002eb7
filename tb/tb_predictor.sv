// tb_predictor: random steps up and down, including saturation at both ends,
// compared with an integer model of the staircase.
module tb_predictor;
  logic clk = 0, rst_n = 0, clk_en = 1, update = 0, up = 0;
  logic [11:0] step = 0, s;
  int checks = 0, failures = 0, model = 2048, sat_hi = 0, sat_lo = 0;

  predictor dut (.clk, .rst_n, .clk_en, .update, .up, .step, .s);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (s !== 12'd2048) failures++;
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      update = ($urandom_range(0, 3) != 0);
      clk_en = ($urandom_range(0, 7) != 0);
      // biased walks to reach both limits
      up   = (i < 1000) ? ($urandom_range(0, 9) < 8) : (i < 2000) ? ($urandom_range(0, 9) < 2) : $urandom_range(0, 1);
      step = 12'($urandom_range(1, 600));
      @(posedge clk);
      if (update && clk_en) begin
        model = up ? model + step : model - step;
        if (model > 4095) begin model = 4095; sat_hi++; end
        if (model < 0)    begin model = 0;    sat_lo++; end
      end
      #1;
      checks++;
      if (s !== 12'(model)) begin failures++; $display("s %0d model %0d", s, model); end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

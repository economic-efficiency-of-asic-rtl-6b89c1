// tb_clk_gate: self-checking test of the clock gate. A counter on the gated clock must
// advance exactly once per cycle whose enable was set before the rising edge; a glitch on
// the enable during the high phase must not reach the gated clock; test mode forces it on.
module tb_clk_gate;
  logic clk = 0, en = 0, test_en = 0, gclk;
  int   n_g = 0, n_exp = 0;
  int checks = 0, failures = 0;

  clk_gate dut (.clk, .en, .test_en, .gclk);
  always #5 clk = ~clk;
  always @(posedge gclk) n_g++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      en = $urandom_range(0, 1);
      test_en = (i % 17 == 0);
      if (en || test_en) n_exp++;
      @(posedge clk);
      #2 en = ~en;          // toggle while the clock is high: must be ignored
      #1 checks++;
      if (gclk !== (clk & (en ^ 1'b1 | test_en))) begin
        failures++;
        if (failures < 10) $display("gated clock follows a high-phase enable change");
      end
      @(negedge clk);
      checks++;
      if (n_g != n_exp) begin
        failures++;
        if (failures < 10) $display("edges %0d expected %0d", n_g, n_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

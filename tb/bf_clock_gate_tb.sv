// bf_clock_gate_tb: checks the latch-based clock gate bf_clock_gate.
//
// Counts rising edges of the gated clock for random enable patterns set
// shortly after each rising clock edge: an edge must pass exactly when the
// enable (or test enable) was high before it. It also toggles the enable
// while the clock is high and checks that the gated clock never changes
// during that phase (no glitch), and that it stays low while the clock is
// low.
module bf_clock_gate_tb;

  logic clk = 1'b0, en = 1'b0, test_en = 1'b0;
  logic gclk;
  int unsigned checks = 0, failures = 0;
  int unsigned gedges = 0;

  bf_clock_gate dut (.*);

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic want;
      int unsigned e0;
      @(posedge clk);
      #2;
      en      = ($urandom_range(1) == 1);
      test_en = ($urandom_range(7) == 0);
      want    = en | test_en;
      // glitch check: toggle the enable while the clock is still high
      if (n % 3 == 0) begin
        logic g0;
        g0 = gclk;
        en = ~en;
        #1;
        checks++;
        if (gclk != g0) begin
          failures++;
          $display("FAIL gated clock changed while clk high, cycle %0d", n);
        end
        en = ~en;
      end
      #4;   // clock now low
      checks++;
      if (gclk != 1'b0) begin
        failures++;
        $display("FAIL gated clock high while clk low, cycle %0d", n);
      end
      e0 = gedges;
      @(posedge clk);
      #1;
      checks++;
      if ((gedges - e0) != (want ? 1 : 0)) begin
        failures++;
        $display("FAIL cycle %0d: enable %0b gave %0d gated edges", n, want, gedges - e0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

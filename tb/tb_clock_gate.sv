// tb_clock_gate: self-check of the latch-free clock gate.
//
// Runs a free clock, changes the enable only while the clock is low (on the
// falling edge, as the ALU does) following a random pattern, and checks that
// gclk follows clk exactly in enabled cycles and stays low in disabled ones:
// the number of gclk rising edges must equal the number of enabled cycles.
module tb_clock_gate;
  int checks = 0, failures = 0;

  logic clk = 1'b0, en = 1'b0, gclk;
  int   gedges = 0, enabled = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      if (en) enabled++;
      #2;  // clock low
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("gclk high while clk low"); end
      @(posedge clk);
      #1;  // clock high
      checks++;
      if (gclk !== en) begin failures++; $display("cycle %0d: gclk=%0d en=%0d", i, gclk, en); end
    end
    @(negedge clk);
    checks++;
    if (gedges != enabled) begin
      failures++;
      $display("gated edges %0d, enabled cycles %0d", gedges, enabled);
    end
    $display("gated edges %0d of 500 cycles", gedges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

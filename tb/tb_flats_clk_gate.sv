// tb_flats_clk_gate: self-checking test of the latch-based clock gate.
//
// The enable is changed shortly after each rising clock edge, as a flip-flop
// would change it. The check: the gated clock has a rising edge exactly on
// those clock edges whose preceding low half saw en = 1, it is never high
// while clk is low, and an enable glitch during the high half of clk never
// shortens or creates a gated pulse.
module tb_flats_clk_gate;

  logic clk = 1'b0, en = 1'b0, gclk;
  logic en_at_low;
  int   checks = 0, failures = 0, gedges = 0, exp_edges = 0;

  always #5ns clk = ~clk;

  flats_clk_gate dut (.clk, .en, .gclk);

  always @(posedge gclk) gedges++;

  initial begin
    repeat (2) @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      #1ns;
      checks++;
      if (gclk !== en_at_low) begin
        failures++; $display("FAIL cycle %0d: gclk=%b, enable seen in low phase=%b", n, gclk, en_at_low);
      end
      if (en_at_low) exp_edges++;
      // glitch the enable while clk is high; it must not reach gclk
      if (n % 7 == 3) begin en = ~en; #1ns; en = ~en; end
      #1ns en = 1'($urandom);
      #1ns;
      checks++;
      if (gclk !== en_at_low) begin failures++; $display("FAIL cycle %0d: gclk changed during high phase", n); end
    end
    checks++;
    if (gedges != exp_edges) begin failures++; $display("FAIL %0d gated edges, expected %0d", gedges, exp_edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // enable value present during the low half before each rising edge
  always @(negedge clk) begin
    #4ns en_at_low = en;
  end

  // gated clock must be low whenever clk is low
  always @(negedge clk) begin
    #2ns;
    checks++;
    if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high while clk low"); end
  end

  initial begin
    en_at_low = 1'b0;
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

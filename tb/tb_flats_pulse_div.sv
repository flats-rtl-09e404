// tb_flats_pulse_div: self-checking test of the on/off pulsing divider.
//
// Runs the divider with CLK_HZ = 3200 and BASE_HZ = 16, so one tick of
// 2*BASE_HZ is 100 clock cycles and a half period of BASE_HZ / div is
// div*100 cycles. For every divisor 0..15 (0 meaning 16) it measures the
// length of the first on phase, the following off phase and the next on
// phase in cycles, checks that a toggle pulse marks each phase change, and
// checks that phase drops to 0 as soon as run is removed.
module tb_flats_pulse_div;

  localparam int unsigned CLK_HZ  = 3200;
  localparam int unsigned BASE_HZ = 16;
  localparam int unsigned TICK    = CLK_HZ / (2 * BASE_HZ);

  logic       clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [3:0] div = '0;
  logic       phase, toggle;
  int         checks = 0, failures = 0;

  always #5ns clk = ~clk;

  flats_pulse_div #(.CLK_HZ(CLK_HZ), .BASE_HZ(BASE_HZ)) dut (
    .clk, .rst_n, .run, .div, .phase, .toggle);

  // length in cycles of the current phase level, starting at the current cycle
  task automatic measure(input logic level, output int len, output int toggles);
    len = 0; toggles = 0;
    while (phase == level && len < 5000) begin
      @(negedge clk); len++;
      if (toggle) toggles++;
    end
  endtask

  initial begin
    int d, len, tg;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (phase !== 1'b0 || toggle !== 1'b0) begin failures++; $display("FAIL idle output"); end
    for (int k = 0; k < 16; k++) begin
      div = 4'(k);
      d   = (k == 0) ? 16 : k;
      @(negedge clk) run = 1'b1;
      @(negedge clk);                      // phase rises at this edge
      checks += 2;
      if (phase !== 1'b1) begin failures++; $display("FAIL div %0d: phase not on at start", k); end
      if (toggle !== 1'b1) begin failures++; $display("FAIL div %0d: no toggle at start", k); end
      div = 4'($urandom);                  // divisor must be held from the start of the run
      measure(1'b1, len, tg);
      checks++;
      if (len != d * int'(TICK)) begin failures++; $display("FAIL div %0d: on for %0d cycles, expected %0d", k, len, d * TICK); end
      measure(1'b0, len, tg);
      checks += 2;
      if (len != d * int'(TICK)) begin failures++; $display("FAIL div %0d: off for %0d cycles, expected %0d", k, len, d * TICK); end
      if (tg != 1) begin failures++; $display("FAIL div %0d: %0d toggles at the off->on change", k, tg); end
      measure(1'b1, len, tg);
      checks++;
      if (len != d * int'(TICK)) begin failures++; $display("FAIL div %0d: second on for %0d cycles", k, len); end
      repeat (7) @(negedge clk);
      run = 1'b0;
      @(negedge clk);
      checks++;
      if (phase !== 1'b0) begin failures++; $display("FAIL div %0d: phase not cleared when run drops", k); end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flats_ctrl: self-checking test of the FLATS controller state machine.
//
// The sequencer, pulse divider and ICAP writer are replaced by small models
// in this testbench: the sequence becomes valid a random number of cycles
// after lfsr_start, the divider phase is flipped by the test (sometimes in
// the middle of an ICAP write), and the writer is busy for 12 cycles after
// each wr_start. Checked: lfsr_start follows start; the design is paused
// for the whole activation; every write carries the sequence's LUT number;
// no write starts while the writer is busy; after every phase change the
// last value written is INIT (phase on) or 0x0000 (phase off); after stop
// the LUT is left at 0x0000 before the design resumes.
module tb_flats_ctrl;
  import flats_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0;
  logic      lfsr_start, seq_valid = 1'b0, div_run, div_phase = 1'b0;
  seq_t      seq = '0;
  div_t      div_sel;
  logic      wr_start, wr_busy = 1'b0, design_en, active, lut_on;
  lut_sel_t  wr_lut;
  lut_init_t wr_init;
  int        checks = 0, failures = 0, writes = 0, busy_left = 0, lfsr_starts = 0;
  lut_init_t lut_value = '0;     // what the LUT holds after the writes so far

  always #5ns clk = ~clk;

  flats_ctrl dut (.clk, .rst_n, .start, .stop, .lfsr_start, .seq_valid, .seq,
                  .div_run, .div_sel, .div_phase, .wr_start, .wr_lut, .wr_init, .wr_busy,
                  .design_en, .active, .lut_on);

  seq_t next_seq;
  int   seq_delay = 0;

  // sequencer and ICAP writer models
  always @(posedge clk) begin
    if (lfsr_start && rst_n) begin
      lfsr_starts++;
      seq_valid <= 1'b0;
      seq_delay = 2 + ($urandom % 20);
    end else if (seq_delay > 0) begin
      seq_delay--;
      if (seq_delay == 0) begin seq <= next_seq; seq_valid <= 1'b1; end
    end
    if (wr_start && rst_n) begin
      writes++;
      checks += 2;
      if (busy_left != 0) begin failures++; $display("FAIL write started while busy"); end
      if (wr_lut !== next_seq.lut) begin failures++; $display("FAIL write to LUT %h, expected %h", wr_lut, next_seq.lut); end
      lut_value <= wr_init;
      busy_left = 12;
    end else if (busy_left > 0) busy_left--;
    wr_busy <= (busy_left > 0);
  end

  task automatic settle();   // wait until no write is pending or running
    repeat (40) @(negedge clk);
  endtask

  task automatic activation(input int phases);
    next_seq = seq_t'(24'($urandom));
    if (next_seq.init == '0) next_seq.init = 16'h0400;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    checks += 2;
    if (!lfsr_start) begin failures++; $display("FAIL no lfsr_start after start"); end
    @(negedge clk);
    if (design_en !== 1'b0) begin failures++; $display("FAIL design not paused"); end
    while (!div_run) @(negedge clk);
    checks++;
    if (div_sel !== next_seq.div) begin failures++; $display("FAIL divisor %h, expected %h", div_sel, next_seq.div); end
    for (int p = 0; p < phases; p++) begin
      div_phase = ~div_phase;
      if (p % 3 == 1) begin
        repeat (5) @(negedge clk);         // flip again in the middle of a write
        div_phase = ~div_phase;
        repeat (3) @(negedge clk);
        div_phase = ~div_phase;
      end
      settle();
      checks += 2;
      if (lut_value !== (div_phase ? next_seq.init : 16'h0000)) begin
        failures++; $display("FAIL LUT holds %h in phase %b", lut_value, div_phase);
      end
      if (design_en !== 1'b0 || active !== 1'b1) begin failures++; $display("FAIL design resumed during pulsing"); end
    end
    @(negedge clk) stop = 1'b1;
    @(negedge clk) stop = 1'b0;
    div_phase = 1'b0;                      // a divider drops its phase when run goes low
    while (active) begin
      checks++;
      if (design_en) begin failures++; $display("FAIL design resumed before LUT cleared"); end
      @(negedge clk);
    end
    checks += 2;
    if (lut_value !== 16'h0000) begin failures++; $display("FAIL LUT left at %h", lut_value); end
    if (design_en !== 1'b1) begin failures++; $display("FAIL design not resumed"); end
  endtask

  initial begin
    int w0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (design_en !== 1'b1 || active !== 1'b0) begin failures++; $display("FAIL not idle after reset"); end
    stop = 1'b1; @(negedge clk); stop = 1'b0;   // stop while idle: ignored
    for (int k = 0; k < 12; k++) activation(1 + k % 5);
    // stop while the sequence is being computed
    w0 = writes;
    @(negedge clk) start = 1'b1;
    @(negedge clk) begin start = 1'b0; stop = 1'b1; end
    @(negedge clk) stop = 1'b0;
    settle();
    checks += 2;
    if (writes != w0) begin failures++; $display("FAIL write after early stop"); end
    if (active || !design_en) begin failures++; $display("FAIL not idle after early stop"); end
    checks++;
    if (lfsr_starts != 13) begin failures++; $display("FAIL %0d sequence requests, expected 13", lfsr_starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

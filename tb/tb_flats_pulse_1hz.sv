// tb_flats_pulse_1hz: the 1 Hz on/off pulsing used for the infrared
// lock-in measurements, run on flats_top at its default parameters
// (100 MHz clock, 16 Hz base).
//
// A sequence with divisor field 0 (read as 16) pulses its LUT at
// 16 Hz / 16 = 1 Hz. The test finds such a sequence for LUTN, runs one full
// 1 s period and checks that the on and off phases last exactly 50,000,000
// cycles each, that the configuration memory holds the sequence's truth
// table in the on phase and 0x0000 in the off phase, and that the LUT does
// what its truth table and the paused design state say: here the state is
// chosen so that the truth table does not let LUTN oscillate, which keeps
// this long run quick (the oscillating case is covered at 16 Hz by
// tb_flats_top_full). Finally it stops and checks the LUT is cleared.
module tb_flats_pulse_1hz;
  import flats_pkg::*;

  localparam longint HALF = 100_000_000 / 2;     // cycles per 0.5 s

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0;
  logic [15:0]      ecid = 16'h5A0C, user_in = '0;
  logic             a = 0, b = 0, c = 0, d = 0, z;
  logic             icap_csib, icap_rdwrb, osc_phase, osc_toggle, icap_done;
  logic             seq_valid, lut_on, paused, active;
  logic [31:0]      icap_i;
  logic [2:0][15:0] cfg_init_o1;
  logic [15:0]      cfg_init_o2b;
  logic [3:0]       osc_probe;
  seq_t             seq;
  int               packets, bad_words;
  int               checks = 0, failures = 0;
  longint           cyc = 0, tog_cyc = 0, edges = 0;

  always #5ns clk = ~clk;

  flats_top dut (
    .clk, .rst_n, .ecid, .user_in, .start, .stop, .a, .b, .c, .d, .z,
    .icap_csib, .icap_rdwrb, .icap_i, .cfg_init_o1, .cfg_init_o2b,
    .seq, .seq_valid, .osc_phase, .osc_toggle, .icap_done, .lut_on, .paused, .active, .osc_probe);

  tb_icap_cfg_model u_cfg (
    .clk, .icap_csib, .icap_rdwrb, .icap_i, .cfg_init_o1, .cfg_init_o2b, .packets, .bad_words);

  always @(posedge clk) begin
    cyc++;
    if (osc_toggle) tog_cyc = cyc;
  end
  always @(osc_probe[3]) edges++;

  // LUTN sees I4,I3,I2 = 1, D, A&B&C
  function automatic bit osc(input logic [15:0] t, input logic [2:0] hi);
    return t[{hi, 1'b0}] && !t[{hi, 1'b1}];
  endfunction

  initial begin
    logic [23:0] s, found;
    logic        dd, ee;
    longint      t0;
    bit          ok = 1'b0;
    for (int h = 0; h < 256 && !ok; h++) begin
      s = {ecid, 8'(h)};
      for (int k = 0; k < 256 && !ok; k++) begin
        if (s[23:20] == 4'h3 && s[3:0] == 4'h0)
          for (int v = 0; v < 4 && !ok; v++)
            if (!osc(s[19:4], {1'b1, 2'(v)})) begin
              ok = 1'b1; user_in = {8'(h), 8'(k)}; found = s; {dd, ee} = 2'(v);
            end
        s = {s[22:0], s[23] ^ s[22] ^ s[21] ^ s[16]};
      end
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL no suitable user input"); end
    $display("user input %h -> sequence %h (LUTN, divisor 16)", user_in, found);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) {a, b, c, d} = {ee, ee, ee, dd};
    repeat (2) @(negedge clk);
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (2) @(negedge clk);
    while (!seq_valid) @(negedge clk);
    checks++;
    if (seq !== found) begin failures++; $display("FAIL seq %h expected %h", seq, found); end
    for (int p = 0; p < 2; p++) begin
      logic ph;
      while (!icap_done) @(negedge clk);
      @(negedge clk);
      ph = osc_phase;
      t0 = tog_cyc;
      edges = 0;
      checks++;
      if (cfg_init_o1[2] !== (ph ? found[19:4] : 16'h0)) begin failures++; $display("FAIL LUTN holds %h", cfg_init_o1[2]); end
      while (osc_phase == ph) @(negedge clk);
      @(negedge clk);
      checks += 2;
      if (tog_cyc - t0 != HALF) begin failures++; $display("FAIL phase %b lasted %0d cycles", ph, tog_cyc - t0); end
      if (edges != 0) begin failures++; $display("FAIL LUTN toggled %0d times", edges); end
    end
    @(negedge clk) stop = 1'b1;
    @(negedge clk) stop = 1'b0;
    while (active) @(negedge clk);
    checks += 2;
    if (cfg_init_o1 !== '0) begin failures++; $display("FAIL LUT left enabled"); end
    if (bad_words != 0) begin failures++; $display("FAIL %0d bad ICAP words", bad_words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (110_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

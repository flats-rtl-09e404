// tb_flats_top_full: one complete FLATS activation of flats_top at its
// default parameters (100 MHz system clock, 16 Hz base, 1667 ps LUT delay).
//
// The test finds, with its own reference LFSR, a user input whose sequence
// selects LUTA with divisor 1 (pulsing at 16 Hz), sets A,B,C so that the
// sequence's truth table lets LUTA oscillate, and runs: start, sequence,
// one on phase and one off phase of 1/32 s (3,125,000 cycles) each, stop.
// Checked: the sequence, the phase lengths, LUTA oscillating at about
// 300 MHz through the on phase (18.75 million edges, +/- 0.1 %), no
// oscillation in the off phase, four ICAP packets (on, off, on, clear at
// stop) decoded without error, the
// design paused during the activation and running after it.
module tb_flats_top_full;
  import flats_pkg::*;

  localparam longint HALF = 100_000_000 / 32;    // cycles per 1/32 s

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0;
  logic [15:0]      ecid = 16'hA32F, user_in = '0;
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
  always @(osc_probe[0]) edges++;

  function automatic bit osc(input logic [15:0] t, input logic [2:0] hi);
    return t[{hi, 1'b0}] && !t[{hi, 1'b1}];
  endfunction

  initial begin
    logic [23:0] s, found;
    logic [2:0]  abc;
    longint      t0, e_on, e_off;
    bit          ok = 1'b0;
    // search: LUT 0x1, divisor 1, and a design state that lets it oscillate
    for (int h = 0; h < 256 && !ok; h++) begin
      s = {ecid, 8'(h)};
      for (int k = 0; k < 256 && !ok; k++) begin
        if (s[23:20] == 4'h1 && s[3:0] == 4'h1)
          for (int v = 0; v < 8 && !ok; v++)
            if (osc(s[19:4], 3'(v))) begin ok = 1'b1; user_in = {8'(h), 8'(k)}; found = s; abc = 3'(v); end
        s = {s[22:0], s[23] ^ s[22] ^ s[21] ^ s[16]};
      end
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL no suitable user input"); end
    $display("user input %h -> sequence %h, C,B,A = %b", user_in, found, abc);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) {c, b, a, d} = {abc, 1'b1};
    repeat (2) @(negedge clk);
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (2) @(negedge clk);
    while (!seq_valid) @(negedge clk);
    checks += 2;
    if (seq !== found) begin failures++; $display("FAIL seq %h expected %h", seq, found); end
    if (!paused) begin failures++; $display("FAIL design not paused"); end
    d = 1'b0;                                    // must not reach the paused design
    // on phase
    while (!osc_phase) @(negedge clk);
    @(negedge clk);
    t0 = tog_cyc;
    edges = 0;
    while (osc_phase) @(negedge clk);
    @(negedge clk);
    e_on = edges;
    checks += 3;
    if (tog_cyc - t0 != HALF) begin failures++; $display("FAIL on phase %0d cycles", tog_cyc - t0); end
    if (e_on < 18_731_250 || e_on > 18_768_750) begin failures++; $display("FAIL %0d edges in the on phase", e_on); end
    t0 = tog_cyc;
    // off phase (measured after the clearing packet has landed)
    repeat (20) @(negedge clk);
    edges = 0;
    while (!osc_phase) @(negedge clk);
    @(negedge clk);
    e_off = edges;
    if (tog_cyc - t0 != HALF) begin failures++; $display("FAIL off phase %0d cycles", tog_cyc - t0); end
    if (e_off != 0) begin failures++; $display("FAIL %0d edges in the off phase", e_off); end
    checks++;
    if (z !== 1'b1 ^ (abc == 3'b111)) begin failures++; $display("FAIL Z changed while paused"); end
    @(negedge clk) stop = 1'b1;
    @(negedge clk) stop = 1'b0;
    while (active) @(negedge clk);
    repeat (2) @(negedge clk);
    checks += 3;
    if (cfg_init_o1 !== '0) begin failures++; $display("FAIL LUT left enabled"); end
    if (z !== (&abc)) begin failures++; $display("FAIL design does not run after stop"); end
    if (packets != 4 || bad_words != 0) begin failures++; $display("FAIL %0d packets, %0d bad words", packets, bad_words); end
    $display("on-phase edges %0d, off-phase edges %0d, packets %0d", e_on, e_off, packets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

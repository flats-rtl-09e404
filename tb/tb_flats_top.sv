// tb_flats_top: end-to-end test of the FLATS controller with the example
// design, at a reduced system clock (CLK_HZ = 3200, so one 1/32 s tick of
// the 16 Hz base is 100 cycles of the 10 ns test clock).
//
// The ICAP port feeds a model of the configuration memory, whose LUT truth
// tables go back into the design. For each activation the test picks a
// user input (by searching with its own reference LFSR) whose sequence
// selects a wanted LUT, then checks:
//  * seq equals the reference sequence;
//  * the design is paused: input changes do not reach Z until stop;
//  * every half period a packet is decoded, and the selected LUT holds the
//    sequence's truth table in the on phase and 0x0000 in the off phase,
//    each phase lasting div*100 cycles (16 Hz / div);
//  * the LUT oscillates in the on phase exactly when the paused design
//    state lets it (design-state dependence used for tamper detection),
//    and never in the off phase;
//  * after stop the LUT is 0x0000 and the design runs again.
// Mechanisms counted (each must occur): sequence computed, pause, ICAP
// packet, on-phase oscillation, on-phase blocked by design state, off
// phase, resume, and activations of LUTA, LUTN and the filler LUTB.
module tb_flats_top;
  import flats_pkg::*;

  localparam int unsigned CLK_HZ = 3200;
  localparam int unsigned TICK   = CLK_HZ / 32;

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
  int               n_seq = 0, n_pause = 0, n_osc = 0, n_blocked = 0, n_off = 0, n_resume = 0;
  int               n_lut [4] = '{0, 0, 0, 0};
  int               edges [4];

  always #5ns clk = ~clk;

  flats_top #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .rst_n, .ecid, .user_in, .start, .stop, .a, .b, .c, .d, .z,
    .icap_csib, .icap_rdwrb, .icap_i, .cfg_init_o1, .cfg_init_o2b,
    .seq, .seq_valid, .osc_phase, .osc_toggle, .icap_done, .lut_on, .paused, .active, .osc_probe);

  tb_icap_cfg_model u_cfg (
    .clk, .icap_csib, .icap_rdwrb, .icap_i, .cfg_init_o1, .cfg_init_o2b, .packets, .bad_words);

  // cycle number of the latest phase change of the pulsing waveform
  longint cyc = 0, tog_cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (osc_toggle) tog_cyc = cyc;
  end

  for (genvar g = 0; g < 4; g++) begin : g_cnt
    always @(osc_probe[g]) edges[g]++;
  end

  function automatic logic [23:0] ref_seq(input logic [15:0] e, input logic [15:0] u);
    logic [23:0] s;
    s = {e, u[15:8]};
    if (s == 24'd0) s = 24'd1;
    for (int k = 0; k < int'(u[7:0]); k++)
      s = {s[22:0], s[23] ^ s[22] ^ s[21] ^ s[16]};
    return s;
  endfunction

  // first user input from a random start whose sequence selects `lut`
  // with a divisor of at most `maxdiv` (0 counts as 16)
  function automatic logic [15:0] find_user(input logic [3:0] lut, input int maxdiv);
    logic [23:0] s;
    logic [7:0]  hi0;
    hi0 = 8'($urandom);
    for (int h = 0; h < 256; h++) begin
      s = {ecid, 8'(hi0 + h)};
      for (int k = 0; k < 256; k++) begin
        if (s[23:20] == lut && s[3:0] != 0 && int'(s[3:0]) <= maxdiv) return {8'(hi0 + h), 8'(k)};
        s = {s[22:0], s[23] ^ s[22] ^ s[21] ^ s[16]};
      end
    end
    return 16'h0;
  endfunction

  function automatic bit osc(input logic [15:0] t, input logic [2:0] hi);
    return t[{hi, 1'b0}] && !t[{hi, 1'b1}];
  endfunction

  // which LUT inputs I4..I2 the selected LUT sees in the paused design
  function automatic logic [2:0] lut_hi(input logic [3:0] lut, input logic ra, rb, rc, rd);
    unique case (lut)
      4'h1:    return {rc, rb, ra};
      4'h3:    return {1'b1, rd, ra & rb & rc};
      default: return 3'b110;                   // filler LUTB
    endcase
  endfunction

  task automatic activation(input logic [3:0] lut, input int phases);
    seq_t        s;
    logic        ra, rb, rc, rd, zq;
    int          dv, len, e;
    bit          expect_osc;
    user_in = find_user(lut, 4);
    s = seq_t'(ref_seq(ecid, user_in));
    dv = int'(s.div);
    // run the design with random inputs, then start
    @(negedge clk) {a, b, c, d} = 4'($urandom);
    @(negedge clk);
    {ra, rb, rc, rd} = {a, b, c, d};
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    zq = z;
    checks++;
    if (zq !== ((ra & rb & rc) ^ rd)) begin failures++; $display("FAIL z before start"); end
    @(negedge clk);                          // sequencer restarts one cycle after start
    @(negedge clk);
    while (!seq_valid) begin
      @(negedge clk);
      {a, b, c, d} = 4'($urandom);           // paused: must not reach the design
    end
    checks += 2;
    n_seq++;
    if (seq !== s) begin failures++; $display("FAIL seq %h expected %h", seq, s); end
    if (!paused) begin failures++; $display("FAIL design not paused"); end else n_pause++;
    expect_osc = osc(s.init, lut_hi(lut, ra, rb, rc, rd));
    n_lut[lut]++;
    for (int p = 0; p < phases; p++) begin
      logic   ph;
      longint t0;
      // wait for the packet of this phase to land in configuration memory
      while (!icap_done) @(negedge clk);
      @(negedge clk);
      ph = osc_phase;
      t0 = tog_cyc;
      checks += 2;
      if (cfg_init_o1[lut - 1] !== (ph ? s.init : 16'h0000)) begin
        failures++; $display("FAIL LUT %0d holds %h in phase %b", lut, cfg_init_o1[lut - 1], ph);
      end
      if (z !== zq) begin failures++; $display("FAIL Z changed while paused"); end
      // count oscillator edges through most of the phase, and its length
      #50ns;
      foreach (edges[k]) edges[k] = 0;
      while (osc_phase == ph) begin
        @(negedge clk);
        if (cyc - t0 == longint'(dv * int'(TICK) - 3)) e = edges[lut == 4'h1 ? 0 : lut == 4'h3 ? 3 : 1];
        if (cyc % 7 == 0) {a, b, c, d} = 4'($urandom);
      end
      @(negedge clk);                        // toggle pulse is recorded one edge later
      len = int'(tog_cyc - t0);
      checks += 2;
      if (len != dv * int'(TICK)) begin failures++; $display("FAIL phase lasted %0d cycles, expected %0d", len, dv * TICK); end
      if (ph && expect_osc) begin
        if (e < 100) begin failures++; $display("FAIL LUT %0d did not oscillate (%0d edges)", lut, e); end
        else n_osc++;
      end else begin
        if (e != 0) begin failures++; $display("FAIL LUT %0d oscillates (%0d edges, phase %b)", lut, e, ph); end
        else if (ph) n_blocked++;
        else n_off++;
      end
    end
    @(negedge clk) stop = 1'b1;
    @(negedge clk) stop = 1'b0;
    while (active) @(negedge clk);
    @(negedge clk) {a, b, c, d} = 4'b1110;
    repeat (2) @(negedge clk);
    checks += 3;
    if (cfg_init_o1 !== '0) begin failures++; $display("FAIL LUT left enabled after stop"); end
    if (paused) begin failures++; $display("FAIL design still paused"); end
    if (z !== 1'b1) begin failures++; $display("FAIL design does not run after stop"); end else n_resume++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 24; k++) activation(k % 3 == 0 ? 4'h1 : k % 3 == 1 ? 4'h3 : 4'h2, 3);
    // the worked example's design state for LUTA: A,B,C = 1,0,1
    checks += 2;
    if (packets == 0 || bad_words != 0) begin failures++; $display("FAIL %0d packets, %0d bad words", packets, bad_words); end
    if (n_seq == 0 || n_pause == 0 || n_osc == 0 || n_blocked == 0 || n_off == 0 || n_resume == 0 ||
        n_lut[1] == 0 || n_lut[2] == 0 || n_lut[3] == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("mechanisms: sequences=%0d pauses=%0d icap_packets=%0d oscillating_on=%0d blocked_on=%0d off=%0d resumes=%0d LUTA=%0d LUTB=%0d LUTN=%0d",
             n_seq, n_pause, packets, n_osc, n_blocked, n_off, n_resume, n_lut[1], n_lut[2], n_lut[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

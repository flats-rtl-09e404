// tb_flats_example_design: self-checking test of the example design after
// FLATS insertion, Z = (A & B & C) ^ D, with its three LUT oscillators.
//
// Checked:
//  * Z equals (A & B & C) ^ D of the inputs registered on the last gated
//    clock edge, whatever O1 truth tables are loaded (the oscillators never
//    disturb the design logic);
//  * with gclk stopped, input changes do not reach Z (state preserved);
//  * LUTA with table 0x0400 oscillates only while the registered A,B,C are
//    1,0,1 and rests at 0 otherwise;
//  * LUTN (I2 = LUTA.O2, I3 = D, I4 = 1) and the filler LUTB oscillate
//    exactly when their table inverts I1 at their current inputs.
// Oscillation is counted as edges on osc_probe over 200 ns (about 120 at
// 300 MHz).
module tb_flats_example_design;

  logic            gclk = 1'b0, rst_n = 1'b0, a = 0, b = 0, c = 0, d = 0;
  logic [2:0][15:0] cfg_init_o1 = '0;
  logic [15:0]     cfg_init_o2b = '0;
  logic            z;
  logic [3:0]      osc_probe;
  int              checks = 0, failures = 0;
  int              edges [4];
  bit              gate = 1'b1;

  always #5ns if (gate || gclk) gclk = ~gclk;

  flats_example_design dut (.gclk, .rst_n, .a, .b, .c, .d, .cfg_init_o1, .cfg_init_o2b, .z, .osc_probe);

  for (genvar g = 0; g < 4; g++) begin : g_cnt
    always @(osc_probe[g]) edges[g]++;
  end

  task automatic window(output int n [4]);
    #20ns;
    foreach (edges[k]) edges[k] = 0;
    #200ns;
    n = edges;
  endtask

  // does a LUT with O1 -> I1 oscillate, given table t and inputs I4..I2?
  function automatic bit osc(input logic [15:0] t, input logic [2:0] hi);
    return t[{hi, 1'b0}] && !t[{hi, 1'b1}];
  endfunction

  initial begin
    int n [4];
    logic ra, rb, rc, rd;
    repeat (2) @(negedge gclk);
    rst_n = 1'b1;
    // design logic with random truth tables loaded into the oscillators
    for (int k = 0; k < 100; k++) begin
      @(negedge gclk);
      {a, b, c, d} = 4'($urandom);
      cfg_init_o1 = 48'({$urandom, $urandom});
      cfg_init_o2b = 16'($urandom);
      {ra, rb, rc, rd} = {a, b, c, d};
      @(posedge gclk); #4ns;
      checks++;
      if (z !== ((ra & rb & rc) ^ rd)) begin failures++; $display("FAIL z=%b for A,B,C,D=%b%b%b%b", z, ra, rb, rc, rd); end
    end
    cfg_init_o1 = '0; cfg_init_o2b = '0;
    // pause: inputs change, Z and the registered state do not
    @(negedge gclk) gate = 1'b0;
    for (int k = 0; k < 20; k++) begin
      {a, b, c, d} = 4'($urandom);
      #10ns;
      checks++;
      if (z !== ((ra & rb & rc) ^ rd)) begin failures++; $display("FAIL Z changed while paused"); end
    end
    gate = 1'b1;
    // LUTA with the worked-example table, all eight values of A,B,C
    cfg_init_o1[0] = 16'h0400;
    for (int h = 0; h < 8; h++) begin
      @(negedge gclk) {c, b, a} = 3'(h);
      @(negedge gclk) gate = 1'b0;          // pause, as the controller does
      window(n);
      checks += 2;
      if (h == 3'b101 && (n[0] < 115 || n[0] > 125)) begin failures++; $display("FAIL LUTA %0d edges at C,B,A=101", n[0]); end
      if (h != 3'b101 && (n[0] != 0 || osc_probe[0] !== 1'b0)) begin failures++; $display("FAIL LUTA active at C,B,A=%b", h); end
      if (n[1] != 0 || n[2] != 0 || n[3] != 0) begin failures++; $display("FAIL idle LUT oscillates"); end
      gate = 1'b1;
    end
    // random tables in all three LUTs
    for (int k = 0; k < 30; k++) begin
      logic [15:0] ta, tb, tn;
      bit ea, eb, en;
      ta = 16'($urandom); tb = 16'($urandom); tn = 16'($urandom);
      @(negedge gclk) begin {a, b, c, d} = 4'($urandom); cfg_init_o1 = '{tn, tb, ta}; end
      @(negedge gclk) gate = 1'b0;
      window(n);
      ea = osc(ta, {c, b, a});
      en = osc(tn, {1'b1, d, a & b & c});
      // filler LUTB: I4,I3 = 1, I2 = its own O2, whose table is 0
      eb = osc(tb, 3'b110);
      checks += 3;
      if (ea != (n[0] > 100)) begin failures++; $display("FAIL LUTA table %h: %0d edges", ta, n[0]); end
      if (eb != (n[1] > 100)) begin failures++; $display("FAIL LUTB table %h: %0d edges", tb, n[1]); end
      if (en != (n[3] > 100)) begin failures++; $display("FAIL LUTN table %h: %0d edges", tn, n[3]); end
      gate = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

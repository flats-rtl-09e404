// tb_flats_lut42: self-checking test of the LUT model and of the partial-LUT
// oscillator it forms when O1 is wired back to I1.
//
// Open LUT: for random inputs and truth tables, both outputs keep their old
// value 1.6 ns after a change and show table[{I4..I1}] at 1.7 ns (the model
// delay is 1667 ps). Looped LUT (O1 -> I1): with the worked-example table
// 0x0400 it must oscillate only for I4,I3,I2 = 1,0,1, at about 300 MHz
// (600 +/- 2 edges in 1 us), and rest at 0 for every other input; with a
// random table it oscillates exactly when the table inverts I1 at the
// current I4..I2, and otherwise settles to the table value.
module tb_flats_lut42;

  logic [3:0]  i_open = '0;
  logic [15:0] t1 = '0, t2 = '0, lt = '0;
  logic        o1, o2, lo1, lo2;
  logic [2:0]  hi = '0;
  int          checks = 0, failures = 0, edges = 0;

  flats_lut42 u_open (.i(i_open), .init_o1(t1), .init_o2(t2), .o1, .o2);
  flats_lut42 u_loop (.i({hi, lo1}), .init_o1(lt), .init_o2(16'h0), .o1(lo1), .o2(lo2));

  always @(lo1) edges++;

  task automatic count_edges(output int n);
    #20ns;
    edges = 0;
    #1us;
    n = edges;
  endtask

  initial begin
    int n;
    logic osc, rest;
    #10ns;
    for (int k = 0; k < 200; k++) begin
      logic o1_old, o2_old;
      o1_old = o1; o2_old = o2;
      i_open = 4'($urandom); t1 = 16'($urandom); t2 = 16'($urandom);
      #1.6ns;
      checks++;
      if (o1 !== o1_old || o2 !== o2_old) begin failures++; $display("FAIL output changed before the LUT delay"); end
      #0.1ns;
      checks++;
      if (o1 !== t1[i_open] || o2 !== t2[i_open]) begin
        failures++; $display("FAIL i=%b o1=%b o2=%b", i_open, o1, o2);
      end
      #5ns;
    end
    // worked example: INIT 0x0400, inputs I4,I3,I2 = C,B,A
    lt = 16'h0400;
    for (int h = 0; h < 8; h++) begin
      hi = 3'(h);
      count_edges(n);
      checks++;
      if (h == 3'b101) begin
        if (n < 598 || n > 602) begin failures++; $display("FAIL %0d edges in 1 us for C,B,A=101", n); end
      end else if (n != 0 || lo1 !== 1'b0) begin
        failures++; $display("FAIL oscillates or not 0 for C,B,A=%b (%0d edges)", hi, n);
      end
    end
    for (int k = 0; k < 40; k++) begin
      lt = 16'($urandom); hi = 3'($urandom);
      osc  = lt[{hi, 1'b0}] == 1'b1 && lt[{hi, 1'b1}] == 1'b0;
      rest = lt[{hi, 1'b0}] == lt[{hi, 1'b1}];
      count_edges(n);
      checks++;
      if (osc && (n < 598 || n > 602)) begin failures++; $display("FAIL table %h hi %b: %0d edges", lt, hi, n); end
      if (!osc && n != 0) begin failures++; $display("FAIL table %h hi %b oscillates", lt, hi); end
      if (rest) begin
        checks++;
        if (lo1 !== lt[{hi, 1'b0}]) begin failures++; $display("FAIL table %h hi %b rests at %b", lt, hi, lo1); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

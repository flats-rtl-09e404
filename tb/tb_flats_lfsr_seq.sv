// tb_flats_lfsr_seq: self-checking test of the seed + LFSR sequencer.
//
// For random chip identifiers and user inputs (plus the all-zero seed and
// the extreme run lengths 0 and 255) it pulses start, counts the cycles
// until seq_valid and compares the frozen sequence with a reference LFSR
// written here independently (x^24+x^23+x^22+x^17+1, seed
// {ecid, user[15:8]}, user[7:0] steps). Latency must be user[7:0]+1 cycles.
// 100 MHz clock.
module tb_flats_lfsr_seq;
  import flats_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] ecid, user_in;
  seq_t        seq;
  logic        seq_valid;
  int          checks = 0, failures = 0;

  always #5ns clk = ~clk;

  flats_lfsr_seq dut (.clk, .rst_n, .start, .ecid, .user_in, .seq, .seq_valid);

  function automatic logic [23:0] ref_seq(input logic [15:0] e, input logic [15:0] u);
    logic [23:0] s;
    s = {e, u[15:8]};
    if (s == 24'd0) s = 24'd1;
    for (int k = 0; k < int'(u[7:0]); k++)
      s = {s[22:0], s[23] ^ s[22] ^ s[21] ^ s[16]};
    return s;
  endfunction

  task automatic run_one(input logic [15:0] e, input logic [15:0] u);
    int cyc;
    ecid = e; user_in = u;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;   // cycles after the edge that sampled start
    if (seq_valid) begin failures++; $display("FAIL valid not cleared by start"); end
    while (!seq_valid && cyc < 400) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != int'(u[7:0]) + 1) begin
      failures++; $display("FAIL latency %0d expected %0d (user %h)", cyc, int'(u[7:0]) + 1, u);
    end
    if (seq != ref_seq(e, u)) begin
      failures++; $display("FAIL seq %h expected %h (ecid %h user %h)", seq, ref_seq(e, u), e, u);
    end
    // sequence stays frozen
    repeat (3) @(negedge clk);
    checks++;
    if (seq != ref_seq(e, u) || !seq_valid) begin failures++; $display("FAIL sequence not held"); end
  endtask

  initial begin
    ecid = 16'hA32F; user_in = 16'h92CD;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_one(16'hA32F, 16'h92CD);          // identifier and user input of the worked example
    run_one(16'h0000, 16'h0005);          // zero seed guard
    run_one(16'h1234, 16'h5600);          // zero steps: seed itself
    run_one(16'hFFFF, 16'hFFFF);          // 255 steps
    for (int n = 0; n < 40; n++) run_one(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flats_icap_writer: self-checking test of the ICAP packet generator.
//
// For random LUT numbers and truth tables it pulses start and records every
// word driven while icap_csib is low. The packet must be exactly the 12
// expected words, in order, in 12 consecutive cycles starting the cycle
// after start, always as writes, followed by a one-cycle done pulse. A start
// pulse in the middle of a packet must be ignored. The expected words are
// written out here from the packet definition, not taken from the package.
module tb_flats_icap_writer;

  localparam logic [31:0] FAR_BASE = 32'h0040_0100;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0]  lut_sel = '0;
  logic [15:0] init = '0;
  logic        busy, done, icap_csib, icap_rdwrb;
  logic [31:0] icap_i;
  int          checks = 0, failures = 0;

  always #5ns clk = ~clk;

  flats_icap_writer #(.FAR_BASE(FAR_BASE)) dut (
    .clk, .rst_n, .start, .lut_sel, .init, .busy, .done, .icap_csib, .icap_rdwrb, .icap_i);

  task automatic one_packet(input logic [3:0] l, input logic [15:0] v, input bit poke);
    logic [31:0] exp [12];
    int n, cyc;
    exp = '{32'hFFFFFFFF, 32'hAA995566, 32'h20000000, 32'h30008001, 32'h00000001,
            32'h30002001, FAR_BASE + {28'h0, l}, 32'h30004001, {16'h0, v},
            32'h30008001, 32'h0000000D, 32'h20000000};
    @(negedge clk) begin lut_sel = l; init = v; start = 1'b1; end
    @(negedge clk) begin start = 1'b0; lut_sel = ~l; init = ~v; end   // inputs only sampled at start
    n = 0; cyc = 0;
    while (cyc < 20) begin
      if (!icap_csib) begin
        checks += 2;
        if (n < 12 && icap_i !== exp[n]) begin
          failures++; $display("FAIL word %0d = %h expected %h", n, icap_i, exp[n]);
        end
        if (icap_rdwrb !== 1'b0 || busy !== 1'b1) begin failures++; $display("FAIL not a write"); end
        n++;
      end else if (n > 0) break;
      if (poke && cyc == 4) start = 1'b1;
      @(negedge clk); cyc++;
      start = 1'b0;
    end
    checks += 3;
    if (n != 12) begin failures++; $display("FAIL %0d words, expected 12", n); end
    if (cyc != 12) begin failures++; $display("FAIL packet ended after %0d cycles, expected 12", cyc); end
    if (done !== 1'b1) begin failures++; $display("FAIL no done pulse"); end
    @(negedge clk);
    checks++;
    if (done !== 1'b0 || busy !== 1'b0 || icap_csib !== 1'b1) begin failures++; $display("FAIL not idle after packet"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (icap_csib !== 1'b1 || busy !== 1'b0) begin failures++; $display("FAIL ICAP selected after reset"); end
    one_packet(4'h1, 16'h0400, 1'b0);   // LUT and truth table of the worked example
    one_packet(4'h1, 16'h0000, 1'b1);
    for (int k = 0; k < 30; k++) one_packet(4'($urandom), 16'($urandom), k[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

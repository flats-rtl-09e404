// flats_clk_gate: glitch-free clock gate that lets the FLATS controller
// pause the protected design while keeping its state.
//
// The enable is captured by a latch that is transparent while clk is low,
// and the gated clock is clk AND the latched enable, so gclk never shows a
// shortened pulse. Pausing the design through its clock follows FLATS; the
// latch-and-AND form is the usual integrated clock gate and is this design's
// choice (on an FPGA a global-buffer clock enable would replace it). The
// latch reported by lint tools is this intended enable latch.
//
// Timing: en is registered logic launched on the rising edge of clk; it
// passes the latch in the low half of the cycle and so controls the next
// rising edge of gclk.
module flats_clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule

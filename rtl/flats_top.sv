// flats_top: FLATS run-time watermark controller wrapped around the worked
// example design Z = (A & B & C) ^ D.
//
// FLATS turns LUTs of a design into gated ring oscillators (one LUT output
// fed back to one LUT input) and switches one of them on and off at a
// precisely known low frequency, so that an infrared camera with lock-in
// analysis can locate it on the die. Which LUT, which truth table (and so
// which design state lets it oscillate) and which frequency are packed into
// a 24-bit "sequence" produced by an LFSR seeded from the chip identifier
// and a user input. The blocks here:
//   flats_lfsr_seq       seed {ecid, user_in[15:8]}, run user_in[7:0] steps
//   flats_ctrl           start/pause/pulse/stop state machine
//   flats_pulse_div      on/off waveform at BASE_HZ / divisor
//   flats_icap_writer    ICAP packet loading the LUT's O1 truth table
//   flats_clk_gate       pauses the protected design
//   flats_example_design the three LUTs of the example (LUT models)
// The ICAP primitive and configuration memory belong to the FPGA: the ICAP
// write port is an output here and the LUT truth tables it sets come back
// in on cfg_init_o1 / cfg_init_o2b.
//
// Operation: pulse start with ecid/user_in valid; the design is paused,
// seq_valid rises after user_in[7:0]+1 cycles, then every half period of
// the pulsing waveform (osc_phase) a 12-word ICAP packet writes either the
// sequence's INIT or 0x0000 into LUT seq.lut. Pulse stop to end; the LUT is
// cleared and the design resumes. CLK_HZ (system clock) is this design's
// assumption; BASE_HZ = 16 follows the worked example.
module flats_top
  import flats_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned BASE_HZ   = 16,
  parameter int unsigned LUT_DELAY_PS = 1667
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      ecid,
  input  logic [15:0]      user_in,
  input  logic             start,
  input  logic             stop,
  // protected design
  input  logic             a,
  input  logic             b,
  input  logic             c,
  input  logic             d,
  output logic             z,
  // ICAP write port and configuration memory read-back
  output logic             icap_csib,
  output logic             icap_rdwrb,
  output logic [31:0]      icap_i,
  input  logic [2:0][15:0] cfg_init_o1,
  input  logic [15:0]      cfg_init_o2b,
  // status
  output seq_t             seq,
  output logic             seq_valid,
  output logic             osc_phase,
  output logic             osc_toggle,
  output logic             icap_done,
  output logic             lut_on,
  output logic             paused,
  output logic             active,
  output logic [3:0]       osc_probe
);

  logic      lfsr_start, div_run, wr_start, wr_busy;
  logic      design_en, gclk;
  div_t      div_sel;
  lut_sel_t  wr_lut;
  lut_init_t wr_init;

  flats_lfsr_seq u_seq (
    .clk, .rst_n, .start(lfsr_start), .ecid, .user_in, .seq, .seq_valid);

  flats_ctrl u_ctrl (
    .clk, .rst_n, .start, .stop,
    .lfsr_start, .seq_valid, .seq,
    .div_run, .div_sel, .div_phase(osc_phase),
    .wr_start, .wr_lut, .wr_init, .wr_busy,
    .design_en, .active, .lut_on);

  flats_pulse_div #(.CLK_HZ(CLK_HZ), .BASE_HZ(BASE_HZ)) u_div (
    .clk, .rst_n, .run(div_run), .div(div_sel), .phase(osc_phase), .toggle(osc_toggle));

  flats_icap_writer u_icap (
    .clk, .rst_n, .start(wr_start), .lut_sel(wr_lut), .init(wr_init),
    .busy(wr_busy), .done(icap_done), .icap_csib, .icap_rdwrb, .icap_i);

  flats_clk_gate u_cg (.clk, .en(design_en), .gclk);

  flats_example_design #(.LUT_DELAY_PS(LUT_DELAY_PS)) u_dut (
    .gclk, .rst_n, .a, .b, .c, .d, .cfg_init_o1, .cfg_init_o2b, .z, .osc_probe);

  assign paused = ~design_en;

endmodule

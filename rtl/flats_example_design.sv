// flats_example_design: the small protected design of the FLATS worked
// example, Z = (A & B & C) ^ D, after FLATS insertion.
//
// Three LUTs, connected as in that example:
//   LUTA (number 0x1): I2..I4 = A, B, C;  O2 = I2 & I3 & I4 (design logic);
//                      O1 -> I1 feedback (oscillator tied to A, B, C).
//   LUTB (0x2, filler): unused LUT filled by FLATS; O1 -> I1 and O2 -> I2,
//                      I3 = I4 = 1.
//   LUTN (0x3):        I2 = LUTA.O2, I3 = D, I4 = 1; O2 = I2 ^ I3 = Z;
//                      O1 -> I1 feedback.
// The O2 truth tables of LUTA and LUTN are the design's own (0xC000 and
// 0x3C3C). All O1 tables, and the O2 table of the filler LUTB, come from
// configuration memory (inputs cfg_init_o1 / cfg_init_o2b) and are
// rewritten through ICAP by the FLATS controller; they are 0x0000 while a
// LUT is idle. The design's state is a register stage on A..D clocked by
// the gated clock gclk, so pausing gclk freezes the LUT inputs and with
// them whether the selected oscillator can run. That register stage, and
// the LUT numbers 0x2 and 0x3, are this design's choices.
//
// osc_probe = {LUTN.O1, LUTB.O2, LUTB.O1, LUTA.O1} exposes the oscillator
// nodes (the document routed one to a pad to measure its frequency). The
// O -> I loops are intended combinational loops, made of LUT models with
// delay; lint tools report them as such.
module flats_example_design #(
  parameter int unsigned LUT_DELAY_PS = 1667
) (
  input  logic             gclk,
  input  logic             rst_n,
  input  logic             a,
  input  logic             b,
  input  logic             c,
  input  logic             d,
  input  logic [2:0][15:0] cfg_init_o1,   // [0] LUTA, [1] LUTB, [2] LUTN
  input  logic [15:0]      cfg_init_o2b,  // LUTB O2
  output logic             z,
  output logic [3:0]       osc_probe
);

  localparam logic [15:0] INIT_AND3 = 16'hC000;  // I2 & I3 & I4
  localparam logic [15:0] INIT_XOR  = 16'h3C3C;  // I2 ^ I3

  logic a_q, b_q, c_q, d_q;

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) {a_q, b_q, c_q, d_q} <= '0;
    else        {a_q, b_q, c_q, d_q} <= {a, b, c, d};
  end

  logic luta_o1, luta_o2, lutb_o1, lutb_o2, lutn_o1, lutn_o2;

  flats_lut42 #(.DELAY_PS(LUT_DELAY_PS)) u_luta (
    .i({c_q, b_q, a_q, luta_o1}), .init_o1(cfg_init_o1[0]), .init_o2(INIT_AND3),
    .o1(luta_o1), .o2(luta_o2));

  flats_lut42 #(.DELAY_PS(LUT_DELAY_PS)) u_lutb (
    .i({1'b1, 1'b1, lutb_o2, lutb_o1}), .init_o1(cfg_init_o1[1]), .init_o2(cfg_init_o2b),
    .o1(lutb_o1), .o2(lutb_o2));

  flats_lut42 #(.DELAY_PS(LUT_DELAY_PS)) u_lutn (
    .i({1'b1, d_q, luta_o2, lutn_o1}), .init_o1(cfg_init_o1[2]), .init_o2(INIT_XOR),
    .o1(lutn_o1), .o2(lutn_o2));

  assign z         = lutn_o2;
  assign osc_probe = {lutn_o1, lutb_o2, lutb_o1, luta_o1};

endmodule

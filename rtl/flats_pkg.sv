// flats_pkg: types and constants shared by the FLATS controller blocks.
//
// A FLATS "sequence" is the 24-bit state of the seeded LFSR. Its three
// fields, read most-significant first, select the LUT oscillator, give the
// truth table loaded into that LUT's O1 output, and give the divisor of the
// on/off pulsing frequency. The field layout follows the worked example
// 0x104008 = LUT 0x1, INIT 0x0400, divisor 0x8. The ICAP packet words use the
// 7-series Type-1 header layout; the packet content itself (one INIT word
// per write, frame address = base + LUT number) is this design's own
// simplification, not a real frame image.
package flats_pkg;

  localparam int unsigned SEQ_W  = 24;
  localparam int unsigned LUT_W  = 4;   // LUT number field
  localparam int unsigned INIT_W = 16;  // 4-input LUT truth table
  localparam int unsigned DIV_W  = 4;   // pulsing divisor field

  typedef logic [LUT_W-1:0]  lut_sel_t;
  typedef logic [INIT_W-1:0] lut_init_t;
  typedef logic [DIV_W-1:0]  div_t;

  typedef struct packed {
    lut_sel_t  lut;   // [23:20]
    lut_init_t init;  // [19:4]
    div_t      div;   // [3:0]
  } seq_t;

  // ICAP configuration packet words (Type-1 headers: 001 | op | reg | count)
  localparam logic [31:0] ICAP_DUMMY   = 32'hFFFF_FFFF;
  localparam logic [31:0] ICAP_SYNC    = 32'hAA99_5566;
  localparam logic [31:0] ICAP_NOOP    = 32'h2000_0000;
  localparam logic [31:0] ICAP_WR_CMD  = 32'h3000_8001;  // write CMD, 1 word
  localparam logic [31:0] ICAP_WR_FAR  = 32'h3000_2001;  // write FAR, 1 word
  localparam logic [31:0] ICAP_WR_FDRI = 32'h3000_4001;  // write FDRI, 1 word
  localparam logic [31:0] ICAP_CMD_WCFG   = 32'h0000_0001;
  localparam logic [31:0] ICAP_CMD_DESYNC = 32'h0000_000D;
  localparam int unsigned ICAP_PKT_WORDS  = 12;

  // LUT numbers of the example design (LUTA is 0x1 in the worked example)
  localparam lut_sel_t LUT_A = 4'h1;
  localparam lut_sel_t LUT_B = 4'h2;
  localparam lut_sel_t LUT_N = 4'h3;

endpackage

// flats_icap_writer: writes one LUT's O1 truth table through the FPGA's
// internal configuration access port (ICAP).
//
// On start it latches the LUT number and INIT value and then drives one
// 32-bit word per clock into the ICAP write port (csib = 0, rdwrb = 0):
//   dummy, sync, noop, CMD<-WCFG, FAR<-FAR_BASE+lut, FDRI<-{16'h0, init},
//   CMD<-DESYNC, noop
// (12 words, see flats_pkg). Driving ICAP from the controller to load LUT
// INIT values at run time is the FLATS scheme; the packet is this design's
// own minimal form. A real 7-series write sends whole configuration frames
// (read-modify-write of the frame holding the LUT) and bit-swaps each byte;
// the LUT-to-frame mapping is device data that is not modelled here.
//
// Timing: start is sampled on a rising edge; busy is high from the next
// cycle for exactly 12 cycles, during which the 12 words appear on icap_i;
// done pulses for one cycle after the last word. start while busy is
// ignored.
module flats_icap_writer
  import flats_pkg::*;
#(
  parameter logic [31:0] FAR_BASE = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  lut_sel_t    lut_sel,
  input  lut_init_t   init,
  output logic        busy,
  output logic        done,
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i
);

  logic [3:0]  idx_q;
  logic        busy_q, done_q;
  lut_sel_t    lut_q;
  lut_init_t   init_q;
  logic [31:0] word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
      lut_q  <= '0;
      init_q <= '0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start) begin
          busy_q <= 1'b1;
          idx_q  <= '0;
          lut_q  <= lut_sel;
          init_q <= init;
        end
      end else if (idx_q == 4'(ICAP_PKT_WORDS - 1)) begin
        busy_q <= 1'b0;
        done_q <= 1'b1;
      end else begin
        idx_q <= idx_q + 4'd1;
      end
    end
  end

  always_comb begin
    unique case (idx_q)
      4'd0:    word = ICAP_DUMMY;
      4'd1:    word = ICAP_SYNC;
      4'd2:    word = ICAP_NOOP;
      4'd3:    word = ICAP_WR_CMD;
      4'd4:    word = ICAP_CMD_WCFG;
      4'd5:    word = ICAP_WR_FAR;
      4'd6:    word = FAR_BASE + 32'(lut_q);
      4'd7:    word = ICAP_WR_FDRI;
      4'd8:    word = {16'h0000, init_q};
      4'd9:    word = ICAP_WR_CMD;
      4'd10:   word = ICAP_CMD_DESYNC;
      default: word = ICAP_NOOP;
    endcase
  end

  assign busy       = busy_q;
  assign done       = done_q;
  assign icap_csib  = ~busy_q;
  assign icap_rdwrb = 1'b0;
  assign icap_i     = busy_q ? word : 32'h0;

endmodule

// tb_icap_cfg_model: testbench model of the FPGA's ICAP port and of the
// configuration memory cells holding the example design's LUT truth tables.
//
// It watches the ICAP write port (csib low, rdwrb low) and decodes Type-1
// packets after a sync word: a write to FAR (register 1) sets the frame
// address, a write to FDRI (register 2) stores the low 16 bits of the data
// word as the O1 truth table of LUT (frame address - FAR_BASE) when that is
// LUT 1, 2 or 3 of the example, and a DESYNC command ends the packet. It
// counts packets and rejected words so a testbench can check the traffic.
// All truth tables start at 0x0000, the state of an idle FLATS LUT.
module tb_icap_cfg_model #(
  parameter logic [31:0] FAR_BASE = 32'h0
) (
  input  logic             clk,
  input  logic             icap_csib,
  input  logic             icap_rdwrb,
  input  logic [31:0]      icap_i,
  output logic [2:0][15:0] cfg_init_o1,
  output logic [15:0]      cfg_init_o2b,
  output int               packets,
  output int               bad_words
);

  logic        synced = 1'b0;
  logic [4:0]  reg_q = '0;
  int          words_left = 0;
  logic [31:0] far_q = '0;

  initial begin
    cfg_init_o1  = '0;
    cfg_init_o2b = '0;
    packets      = 0;
    bad_words    = 0;
  end

  always @(posedge clk) begin
    if (!icap_csib && !icap_rdwrb) begin
      if (!synced) begin
        if (icap_i == 32'hAA99_5566) synced <= 1'b1;
      end else if (words_left > 0) begin
        words_left <= words_left - 1;
        unique case (reg_q)
          5'd1: far_q <= icap_i;
          5'd2: begin
            if (far_q - FAR_BASE >= 1 && far_q - FAR_BASE <= 3)
              cfg_init_o1[far_q - FAR_BASE - 1] <= icap_i[15:0];
            else bad_words++;
          end
          5'd4: if (icap_i == 32'h0000_000D) begin synced <= 1'b0; packets++; end
          default: bad_words++;
        endcase
      end else if (icap_i[31:29] == 3'b001) begin
        if (icap_i[28:27] == 2'b10) begin
          reg_q      <= icap_i[17:13];
          words_left <= int'(icap_i[10:0]);
        end
      end else bad_words++;
    end
  end
endmodule

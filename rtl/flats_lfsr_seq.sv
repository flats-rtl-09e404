// flats_lfsr_seq: seed register and LFSR that turn (ECID, user input) into
// a FLATS sequence.
//
// On start the 24-bit LFSR is loaded with the seed {ecid, user_in[15:8]} and
// the low byte user_in[7:0] is loaded into a down-counter. The LFSR then
// steps once per clock until the counter reaches zero; its clock enable is
// then dropped and the frozen state is the sequence (seq_valid = 1). Seeding
// with the chip identifier plus part of the user input, and letting the rest
// of the user input set the number of LFSR clocks, follows the FLATS scheme;
// the split of the user input, the polynomial (x^24+x^23+x^22+x^17+1,
// Fibonacci, shifting toward the MSB) and the zero-seed guard are this
// design's choices.
//
// Timing: start is sampled on a rising edge; seq_valid rises user_in[7:0]+1
// cycles later and stays high until the next start. A start while busy
// restarts the computation.
module flats_lfsr_seq
  import flats_pkg::*;
#(
  parameter int unsigned ECID_W = 16,
  parameter int unsigned USER_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ECID_W-1:0] ecid,
  input  logic [USER_W-1:0] user_in,
  output seq_t              seq,
  output logic              seq_valid
);

  localparam int unsigned LFSR_W      = SEQ_W;               // taps below are for 24 bits
  localparam int unsigned SEED_USER_W = LFSR_W - ECID_W;   // user bits in the seed
  localparam int unsigned CNT_W       = USER_W - SEED_USER_W;

  logic [LFSR_W-1:0] lfsr_q, seed;
  logic [CNT_W-1:0]  cnt_q;
  logic              run_q;
  logic              fb;

  assign seed = {ecid, user_in[USER_W-1 -: SEED_USER_W]};
  assign fb   = lfsr_q[23] ^ lfsr_q[22] ^ lfsr_q[21] ^ lfsr_q[16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= '0;
      cnt_q  <= '0;
      run_q  <= 1'b0;
    end else if (start) begin
      lfsr_q <= (seed == '0) ? LFSR_W'(1) : seed;
      cnt_q  <= user_in[CNT_W-1:0];
      run_q  <= 1'b1;
    end else if (run_q) begin
      if (cnt_q == '0) begin
        run_q <= 1'b0;                     // stop the LFSR clock
      end else begin
        lfsr_q <= {lfsr_q[LFSR_W-2:0], fb};
        cnt_q  <= cnt_q - 1'b1;
      end
    end
  end

  logic valid_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    valid_q <= 1'b0;
    else if (start)                valid_q <= 1'b0;
    else if (run_q && cnt_q == '0) valid_q <= 1'b1;
  end

  assign seq       = seq_t'(lfsr_q);
  assign seq_valid = valid_q;

endmodule

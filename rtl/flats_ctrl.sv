// flats_ctrl: controller that runs one FLATS activation.
//
// A start pulse in IDLE pauses the protected design (design_en = 0, which
// freezes the LUT inputs that decide whether the oscillator can run) and
// asks the sequencer for a sequence. When the sequence is valid the pulse
// divider is started with the sequence's divisor, and at every phase change
// the selected LUT's O1 truth table is rewritten through the ICAP writer:
// the sequence's INIT value in the on phase, 0x0000 (O1 stuck at 0) in the
// off phase. A stop pulse ends pulsing; the controller makes sure the LUT
// is left at 0x0000, then lets the design run again and returns to IDLE.
// Pausing, LFSR sequences and ICAP-driven LUT enabling are the FLATS
// scheme; this state machine, and enabling by INIT rewrite rather than by a
// separate enable wire, are this design's reading of it.
//
// Timing: lfsr_start is a one-cycle pulse in the cycle after start. A write
// is issued (one-cycle wr_start) as soon as the writer is idle and the
// wanted on/off state differs from the last one written, so a phase change
// that arrives during a write is served right after it. Every other input
// is ignored while a run is active; stop outside a run is ignored.
module flats_ctrl
  import flats_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      stop,
  // sequencer
  output logic      lfsr_start,
  input  logic      seq_valid,
  input  seq_t      seq,
  // pulse divider
  output logic      div_run,
  output div_t      div_sel,
  input  logic      div_phase,
  // ICAP writer
  output logic      wr_start,
  output lut_sel_t  wr_lut,
  output lut_init_t wr_init,
  input  logic      wr_busy,
  // protected design and status
  output logic      design_en,
  output logic      active,
  output logic      lut_on
);

  typedef enum logic [1:0] {S_IDLE, S_SEQ, S_PULSE, S_CLEAR} state_t;

  state_t    state_q;
  logic      lfsr_start_q, wr_start_q, cur_on_q, want_on;
  seq_t      seq_q;
  lut_init_t wr_init_q;
  logic      can_write;

  assign want_on   = (state_q == S_PULSE) && div_phase;
  assign can_write = (state_q == S_PULSE || state_q == S_CLEAR) &&
                     !wr_busy && !wr_start_q && (want_on != cur_on_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      lfsr_start_q <= 1'b0;
      wr_start_q   <= 1'b0;
      cur_on_q     <= 1'b0;
      seq_q        <= '0;
      wr_init_q    <= '0;
    end else begin
      lfsr_start_q <= 1'b0;
      wr_start_q   <= 1'b0;
      if (can_write) begin
        wr_start_q <= 1'b1;
        wr_init_q  <= want_on ? seq_q.init : '0;
        cur_on_q   <= want_on;
      end
      unique case (state_q)
        S_IDLE: if (start) begin
          lfsr_start_q <= 1'b1;
          state_q      <= S_SEQ;
        end
        S_SEQ: begin
          if (stop) state_q <= S_CLEAR;
          else if (seq_valid && !lfsr_start_q) begin
            seq_q   <= seq;
            state_q <= S_PULSE;
          end
        end
        S_PULSE: if (stop) state_q <= S_CLEAR;
        S_CLEAR: if (!cur_on_q && !wr_busy && !wr_start_q) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign lfsr_start = lfsr_start_q;
  assign div_run    = (state_q == S_PULSE);
  assign div_sel    = seq_q.div;
  assign wr_start   = wr_start_q;
  assign wr_lut     = seq_q.lut;
  assign wr_init    = wr_init_q;
  assign design_en  = (state_q == S_IDLE);
  assign active     = (state_q != S_IDLE);
  assign lut_on     = cur_on_q;

endmodule

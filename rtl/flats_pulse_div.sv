// flats_pulse_div: on/off waveform for pulsing a LUT oscillator.
//
// A prescaler derives ticks at 2*BASE_HZ from the system clock. While run
// is high the output phase starts at 1 (oscillator on) and toggles every
// `div` ticks, so the waveform has 50% duty and frequency BASE_HZ / div:
// with BASE_HZ = 16 and div = 8 the oscillator is pulsed at 2 Hz, as in the
// FLATS worked example ("16 Hz / 8"). A divisor of 0 is read as 16, which
// gives the 1 Hz pulsing used for the infrared measurements. The doubling of
// the tick rate, the 50% duty and the reading of 0 are this design's
// choices.
//
// Interface: `toggle` is a one-cycle pulse in the cycle after each phase
// change (including the first rise after run goes high). When run is low,
// phase is 0 and the counters are held cleared. `div` is sampled when run
// rises and held for the whole run.
module flats_pulse_div #(
  parameter int unsigned CLK_HZ  = 100_000_000,
  parameter int unsigned BASE_HZ = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic [3:0] div,
  output logic       phase,
  output logic       toggle
);

  localparam int unsigned TICK_CYC = CLK_HZ / (2 * BASE_HZ);  // cycles per half base period
  localparam int unsigned PRE_W    = (TICK_CYC > 1) ? $clog2(TICK_CYC) : 1;

  logic [PRE_W-1:0] pre_q;
  logic [4:0]       half_q;     // ticks into the current half period
  logic [4:0]       div_q;      // 1..16
  logic             run_q, phase_q, toggle_q;
  logic             tick;

  assign tick = (pre_q == PRE_W'(TICK_CYC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_q    <= '0;
      half_q   <= '0;
      div_q    <= 5'd16;
      run_q    <= 1'b0;
      phase_q  <= 1'b0;
      toggle_q <= 1'b0;
    end else begin
      run_q    <= run;
      toggle_q <= 1'b0;
      if (!run) begin
        pre_q   <= '0;
        half_q  <= '0;
        phase_q <= 1'b0;
      end else if (!run_q) begin
        // first cycle of a run: start in the on phase
        div_q    <= (div == 4'd0) ? 5'd16 : {1'b0, div};
        pre_q    <= '0;
        half_q   <= '0;
        phase_q  <= 1'b1;
        toggle_q <= 1'b1;
      end else begin
        pre_q <= tick ? '0 : pre_q + 1'b1;
        if (tick) begin
          if (half_q == div_q - 5'd1) begin
            half_q   <= '0;
            phase_q  <= ~phase_q;
            toggle_q <= 1'b1;
          end else begin
            half_q <= half_q + 5'd1;
          end
        end
      end
    end
  end

  assign phase  = phase_q;
  assign toggle = toggle_q;

endmodule

// flats_lut42: behavioural model of a 4-input, 2-output FPGA look-up table
// whose truth tables are loaded at run time from configuration memory.
//
// This is a model of fabric hardware, not logic to synthesize: each output
// is the addressed bit of its 16-bit truth table, o1 = init_o1[{I4,I3,I2,I1}]
// and o2 = init_o2[{I4,I3,I2,I1}], arriving DELAY_PS picoseconds after an
// input or table change. The delay is what makes a LUT with an output wired
// back to one of its inputs behave as the FLATS partial-LUT ring oscillator: with
// INIT 0x0400 and O1 fed back to I1, O1 = !I1 & I2 & !I3 & I4, so the loop
// inverts and oscillates exactly when I4,I3,I2 = 1,0,1 and rests at 0
// otherwise. The truth-table addressing follows the worked FLATS example;
// the default of 1667 ps per pass gives a loop frequency near the roughly
// 300 MHz measured on the FPGA. The two-output, 4-input
// form follows that example; common devices have 6-input LUTs.
//
// The model has no clock. Simulate it with timing enabled; a lint run
// without timing ignores the delay.
module flats_lut42 #(
  parameter int unsigned DELAY_PS = 1667
) (
  input  logic [3:0]  i,        // i[0] = I1 ... i[3] = I4
  input  logic [15:0] init_o1,
  input  logic [15:0] init_o2,
  output logic        o1,
  output logic        o2
);

  assign #(DELAY_PS * 1ps) o1 = init_o1[i];
  assign #(DELAY_PS * 1ps) o2 = init_o2[i];

endmodule

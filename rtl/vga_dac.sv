// vga_dac: behavioural model of one 4-bit resistor-divider colour DAC.
// It is an analog part (four resistors on the board and the monitor's
// termination), modelled here for simulation only; it is not synthesizable
// logic.
//
// Each of the four FPGA outputs drives the colour wire through its own
// series resistor, 4 kohm for bit 0 up to 510 ohm for bit 3, and the
// monitor terminates the wire with 75 ohm to ground. By superposition
// (Millman's theorem) the wire voltage is
//     V = VOH * sum_i(bit_i / R_i) / (sum_i(1 / R_i) + 1 / R_TERM)
// which steps in nearly equal increments from 0 V at code 0 to about
// 0.72 V at code 15, within the 0 V to 0.7 V video range. The resistor
// values and the 75 ohm termination follow the board wiring; the 3.3 V
// output-high level (LVCMOS33) and the ideal, zero-impedance drivers are
// this model's assumptions.
//
// Interface: code is the 4-bit colour value (bit 3 most significant);
// v_out is the voltage at the monitor input, updated with no delay.
module vga_dac #(
  parameter real VOH    = 3.3,     // FPGA output-high level, volts
  parameter real R0     = 4000.0,  // series resistor of bit 0, ohms
  parameter real R1     = 2000.0,  // bit 1
  parameter real R2     = 1000.0,  // bit 2
  parameter real R3     = 510.0,   // bit 3
  parameter real R_TERM = 75.0     // monitor input termination, ohms
) (
  input  logic [3:0] code,
  output real        v_out
);

  localparam real G_SUM = 1.0/R0 + 1.0/R1 + 1.0/R2 + 1.0/R3 + 1.0/R_TERM;

  always_comb begin
    real i_in;
    i_in = 0.0;
    if (code[0]) i_in += VOH / R0;
    if (code[1]) i_in += VOH / R1;
    if (code[2]) i_in += VOH / R2;
    if (code[3]) i_in += VOH / R3;
    v_out = i_in / G_SUM;
  end

endmodule

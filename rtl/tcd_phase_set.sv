// Behavioural model of the RHIC strobe phase shifter (programmable delay
// line) of the Trigger/Clock driver. Not synthesizable: the real part is a
// delay line, modelled here with a transport delay.
//
// Every signal a driver sends is derived from the delayed strobe, so this
// one delay sets the phase of the whole branch. The delay is the jumper
// setting times STEP_PS; with 12 ns steps the setting 0..36 spans 0 to 432
// ns, about four RHIC strobe periods of ~110 ns. Settings above MAX_SETTING
// are clamped. The jumper setting is also brought out so that it can be read
// back over VME. Step size and range follow the specification; the 6-bit
// jumper field is this design's choice.
module tcd_phase_set #(
  parameter int unsigned STEP_PS     = 12000,  // 12 ns per step
  parameter int unsigned MAX_SETTING = 36      // 36 * 12 ns = 432 ns
) (
  input  logic       rhic_stb_i,   // RHIC strobe from the backplane
  input  logic [5:0] jumpers,      // phase setting
  output logic       rhic_stb_o,   // delayed RHIC strobe
  output logic [5:0] setting_o     // jumper readback
);

  int unsigned setting;

  assign setting   = (int'(jumpers) > int'(MAX_SETTING)) ? MAX_SETTING : int'(jumpers);
  assign setting_o = 6'(setting);

  initial rhic_stb_o = 1'b0;

  always @(rhic_stb_i) begin
    rhic_stb_o <= #(setting * STEP_PS * 1ps) rhic_stb_i;
  end

endmodule

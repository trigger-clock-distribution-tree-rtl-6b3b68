// Redundancy counter of a readout board.
//
// Every readout board counts the RHIC strobes it receives; the count goes
// out with the raw data so that it can be checked that all systems saw
// exactly the same number of clock pulses. The clear command sets the
// counter to zero, master-reset does the same as part of the general front-
// end reset. The counter samples the cable strobe on the falling edge of the
// data clock, like the receiver, and counts rising edges. A command arrives
// at the end of its strobe period (cmd_valid from the receiver), so after a
// clear the count restarts at zero and the next strobe makes it one. The
// 32-bit width is this design's choice.
module rhic_strobe_counter
  import tcd_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             dclk,
  input  logic             rst_n,
  input  logic             rhic_stb,
  input  logic             cmd_valid,
  input  logic [CMD_W-1:0] cmd,
  output logic [WIDTH-1:0] count_o,
  output logic             fe_reset_o   // master-reset seen (one cycle)
);

  logic stb_q, clr;

  assign clr = cmd_valid && (cmd == CMD_CLEAR || cmd == CMD_MASTER_RESET);

  always_ff @(negedge dclk or negedge rst_n) begin
    if (!rst_n) begin
      stb_q      <= 1'b0;
      count_o    <= '0;
      fe_reset_o <= 1'b0;
    end else begin
      stb_q      <= rhic_stb;
      fe_reset_o <= cmd_valid && cmd == CMD_MASTER_RESET;
      if (clr)                      count_o <= '0;
      else if (rhic_stb && !stb_q)  count_o <= count_o + 1'b1;
    end
  end

endmodule

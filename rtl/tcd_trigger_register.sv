// Trigger backplane input register of the Trigger/Clock driver.
//
// The trigger control unit presents the trigger action word (detector
// selects, trigger command, DAQ command, token) and the 16-bit trigger word
// on the backplane; they are latched at the rising edge of the RHIC strobe,
// with 10 ns setup and 5 ns hold, as the specification requires. The first
// stage of this register is therefore clocked by the raw strobe itself. It
// flips a toggle bit with each capture. The toggle crosses into the data
// clock domain through a two-stage synchronizer; when it changes, the
// latched value, which then has been stable for at least two data-clock
// cycles and stays so until the next strobe edge about 110 ns later, is
// copied into bp_q and stb_o pulses for one cycle. The hand-over is this
// design's choice.
//
// Timing: bp_q updates three to four data-clock cycles (66 to 88 ns) after
// the strobe edge; stb_o pulses in the cycle after bp_q changes.
module tcd_trigger_register
  import tcd_pkg::*;
(
  input  logic       clk,       // data clock
  input  logic       rst_n,
  input  logic       rhic_stb,  // raw RHIC strobe from the backplane
  input  backplane_t bp_i,      // trigger backplane groups C..G
  output backplane_t bp_q,      // latched copy, data clock domain
  output logic       stb_o      // new copy available
);

  backplane_t bp_s;        // strobe domain
  logic       tog_s;       // strobe domain toggle
  logic [2:0] tog_d;       // data clock domain synchronizer and edge

  always_ff @(posedge rhic_stb or negedge rst_n) begin
    if (!rst_n) begin
      bp_s  <= '0;
      tog_s <= 1'b0;
    end else begin
      bp_s  <= bp_i;
      tog_s <= ~tog_s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tog_d <= '0;
      bp_q  <= '0;
      stb_o <= 1'b0;
    end else begin
      tog_d <= {tog_d[1:0], tog_s};
      stb_o <= 1'b0;
      if (tog_d[2] != tog_d[1]) begin
        bp_q  <= bp_s;
        stb_o <= 1'b1;
      end
    end
  end

endmodule

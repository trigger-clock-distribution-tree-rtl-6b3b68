// Word-slot timer of the Trigger/Clock driver.
//
// The data clock runs at five times the RHIC strobe rate and is phase locked
// to the delayed RHIC strobe, so every strobe period holds five data-clock
// cycles, the five word slots (trigger CMD, DAQ CMD, token high, mid, low).
// The timer samples the delayed strobe on the data clock, finds its rising
// edge and runs a modulo-5 slot counter that is 0 during the cycle the
// serializer drives the trigger command. Because the RHIC strobe is free
// running with no missing strobes, the counter free-runs between edges and
// is only checked, and re-aligned, at each rising edge; a mismatch raises the
// sticky flag sync_err. The counter can only stay aligned if the strobe's
// rising edge arrives a little ahead of a data-clock edge (the skew dt of the
// word timing diagram), which a clock multiplier locked to the strobe gives.
//
// Timing: a strobe edge sampled at data-clock edge n makes slot_o == 0 in the
// cycle after edge n; from then on slot_o counts 0,1,2,3,4,0,... and
// frame_o pulses in every slot-0 cycle once locked_o is set.
// The re-alignment rule and the error flag are this design's choices.
module tcd_frame_timer
  import tcd_pkg::*;
(
  input  logic       clk,        // data clock, 5x RHIC strobe
  input  logic       rst_n,
  input  logic       rhic_stb,   // delayed RHIC strobe
  output logic [2:0] slot_o,     // current word slot 0..4
  output logic       frame_o,    // first slot of a strobe period
  output logic       locked_o,   // at least one strobe edge seen
  output logic       sync_err_o  // sticky: an edge arrived off slot 0
);

  logic       stb_q, stb_qq;
  logic [2:0] cnt_q;
  logic       rise;

  assign rise = stb_q & ~stb_qq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stb_q      <= 1'b0;
      stb_qq     <= 1'b0;
      cnt_q      <= 3'd0;
      locked_o   <= 1'b0;
      sync_err_o <= 1'b0;
    end else begin
      stb_q  <= rhic_stb;
      stb_qq <= stb_q;
      if (rise) begin
        locked_o <= 1'b1;
        if (locked_o && cnt_q != 3'd0) sync_err_o <= 1'b1;
      end
      if (cnt_q == 3'(SLOTS - 1)) cnt_q <= 3'd0;
      else                        cnt_q <= cnt_q + 3'd1;
      if (rise) cnt_q <= 3'd1;    // this cycle is slot 0, next is slot 1
    end
  end

  // The cycle in which the edge is seen is slot 0 whatever the counter says.
  assign slot_o  = rise ? 3'd0 : cnt_q;
  assign frame_o = locked_o && (slot_o == 3'd0);

endmodule

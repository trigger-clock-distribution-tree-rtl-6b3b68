// Trigger decode ("select") logic of the Trigger/Clock driver.
//
// For each latched backplane copy it decides whether the command concerns
// this detector. The detector's select bit is chosen by the detector number,
// the upper three bits of the detector ID set by the mezzanine (the lower
// three are the sub-detector number). Readout related commands (classes 2
// and 3) are taken only when the select bit is set; class 1 commands other
// than no-trigger (clear, master-reset, spare) are broadcast and taken
// whatever the select bit, with DAQ command and token forced to zero. A
// taken command is pushed into the command FIFO and offered to the
// mezzanine (istb) in the same cycle; the mezzanine also sees the trigger
// word and the select bit every strobe.
//
// It also drives the detector's open-collector, low-active BUSY line on the
// backplane: the OR of the mezzanine busy (which already includes the
// busy lines returned on the cables) and the DAQ front-end busy.
// Only the own line is pulled low; the other seven are left released (1).
// Timing: one cycle from stb_i to push_o/istb_o.
module tcd_select
  import tcd_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [5:0]      detector_id,  // {detector[2:0], subdetector[2:0]}
  input  backplane_t      bp_q,         // latched backplane
  input  logic            stb_i,        // new backplane copy
  input  logic            mezz_busy,    // detector busy from the mezzanine
  input  logic            daq_busy,     // DAQ front-end busy
  output logic            push_o,       // write info_o into the FIFO
  output trg_info_t       info_o,
  output logic            istb_o,       // command offered to the mezzanine
  output logic            involved_o,   // select bit of this detector
  output logic [NDET-1:0] bsy_n_o       // backplane busy lines, low active
);

  logic [2:0] det;
  logic       sel_bit, take, bcast;
  trg_info_t  info_d;

  assign det     = detector_id[5:3];
  assign sel_bit = bp_q.sel[det];
  assign bcast   = is_group1(bp_q.cmd) && (bp_q.cmd != CMD_NO_TRIGGER);
  assign take    = stb_i && (bcast || (sel_bit && bp_q.cmd != CMD_NO_TRIGGER));

  always_comb begin
    info_d.cmd   = bp_q.cmd;
    info_d.daq   = bcast ? '0 : bp_q.daq;
    info_d.token = bcast ? '0 : bp_q.token;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      push_o     <= 1'b0;
      istb_o     <= 1'b0;
      info_o     <= '0;
      involved_o <= 1'b0;
      bsy_n_o    <= '1;
    end else begin
      push_o <= take;
      istb_o <= take;
      if (take) info_o <= info_d;
      if (stb_i) involved_o <= sel_bit;
      bsy_n_o      <= '1;
      bsy_n_o[det] <= ~(mezz_busy | daq_busy);
    end
  end

endmodule

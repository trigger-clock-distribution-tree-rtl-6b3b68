// Trigger/Clock Driver (TCD) module, the root of one branch of the tree.
//
// One driver serves one detector (or one phase group of it). Once per RHIC
// strobe it takes the trigger action word from the trigger backplane,
// decides whether the command concerns its detector, queues it in the
// command FIFO, lets the detector specific mezzanine intercept pulser
// commands, and serializes command, DAQ command and token onto the four
// Trigger/Clock cables C0..C3 together with the RHIC strobe, the data clock
// and the two detector clocks. It drives its detector's BUSY line on the
// backplane and is configured over VME.
//
//   backplane -> trigger register -> select -> command FIFO -> serializer
//                                       \-> mezzanine (control, command) -/
//
// All logic runs on the data clock dclk, five times the strobe rate and
// phase locked to the delayed strobe rhic_stb_dly (the delay line and the
// clock multiplier are outside this module). A command latched in strobe
// period n goes out on the cables one or two periods later, depending on
// the phase setting, and a whole trigger takes one period on the cable.
//
// The cable signals of the four channels are identical copies; the BUSY and
// STATUS lines returned on them reach the mezzanine. The partitioning
// follows the specification's block diagram; everything runs in one clock
// domain by this design's choice.
module tcd_driver
  import tcd_pkg::*;
#(
  parameter logic [5:0]  DETECTOR_ID = 6'o30,  // TPC, sub-detector 0
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned N_CABLES    = 4
) (
  input  logic              dclk,
  input  logic              rst_n,
  input  logic              rhic_stb,       // raw strobe, backplane
  input  logic              rhic_stb_dly,   // delayed strobe, phase set
  input  logic [5:0]        phase_setting,  // jumper readback
  input  backplane_t        bp_i,
  output logic [NDET-1:0]   bsy_n_o,
  input  logic              daq_busy,
  // VME
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [5:0]        vme_am,
  input  logic [31:0]       vme_addr,
  input  logic [7:0]        vme_d_i,
  output logic [7:0]        vme_d_o,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  // Trigger/Clock cables
  output cable_t [N_CABLES-1:0] cable_o,
  input  logic [N_CABLES-1:0]   cable_busy_i,
  input  logic [N_CABLES-1:0]   cable_status_i,
  // monitoring
  output trg_info_t         sent_o,
  output logic              sent_load_o,
  output logic              det_busy_o
);

  backplane_t bp_q;
  logic       bp_stb;
  logic [2:0] slot;
  logic       frame, locked, sync_err;
  logic       push, istb, involved, pop, empty, full, ovf, clr_ovf;
  trg_info_t  push_info, head;
  logic [$clog2(FIFO_DEPTH):0] level;
  logic [5:0] det_id;
  logic [2:0] control;
  logic [CMD_W-1:0] mz_cmd;
  logic       clk1, clk2, d_stb;
  logic [3:0] d;
  logic [3:0] busy4, status4;
  logic [18:0] ca;
  logic [7:0] cd_w, cd_r;
  logic       cd_oe, ce_n, oe_n, we_n, mz_rst_n;

  always_comb begin
    busy4   = '0;
    status4 = '0;
    for (int i = 0; i < N_CABLES && i < 4; i++) begin
      busy4[i]   = cable_busy_i[i];
      status4[i] = cable_status_i[i];
    end
  end

  tcd_frame_timer u_timer (
    .clk(dclk), .rst_n, .rhic_stb(rhic_stb_dly),
    .slot_o(slot), .frame_o(frame), .locked_o(locked), .sync_err_o(sync_err)
  );

  tcd_trigger_register u_reg (
    .clk(dclk), .rst_n, .rhic_stb, .bp_i, .bp_q, .stb_o(bp_stb)
  );

  tcd_select u_sel (
    .clk(dclk), .rst_n, .detector_id(det_id), .bp_q, .stb_i(bp_stb),
    .mezz_busy(det_busy_o), .daq_busy, .push_o(push), .info_o(push_info),
    .istb_o(istb), .involved_o(involved), .bsy_n_o
  );

  tcd_cmd_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(dclk), .rst_n, .push_i(push), .data_i(push_info), .pop_i(pop),
    .clr_ovf_i(clr_ovf), .head_o(head), .empty_o(empty), .full_o(full),
    .count_o(level), .overflow_o(ovf)
  );

  tcd_mezzanine #(.DETECTOR_ID(DETECTOR_ID)) u_mezz (
    .clk(dclk), .rst_n, .frame_i(frame), .involved_i(involved),
    .istb_i(istb), .trg_cmd_i(push_info.cmd), .trg_word_i(bp_q.word),
    .busy_i(busy4), .status_i(status4),
    .fifo_level_i(8'(level)), .fifo_pop_i(pop), .detector_id_o(det_id),
    .det_busy_o, .clk1_o(clk1), .clk2_o(clk2), .control_o(control),
    .trg_cmd_o(mz_cmd), .ca_i(ca), .cd_i(cd_w), .cd_o(cd_r), .cd_oe_o(cd_oe),
    .ce_n, .oe_n, .we_n, .reset_n(mz_rst_n)
  );

  tcd_serializer u_ser (
    .clk(dclk), .rst_n, .slot_i(slot), .locked_i(locked), .head_i(head),
    .empty_i(empty), .pop_o(pop), .control_i(control), .mz_cmd_i(mz_cmd),
    .d_o(d), .rhic_stb_o(d_stb), .sent_o, .load_o(sent_load_o)
  );

  tcd_vme_slave u_vme (
    .clk(dclk), .rst_n, .as_n(vme_as_n), .ds_n(vme_ds_n),
    .write_n(vme_write_n), .am(vme_am), .addr(vme_addr), .d_i(vme_d_i),
    .d_o(vme_d_o), .d_oe(vme_d_oe), .dtack_n(vme_dtack_n),
    .detector_id(det_id), .phase_jumpers(phase_setting),
    .status_i({full, 2'b00, ovf, empty, sync_err, locked, det_busy_o}),
    .fifo_level_i(8'(level)), .clr_ovf_o(clr_ovf), .mezz_reset_n_o(mz_rst_n),
    .ca_o(ca), .cd_o(cd_w), .cd_i(cd_oe ? cd_r : 8'h00), .ce_n, .oe_n, .we_n
  );

  // Fan-out: the same signals on every cable.
  always_comb begin
    for (int i = 0; i < N_CABLES; i++) begin
      cable_o[i].rhic_stb = d_stb;
      cable_o[i].d        = d;
      cable_o[i].dclk     = dclk;
      cable_o[i].clk1     = clk1;
      cable_o[i].clk2     = clk2;
    end
  end

endmodule

// One branch of the STAR trigger/clock distribution tree.
//
// A Trigger/Clock driver takes the trigger action word from the trigger
// backplane once per RHIC strobe and sends command, DAQ command and token,
// five 4-bit words per strobe period, down four cables together with the
// RHIC strobe, the data clock and two detector clocks. At the end of each
// cable sits a readout board with a Trigger/Clock receiver, which recovers
// the trigger, and a redundancy counter of RHIC strobes. The RHIC strobe is
// first delayed by the driver's phase shifter, set by jumpers; all cable
// signals follow the delayed strobe.
//
// The data clock dclk, five times the strobe rate and phase locked to the
// delayed strobe, comes from a clock multiplier outside this module: the
// delayed strobe is brought out (rhic_stb_dly_o) to feed it. The line
// drivers and receivers on the cables are wires here. Readout board r sits
// on cable r. Everything else is as in the specification's block diagram.
module tcd_tree_top
  import tcd_pkg::*;
#(
  parameter logic [5:0]  DETECTOR_ID = 6'o30,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned N_CABLES    = 4
) (
  input  logic              rhic_stb,        // RHIC strobe, backplane
  input  logic [5:0]        phase_jumpers,
  output logic              rhic_stb_dly_o,  // to the clock multiplier
  input  logic              dclk,            // data clock, 5x strobe
  input  logic              rst_n,
  input  backplane_t        bp_i,
  output logic [NDET-1:0]   bsy_n_o,
  input  logic              daq_busy,
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [5:0]        vme_am,
  input  logic [31:0]       vme_addr,
  input  logic [7:0]        vme_d_i,
  output logic [7:0]        vme_d_o,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  output cable_t [N_CABLES-1:0] cable_o,
  input  logic [N_CABLES-1:0]   fe_busy_i,     // readout board BUSY
  input  logic [N_CABLES-1:0]   fe_status_i,   // readout board STATUS
  // readout board side
  input  logic [N_CABLES-1:0]   rx_oe_n,
  input  logic [N_CABLES-1:0]   rx_rd_stb_n,
  output logic [N_CABLES-1:0][CMD_W-1:0]   rx_trg_cmd_o,
  output logic [N_CABLES-1:0][7:0]         rx_bus_o,
  output logic [N_CABLES-1:0]              rx_bus_oe_o,
  output logic [N_CABLES-1:0]              rx_valid_o,
  output logic [N_CABLES-1:0][CMD_W-1:0]   rx_cmd_o,
  output logic [N_CABLES-1:0][DAQ_W-1:0]   rx_daq_o,
  output logic [N_CABLES-1:0][TOKEN_W-1:0] rx_token_o,
  output logic [N_CABLES-1:0][31:0]        rx_strobes_o,
  output logic [N_CABLES-1:0]              rx_fe_reset_o,
  output trg_info_t         sent_o,
  output logic              sent_load_o,
  output logic              det_busy_o
);

  logic [5:0] setting;

  tcd_phase_set u_phase (
    .rhic_stb_i(rhic_stb), .jumpers(phase_jumpers),
    .rhic_stb_o(rhic_stb_dly_o), .setting_o(setting)
  );

  tcd_driver #(
    .DETECTOR_ID(DETECTOR_ID), .FIFO_DEPTH(FIFO_DEPTH), .N_CABLES(N_CABLES)
  ) u_tcd (
    .dclk, .rst_n, .rhic_stb, .rhic_stb_dly(rhic_stb_dly_o),
    .phase_setting(setting), .bp_i, .bsy_n_o, .daq_busy,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_addr, .vme_d_i,
    .vme_d_o, .vme_d_oe, .vme_dtack_n,
    .cable_o, .cable_busy_i(fe_busy_i), .cable_status_i(fe_status_i),
    .sent_o, .sent_load_o, .det_busy_o
  );

  for (genvar r = 0; r < N_CABLES; r++) begin : g_rob
    tcr_receiver u_rx (
      .dclk(cable_o[r].dclk), .rst_n, .rhic_stb(cable_o[r].rhic_stb),
      .d(cable_o[r].d), .oe_n(rx_oe_n[r]), .rd_stb_n(rx_rd_stb_n[r]),
      .trg_cmd_o(rx_trg_cmd_o[r]), .bus_o(rx_bus_o[r]),
      .bus_oe_o(rx_bus_oe_o[r]), .cmd_valid_o(rx_valid_o[r]),
      .cmd_o(rx_cmd_o[r]), .daq_o(rx_daq_o[r]), .token_o(rx_token_o[r])
    );
    rhic_strobe_counter u_cnt (
      .dclk(cable_o[r].dclk), .rst_n, .rhic_stb(cable_o[r].rhic_stb),
      .cmd_valid(rx_valid_o[r]), .cmd(rx_cmd_o[r]),
      .count_o(rx_strobes_o[r]), .fe_reset_o(rx_fe_reset_o[r])
    );
  end

endmodule

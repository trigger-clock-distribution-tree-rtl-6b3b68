// Shared definitions of the trigger/clock distribution tree.
//
// The tree carries, once per RHIC strobe (~110 ns), a 4-bit trigger command,
// a 4-bit DAQ command and a 12-bit trigger token: 20 bits sent as five 4-bit
// words on a data clock running at five times the RHIC strobe rate. This
// package holds the command code points (fixed by the command tables of the
// specification), their three classes, the 20-bit trigger information word,
// the 2-bit serializer control code driven by the detector mezzanine and the
// trigger backplane bundle. Bit orders inside the structs are this design's
// choice; the field widths and code values follow the specification.
package tcd_pkg;

  localparam int unsigned CMD_W   = 4;   // trigger command width
  localparam int unsigned DAQ_W   = 4;   // DAQ command width
  localparam int unsigned TOKEN_W = 12;  // trigger token width
  localparam int unsigned WORD_W  = 16;  // trigger word width
  localparam int unsigned NDET    = 8;   // detectors on the trigger backplane
  localparam int unsigned SLOTS   = 5;   // 4-bit words per RHIC strobe period
  localparam int unsigned INFO_W  = CMD_W + DAQ_W + TOKEN_W;  // 20 bits

  // Trigger command code points.
  typedef enum logic [CMD_W-1:0] {
    CMD_NO_TRIGGER   = 4'd0,
    CMD_CLEAR        = 4'd1,
    CMD_MASTER_RESET = 4'd2,
    CMD_SPARE        = 4'd3,
    CMD_TRIGGER0     = 4'd4,
    CMD_TRIGGER1     = 4'd5,
    CMD_TRIGGER2     = 4'd6,
    CMD_TRIGGER3     = 4'd7,
    CMD_PULSER0      = 4'd8,
    CMD_PULSER1      = 4'd9,
    CMD_PULSER2      = 4'd10,
    CMD_PULSER3      = 4'd11,
    CMD_CONFIG       = 4'd12,
    CMD_ABORT        = 4'd13,
    CMD_L1ACCEPT     = 4'd14,
    CMD_L2ACCEPT     = 4'd15
  } trg_cmd_e;

  // Serializer control code from the mezzanine (control[1:0]).
  typedef enum logic [1:0] {
    CTRL_FIFO      = 2'd0,  // command, DAQ command and token from the FIFO
    CTRL_MEZZ_FIFO = 2'd1,  // mezzanine command, DAQ command and token from the FIFO
    CTRL_MEZZ_PREV = 2'd2,  // mezzanine command, previous valid DAQ command and token
    CTRL_MEZZ_ZERO = 2'd3   // mezzanine command, DAQ command and token forced to zero
  } ctrl_e;

  // One trigger as it travels down the tree.
  typedef struct packed {
    logic [CMD_W-1:0]   cmd;
    logic [DAQ_W-1:0]   daq;
    logic [TOKEN_W-1:0] token;
  } trg_info_t;

  // Trigger backplane signal groups C to G (group A is the RHIC strobe,
  // group B the busy lines driven back).
  typedef struct packed {
    logic [NDET-1:0]    sel;
    logic [CMD_W-1:0]   cmd;
    logic [DAQ_W-1:0]   daq;
    logic [TOKEN_W-1:0] token;
    logic [WORD_W-1:0]  word;
  } backplane_t;

  // Signals of one Trigger/Clock cable, driver to receiver.
  typedef struct packed {
    logic       rhic_stb;
    logic [3:0] d;
    logic       dclk;
    logic       clk1;
    logic       clk2;
  } cable_t;

  // Class 1: not readout related, broadcast to all detectors.
  function automatic logic is_group1(logic [CMD_W-1:0] c);
    return c < 4'd4;
  endfunction

  // Class 2: readout related, creates an event (trigger, pulser, config).
  function automatic logic is_group2(logic [CMD_W-1:0] c);
    return (c >= 4'd4) && (c <= 4'd12);
  endfunction

  // Pulser commands 8..11.
  function automatic logic is_pulser(logic [CMD_W-1:0] c);
    return c[3:2] == 2'b10;
  endfunction

endpackage

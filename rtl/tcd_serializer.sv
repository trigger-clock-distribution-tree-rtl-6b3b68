// Trigger command serializer of the Trigger/Clock driver.
//
// Once per strobe period it builds the 20-bit trigger information to send
// and shifts it out on the 4-bit data lines, one word per data-clock cycle,
// in the order trigger command, DAQ command, token bits 11:8, 7:4, 3:0. The
// trigger command word starts at the same data-clock edge as the outgoing
// RHIC strobe, so it is available first; a receiver latches each word at
// the falling edge of the data clock. The full trigger therefore fits in one
// strobe period and the link has no dead time.
//
// What is sent is chosen in slot 4, for the next period, from the
// mezzanine's control code (see tcd_pkg::ctrl_e):
//   0  FIFO head as it is, popped; no-trigger if the FIFO is empty
//   1  mezzanine command with DAQ command and token of the FIFO head, popped
//   2  mezzanine command with DAQ command and token of the previous valid
//      command taken from the FIFO
//   3  mezzanine command with DAQ command and token zero, FIFO untouched
// control[2] is reserved and ignored.
//
// The outgoing RHIC strobe is regenerated from the slot counter: high for
// slots 0 and 1 (two data-clock periods, about 44 ns, inside the allowed
// 10 to 90 ns pulse length). Until the slot timer is locked the outputs stay
// low. The words per period, their order and the control meanings follow
// the specification; the strobe pulse length is this design's choice.
// An assertion checks that the FIFO is popped only in slot 4 and never when
// it is empty.
module tcd_serializer
  import tcd_pkg::*;
(
  input  logic             clk,        // data clock
  input  logic             rst_n,
  input  logic [2:0]       slot_i,
  input  logic             locked_i,
  input  trg_info_t        head_i,     // FIFO head
  input  logic             empty_i,
  output logic             pop_o,
  input  logic [2:0]       control_i,
  input  logic [CMD_W-1:0] mz_cmd_i,
  output logic [3:0]       d_o,        // data word on the cable
  output logic             rhic_stb_o, // RHIC strobe on the cable
  output trg_info_t        sent_o,     // trigger going out in this period
  output logic             load_o      // pulses when sent_o is chosen
);

  trg_info_t  info, prev_q;
  logic       take_fifo, load;
  logic [15:0] sh;

  assign load = locked_i && (slot_i == 3'(SLOTS - 1));

  always_comb begin
    info      = '0;
    take_fifo = 1'b0;
    unique case (ctrl_e'(control_i[1:0]))
      CTRL_FIFO: if (!empty_i) begin
        info      = head_i;
        take_fifo = 1'b1;
      end
      CTRL_MEZZ_FIFO: begin
        info.cmd = mz_cmd_i;
        if (!empty_i) begin
          info.daq   = head_i.daq;
          info.token = head_i.token;
          take_fifo  = 1'b1;
        end
      end
      CTRL_MEZZ_PREV: begin
        info.cmd   = mz_cmd_i;
        info.daq   = prev_q.daq;
        info.token = prev_q.token;
      end
      CTRL_MEZZ_ZERO: info.cmd = mz_cmd_i;
    endcase
  end

  assign pop_o = load && take_fifo;

  // The FIFO is read once per strobe period, in slot 4, and never when empty.
  a_pop_rule: assert property (@(posedge clk) disable iff (!rst_n)
    pop_o |-> (!empty_i && slot_i == 3'(SLOTS - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_o        <= '0;
      sh         <= '0;
      rhic_stb_o <= 1'b0;
      prev_q     <= '0;
      sent_o     <= '0;
      load_o     <= 1'b0;
    end else begin
      load_o <= load;
      if (!locked_i) begin
        d_o        <= '0;
        rhic_stb_o <= 1'b0;
      end else begin
        rhic_stb_o <= (slot_i == 3'(SLOTS - 1)) || (slot_i == 3'd0);
        if (load) begin
          d_o    <= info.cmd;
          sh     <= {info.daq, info.token};
          sent_o <= info;
          if (take_fifo && info.cmd != CMD_NO_TRIGGER) prev_q <= info;
        end else begin
          d_o <= sh[15:12];
          sh  <= {sh[11:0], 4'h0};
        end
      end
    end
  end

endmodule

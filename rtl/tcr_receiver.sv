// Trigger/Clock receiver logic, the programmable-logic part of the receiver
// on each readout board.
//
// The cable carries the RHIC strobe, a 4-bit data word and the data clock
// at five times the strobe rate. The driver changes the data word at the
// rising edge of the data clock; the receiver latches it at the falling
// edge, in the middle of the eye. The first falling edge at which the RHIC
// strobe is seen high after being low is slot 0 and carries the trigger
// command; the next four carry the DAQ command and the token bits 11:8,
// 7:4 and 3:0. Only the leading edge of the strobe is used, so any strobe
// pulse length from 10 to 90 ns works.
//
// Outputs: trg_cmd_o always shows the last non-zero trigger command and is
// updated right after slot 0, so it is available first. DAQ command and
// token are complete after slot 4; then cmd_valid_o pulses for one cycle
// and cmd_o/daq_o/token_o show the complete trigger (cmd_o is zero for an
// idle period). The trigger command words (DAQ command and token, 16 bits)
// are read as two bytes on an 8-bit bus for a shared data bus: oe_n enables
// the bus driver (bus_oe_o), byte 0 = {DAQ command, token 11:8} and byte 1 =
// token 7:0; each low pulse of rd_stb_n steps to the other byte, and a new
// command sets the pointer back to byte 0 (this wins over a read strobe
// in the same cycle). rd_stb_n is sampled on the falling data-clock edge. The bus read protocol and the
// validity pulse are this design's choices; the word order and the clock
// edges follow the specification.
module tcr_receiver
  import tcd_pkg::*;
(
  input  logic              dclk,      // data clock from the cable
  input  logic              rst_n,
  input  logic              rhic_stb,  // RHIC strobe from the cable
  input  logic [3:0]        d,         // data word from the cable
  input  logic              oe_n,
  input  logic              rd_stb_n,
  output logic [CMD_W-1:0]  trg_cmd_o,
  output logic [7:0]        bus_o,
  output logic              bus_oe_o,
  output logic              cmd_valid_o,
  output logic [CMD_W-1:0]  cmd_o,
  output logic [DAQ_W-1:0]  daq_o,
  output logic [TOKEN_W-1:0] token_o
);

  logic       stb_q, rd_q, ptr, rx_active;
  logic [2:0] slot;
  logic [15:0] sh;

  always_ff @(negedge dclk or negedge rst_n) begin
    if (!rst_n) begin
      stb_q       <= 1'b0;
      rd_q        <= 1'b1;
      ptr         <= 1'b0;
      rx_active   <= 1'b0;
      slot        <= '0;
      sh          <= '0;
      trg_cmd_o   <= '0;
      cmd_valid_o <= 1'b0;
      cmd_o       <= '0;
      daq_o       <= '0;
      token_o     <= '0;
    end else begin
      stb_q       <= rhic_stb;
      rd_q        <= rd_stb_n;
      cmd_valid_o <= 1'b0;
      if (rd_q && !rd_stb_n) ptr <= ~ptr;
      if (rhic_stb && !stb_q) begin
        // slot 0: trigger command
        sh        <= {12'h0, d};
        slot      <= 3'd1;
        rx_active <= 1'b1;
        if (d != 4'h0) trg_cmd_o <= d;
      end else if (rx_active) begin
        sh <= {sh[11:0], d};
        if (slot == 3'(SLOTS - 1)) begin
          rx_active   <= 1'b0;
          cmd_valid_o <= 1'b1;
          cmd_o       <= sh[15:12];
          daq_o       <= sh[11:8];
          token_o     <= {sh[7:0], d};
          if (sh[15:12] != 4'h0) ptr <= 1'b0;
        end else begin
          slot <= slot + 3'd1;
        end
      end
    end
  end

  assign bus_o    = ptr ? token_o[7:0] : {daq_o, token_o[11:8]};
  assign bus_oe_o = !oe_n;

endmodule

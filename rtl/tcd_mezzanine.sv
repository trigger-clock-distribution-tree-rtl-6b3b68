// Detector specific Trigger/Clock mezzanine (pulser sequencer variant).
//
// The mezzanine sits in the trigger command path of the driver. It sees
// every command taken for its detector (istb_i with trg_cmd_i) and tells the
// serializer, through the control code and its own trigger command output,
// what to send in the next strobe period:
//   control 0  send the oldest FIFO entry as it is (normal operation)
//   control 1  send trg_cmd_o with DAQ command and token of the FIFO head
//   control 2  send trg_cmd_o with the previous valid DAQ command and token
//   control 3  send trg_cmd_o with DAQ command and token zero, FIFO held
// When a pulser command whose bit is set in the intercept mask arrives, the
// mezzanine raises detector busy and plays a sequence: SEQ_LEN-1 fire-only
// copies of the pulser command with zero token (control 3), spaced SPACING
// strobe periods apart, then a final copy carrying the DAQ command and token
// of the original command from the FIFO (control 1), which asks the front end
// to read out. Strobe periods in between carry no-trigger (control 3 with
// command 0), so later accepts and aborts wait in the FIFO. Commands that
// were already queued ahead of the pulser are first let out in normal
// operation (control 0); for that the mezzanine watches the FIFO fill level
// and pops, which is this design's addition to the mezzanine interface. Busy drops when
// the final command has been handed over; the detector busy output is also
// the OR of the four BUSY lines returned on the cables.
//
// It also makes the two detector clocks by dividing the data clock (period
// and high time set per clock) and holds the configuration registers, on an
// 8-bit bus with CE#, OE#, WE# and RESET#:
//   0x00 pulser intercept mask [3:0]     0x05 detector ID (read only)
//   0x01 sequence length (1..255)         0x06 {STATUS[3:0], BUSY[3:0]} (ro)
//   0x02 spacing in strobe periods (>=2)  0x07 completed sequences (ro)
//   0x03 clock 1 period  0x04 clock 1 high time
//   0x0A clock 2 period  0x0B clock 2 high time
//   0x08 last trigger word [7:0]  0x09 last trigger word [15:8] (ro)
// The intercept, busy and control behaviour follows the specification; the
// register map, sequence parameters and divider-based clocks are this
// design's choices. Clocks faster than the data clock, or at a rate that is
// not an integer fraction of it, need an analogue multiplier and cannot be
// made here.
//
// Timing: the state advances only at frame_i (slot 0 of a strobe period),
// so control and trg_cmd_o are stable when the serializer samples them in
// slot 4. An intercept seen at istb_i switches to control 3 from the next
// cycle on, before the intercepted entry is visible at the FIFO head.
module tcd_mezzanine
  import tcd_pkg::*;
#(
  parameter logic [5:0] DETECTOR_ID = 6'o30   // TPC (detector 3), sub-detector 0
) (
  input  logic              clk,          // data clock
  input  logic              rst_n,
  input  logic              frame_i,      // delayed RHIC strobe, slot 0
  input  logic              involved_i,   // detector select bit
  input  logic              istb_i,       // command taken for this detector
  input  logic [CMD_W-1:0]  trg_cmd_i,
  input  logic [WORD_W-1:0] trg_word_i,
  input  logic [3:0]        busy_i,       // BUSY returned on the four cables
  input  logic [3:0]        status_i,     // STATUS returned on the four cables
  input  logic [7:0]        fifo_level_i, // entries in the command FIFO
  input  logic              fifo_pop_i,   // serializer takes the FIFO head
  output logic [5:0]        detector_id_o,
  output logic              det_busy_o,
  output logic              clk1_o,
  output logic              clk2_o,
  output logic [2:0]        control_o,
  output logic [CMD_W-1:0]  trg_cmd_o,
  // configuration bus
  input  logic [18:0]       ca_i,
  input  logic [7:0]        cd_i,
  output logic [7:0]        cd_o,
  output logic              cd_oe_o,
  input  logic              ce_n,
  input  logic              oe_n,
  input  logic              we_n,
  input  logic              reset_n       // mezzanine RESET#
);

  typedef enum logic [2:0] {S_IDLE, S_DRAIN, S_WAIT, S_FIRE, S_FINAL} seq_e;

  logic       rn;
  seq_e       state;
  logic [7:0] mask_q, len_q, spc_q, p1_q, h1_q, p2_q, h2_q, done_q;
  logic [7:0] remain, gap, ahead, ahead_d;
  logic [CMD_W-1:0]  pcmd;
  logic [WORD_W-1:0] word_q;
  logic       wr, intercept;

  assign rn            = rst_n & reset_n;
  assign detector_id_o = DETECTOR_ID;
  assign wr            = !ce_n && !we_n;
  assign intercept     = istb_i && involved_i && is_pulser(trg_cmd_i) && mask_q[{1'b0, trg_cmd_i[1:0]}];

  // Configuration registers.
  always_ff @(posedge clk or negedge rn) begin
    if (!rn) begin
      mask_q <= 8'd0;
      len_q  <= 8'd4;
      spc_q  <= 8'd5;
      p1_q   <= 8'd0;
      h1_q   <= 8'd0;
      p2_q   <= 8'd0;
      h2_q   <= 8'd0;
      word_q <= '0;
    end else begin
      if (wr) begin
        unique case (ca_i)
          19'h00: mask_q <= cd_i;
          19'h01: len_q  <= (cd_i == 8'd0) ? 8'd1 : cd_i;
          19'h02: spc_q  <= (cd_i < 8'd2) ? 8'd2 : cd_i;
          19'h03: p1_q   <= cd_i;
          19'h04: h1_q   <= cd_i;
          19'h0A: p2_q   <= cd_i;
          19'h0B: h2_q   <= cd_i;
          default: ;
        endcase
      end
      if (istb_i) word_q <= trg_word_i;
    end
  end

  always_comb begin
    cd_oe_o = !ce_n && !oe_n;
    unique case (ca_i)
      19'h00:  cd_o = mask_q;
      19'h01:  cd_o = len_q;
      19'h02:  cd_o = spc_q;
      19'h03:  cd_o = p1_q;
      19'h04:  cd_o = h1_q;
      19'h05:  cd_o = {2'b00, DETECTOR_ID};
      19'h06:  cd_o = {status_i, busy_i};
      19'h07:  cd_o = done_q;
      19'h08:  cd_o = word_q[7:0];
      19'h09:  cd_o = word_q[15:8];
      19'h0A:  cd_o = p2_q;
      19'h0B:  cd_o = h2_q;
      default: cd_o = 8'h00;
    endcase
  end

  // Pulser sequencer.
  always_ff @(posedge clk or negedge rn) begin
    if (!rn) begin
      state  <= S_IDLE;
      remain <= '0;
      gap    <= '0;
      ahead  <= '0;
      pcmd   <= '0;
      done_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (intercept) begin
          state  <= (ahead_d == 8'd0) ? S_WAIT : S_DRAIN;
          ahead  <= ahead_d;
          pcmd   <= trg_cmd_i;
          remain <= len_q - 8'd1;
          gap    <= 8'd0;
        end
        S_DRAIN: if (fifo_pop_i) begin
          ahead <= ahead - 8'd1;
          if (ahead == 8'd1) state <= S_WAIT;
        end
        S_WAIT: if (frame_i) begin
          if (gap != 8'd0)         gap   <= gap - 8'd1;
          else if (remain != 8'd0) state <= S_FIRE;
          else                     state <= S_FINAL;
        end
        S_FIRE: if (frame_i) begin
          state  <= S_WAIT;
          remain <= remain - 8'd1;
          gap    <= spc_q - 8'd2;
        end
        S_FINAL: if (frame_i) begin
          state  <= S_IDLE;
          done_q <= done_q + 8'd1;
        end
      endcase
    end
  end

 // Entries queued ahead of the intercepted pulser (its own push is one
  // cycle later) must go out first, in normal operation.
  assign ahead_d = fifo_level_i - 8'(fifo_pop_i);

  always_comb begin
    unique case (state)
      S_DRAIN: begin control_o = {1'b0, CTRL_FIFO};      trg_cmd_o = CMD_NO_TRIGGER; end
      S_IDLE:  begin control_o = {1'b0, CTRL_FIFO};      trg_cmd_o = CMD_NO_TRIGGER; end
      S_WAIT:  begin control_o = {1'b0, CTRL_MEZZ_ZERO}; trg_cmd_o = CMD_NO_TRIGGER; end
      S_FIRE:  begin control_o = {1'b0, CTRL_MEZZ_ZERO}; trg_cmd_o = pcmd;           end
      S_FINAL: begin control_o = {1'b0, CTRL_MEZZ_FIFO}; trg_cmd_o = pcmd;           end
      default: begin control_o = {1'b0, CTRL_FIFO};      trg_cmd_o = CMD_NO_TRIGGER; end
    endcase
  end

  assign det_busy_o = (state != S_IDLE) || (|busy_i);

  // Detector clocks.
  tcd_clk_div u_clk1 (
    .clk, .rst_n(rn), .restart_i(wr && (ca_i == 19'h03 || ca_i == 19'h04)),
    .period_i(p1_q), .high_i(h1_q), .clk_o(clk1_o)
  );
  tcd_clk_div u_clk2 (
    .clk, .rst_n(rn), .restart_i(wr && (ca_i == 19'h0A || ca_i == 19'h0B)),
    .period_i(p2_q), .high_i(h2_q), .clk_o(clk2_o)
  );

endmodule

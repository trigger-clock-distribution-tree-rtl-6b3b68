// VME slave interface of the Trigger/Clock driver.
//
// Makes the board's status, its phase jumper setting and the mezzanine
// configuration registers accessible from VME. The board answers A32 data
// cycles (address modifier 0x09 or 0x0D) whose address bits 31:26 equal the
// 6-bit detector ID set by the mezzanine, giving geographic addressing by
// detector. Inside that space, address bit 20 selects the mezzanine: its
// 19-bit configuration address is address bits 18:0. With bit 20 low the
// board registers answer at address bits 3:0:
//   0x0  phase jumper setting (read only)
//   0x1  detector ID (read only)
//   0x2  status {fifo_full, 2'b0, fifo_overflow, fifo_empty, sync_err, locked, busy}
//   0x3  FIFO fill level (read only)
//   0x4  write: bit 0 clears the FIFO overflow flag, bit 1 resets the mezzanine
// Data are 8 bit wide on D7..D0.
//
// The VME strobes are asynchronous to the board; AS* and DS* pass through
// two-stage synchronizers into the data-clock domain. For a mezzanine
// access the slave asserts CE# with WE# or OE# for MEZZ_WAIT cycles, then
// asserts DTACK* until DS* is released, then ends the access. Board register
// accesses are acknowledged without wait states. Data and address are taken
// when the synchronized DS* falls, at least two data-clock cycles after the
// master drove them. Geographic decoding by detector ID and the mezzanine
// bus signals follow the specification; the address map, the A32 choice and
// the wait count are this design's. An assertion checks that OE# and WE#
// are never active together and only inside CE#.
module tcd_vme_slave
  import tcd_pkg::*;
#(
  parameter int unsigned MEZZ_WAIT = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME
  input  logic        as_n,
  input  logic        ds_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [31:0] addr,
  input  logic [7:0]  d_i,
  output logic [7:0]  d_o,
  output logic        d_oe,
  output logic        dtack_n,
  // board resources
  input  logic [5:0]  detector_id,
  input  logic [5:0]  phase_jumpers,
  input  logic [7:0]  status_i,
  input  logic [7:0]  fifo_level_i,
  output logic        clr_ovf_o,
  output logic        mezz_reset_n_o,
  // mezzanine configuration bus
  output logic [18:0] ca_o,
  output logic [7:0]  cd_o,
  input  logic [7:0]  cd_i,
  output logic        ce_n,
  output logic        oe_n,
  output logic        we_n
);

  typedef enum logic [1:0] {V_IDLE, V_MEZZ, V_ACK} vstate_e;

  vstate_e    st;
  logic [1:0] as_s, ds_s;
  logic       as_l, ds_l, hit, wr_q;
  logic [7:0] rd_q;
  logic [$clog2(MEZZ_WAIT+1):0] wcnt;

  assign as_l = !as_s[1];
  assign ds_l = !ds_s[1];
  assign hit  = as_l && ds_l && (am == 6'h09 || am == 6'h0D) &&
                (addr[31:26] == detector_id);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s           <= 2'b11;
      ds_s           <= 2'b11;
      st             <= V_IDLE;
      wr_q           <= 1'b0;
      rd_q           <= '0;
      wcnt           <= '0;
      ca_o           <= '0;
      cd_o           <= '0;
      ce_n           <= 1'b1;
      oe_n           <= 1'b1;
      we_n           <= 1'b1;
      dtack_n        <= 1'b1;
      clr_ovf_o      <= 1'b0;
      mezz_reset_n_o <= 1'b1;
    end else begin
      as_s           <= {as_s[0], as_n};
      ds_s           <= {ds_s[0], ds_n};
      clr_ovf_o      <= 1'b0;
      mezz_reset_n_o <= 1'b1;
      unique case (st)
        V_IDLE: if (hit) begin
          wr_q <= !write_n;
          if (addr[20]) begin
            st   <= V_MEZZ;
            ca_o <= addr[18:0];
            cd_o <= d_i;
            ce_n <= 1'b0;
            we_n <= write_n;
            oe_n <= !write_n;
            wcnt <= '0;
          end else begin
            st      <= V_ACK;
            dtack_n <= 1'b0;
            unique case (addr[3:0])
              4'h0:    rd_q <= {2'b00, phase_jumpers};
              4'h1:    rd_q <= {2'b00, detector_id};
              4'h2:    rd_q <= status_i;
              4'h3:    rd_q <= fifo_level_i;
              default: rd_q <= 8'h00;
            endcase
            if (!write_n && addr[3:0] == 4'h4) begin
              clr_ovf_o      <= d_i[0];
              mezz_reset_n_o <= !d_i[1];
            end
          end
        end
        V_MEZZ: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == ($bits(wcnt))'(MEZZ_WAIT - 1)) begin
            rd_q    <= cd_i;
            ce_n    <= 1'b1;
            we_n    <= 1'b1;
            oe_n    <= 1'b1;
            dtack_n <= 1'b0;
            st      <= V_ACK;
          end
        end
        V_ACK: if (!ds_l) begin
          dtack_n <= 1'b1;
          st      <= V_IDLE;
        end
        default: st <= V_IDLE;
      endcase
    end
  end

  assign d_o  = rd_q;
  assign d_oe = (st == V_ACK) && !wr_q;

  // A mezzanine access is either a read or a write, and OE#/WE# are only
  // active inside CE#.
  a_mezz_bus: assert property (@(posedge clk) disable iff (!rst_n)
    (oe_n || we_n) && (!ce_n || (oe_n && we_n)));

endmodule

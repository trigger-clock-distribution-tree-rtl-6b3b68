// Trigger command FIFO of the Trigger/Clock driver.
//
// While the mezzanine plays a pulser sequence it holds the serializer, and
// commands that still concern the busy detector (accepts and aborts of
// earlier events, broadcast commands) must wait. This FIFO absorbs them,
// together with their DAQ command and token, in arrival order and releases
// them once the sequence ends. It is a plain single-clock FIFO of 20-bit
// trigger information words with first-word fall-through: head_o shows the
// oldest entry whenever empty_o is low, and pop_i removes it at the clock
// edge. A push into a full FIFO is dropped and sets the sticky overflow_o,
// cleared by clr_ovf_i. Push and pop in the same cycle are allowed.
// The depth is this design's choice; the specification gives none.
// An assertion checks that the fill level never exceeds DEPTH.
module tcd_cmd_fifo
  import tcd_pkg::*;
#(
  parameter int unsigned DEPTH = 16   // entries, a power of two
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    push_i,
  input  trg_info_t               data_i,
  input  logic                    pop_i,
  input  logic                    clr_ovf_i,
  output trg_info_t               head_o,
  output logic                    empty_o,
  output logic                    full_o,
  output logic [$clog2(DEPTH):0]  count_o,
  output logic                    overflow_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  trg_info_t     mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty_o = (count_o == '0);
  assign full_o  = (count_o == (AW+1)'(DEPTH));
  assign do_pop  = pop_i && !empty_o;
  assign do_push = push_i && (!full_o || do_pop);
  assign head_o  = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp         <= '0;
      rp         <= '0;
      count_o    <= '0;
      overflow_o <= 1'b0;
    end else begin
      if (do_push) wp <= wp + AW'(1);
      if (do_pop)  rp <= rp + AW'(1);
      count_o <= count_o + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (clr_ovf_i)                 overflow_o <= 1'b0;
      if (push_i && !do_push)        overflow_o <= 1'b1;
    end
  end

  // The fill level never leaves 0..DEPTH.
  a_level: assert property (@(posedge clk) disable iff (!rst_n)
    count_o <= (AW+1)'(DEPTH));

endmodule

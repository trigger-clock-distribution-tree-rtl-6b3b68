// Programmable clock divider used for the detector specific clocks.
//
// Produces a clock of period_i data-clock cycles that is high for the first
// high_i cycles of each period. period_i == 0 stops the clock (held low).
// The output is registered, so it is glitch free and one data-clock cycle
// behind the counter. A change of period_i or high_i takes effect at the
// next wrap of the counter; restart_i sets the counter back to zero.
module tcd_clk_div (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       restart_i,
  input  logic [7:0] period_i,
  input  logic [7:0] high_i,
  output logic       clk_o
);

  logic [7:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      clk_o <= 1'b0;
    end else if (restart_i || period_i == 8'd0) begin
      cnt   <= '0;
      clk_o <= 1'b0;
    end else begin
      cnt   <= (cnt >= period_i - 8'd1) ? 8'd0 : cnt + 8'd1;
      clk_o <= (cnt < high_i);
    end
  end

endmodule

// Testbench of the word-slot timer. A 22 ns data clock and a 110 ns RHIC
// strobe that rises 2 ns ahead of every fifth data-clock edge. After the
// first edge the slot must follow the strobe: 0 in the cycle after the edge
// that saw the strobe rise, then 1..4. Midway the strobe phase is moved by
// one data-clock period; the timer must flag the error and re-align.
module tb_tcd_frame_timer;
  logic clk = 1'b0, rst_n = 1'b1, stb = 1'b0;
  initial #1ns rst_n = 1'b0;
  logic [2:0] slot;
  logic frame, locked, sync_err;
  int checks = 0, failures = 0;
  int cyc = 0, since_rise = -1, frames = 0;
  int phase_shift = 0;
  logic stb_seen;

  tcd_frame_timer dut (.clk, .rst_n, .rhic_stb(stb), .slot_o(slot),
                       .frame_o(frame), .locked_o(locked), .sync_err_o(sync_err));

  always #11ns clk = ~clk;

  // Strobe: 110 ns period, rising 2 ns before a data-clock edge.
  initial begin
    #(11ns + 3 * 22ns - 2ns);
    forever begin
      stb = 1'b1;
      #44ns stb = 1'b0;
      #66ns;
      if (phase_shift == 1) begin
        phase_shift = 2;
        #22ns;
      end
    end
  end

  // Reference: count edges since the edge that saw the strobe rise.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    stb_seen <= stb;
    if (stb && !stb_seen) since_rise <= 0;
    else if (since_rise >= 0) since_rise <= since_rise + 1;
  end

  always @(negedge clk) if (rst_n && since_rise >= 0 && cyc > 12) begin
    checks++;
    if (int'(slot) != since_rise % 5) begin
      failures++;
      $display("FAIL cyc %0d slot %0d expected %0d", cyc, slot, since_rise % 5);
    end
    if (frame) frames++;
  end

  initial begin
    #50ns rst_n = 1'b1;
    repeat (100) @(posedge clk);
    checks++; if (!locked || sync_err) begin failures++; $display("FAIL lock"); end
    phase_shift = 1;
    repeat (100) @(posedge clk);
    checks++; if (!sync_err) begin failures++; $display("FAIL no sync error flagged"); end
    checks++; if (frames < 35) begin failures++; $display("FAIL frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

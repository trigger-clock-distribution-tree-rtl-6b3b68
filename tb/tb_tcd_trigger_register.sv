// Testbench of the trigger backplane register. Each 110 ns RHIC strobe
// period the backplane carries a new random value, changing 5 ns after the
// strobe edge (the hold time). The value present at each edge must be captured exactly once,
// unchanged, with one stb_o pulse per period, whatever the phase of the
// strobe to the 22 ns data clock (several phases are tried).
module tb_tcd_trigger_register;
  import tcd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, stb = 1'b0;
  initial #1ns rst_n = 1'b0;
  backplane_t bp, bp_q;
  logic stb_o;
  int checks = 0, failures = 0, pulses = 0, periods = 0;
  backplane_t expq[$];
  time phase = 3ns;

  tcd_trigger_register dut (.clk, .rst_n, .rhic_stb(stb), .bp_i(bp), .bp_q, .stb_o);

  always #11ns clk = ~clk;

  initial begin
    bp = '0;
    #200ns rst_n = 1'b1;
    for (int ph = 0; ph < 5; ph++) begin
      for (int k = 0; k < 20; k++) begin
        #(phase);
        stb = 1'b1;
        periods++;
        expq.push_back(bp);
        #5ns bp = {$urandom, $urandom};
        #35ns stb = 1'b0;
        #(70ns - phase);
      end
      phase = 3ns + ph * 4ns + 1ns;
    end
    #300ns;
    checks++;
    if (pulses != periods) begin failures++; $display("FAIL pulses %0d periods %0d", pulses, periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (stb_o) begin
    backplane_t e;
    pulses++;
    checks++;
    e = expq.pop_front();
    if (bp_q != e) begin failures++; $display("FAIL got %h exp %h", bp_q, e); end
  end

  initial begin
    #100us; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

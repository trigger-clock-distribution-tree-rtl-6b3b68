// Testbench of the redundancy counter: it must count cable strobe rising
// edges (any pulse length), restart from zero on clear and on master-reset,
// and ignore every other command.
module tb_rhic_strobe_counter;
  import tcd_pkg::*;
  logic dclk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;
  logic stb = 0, valid = 0, fer;
  logic [3:0] cmd = 0;
  logic [31:0] cnt;
  int checks = 0, failures = 0, model = 0, nclr = 0, nres = 0;

  rhic_strobe_counter dut (.dclk, .rst_n, .rhic_stb(stb), .cmd_valid(valid), .cmd,
    .count_o(cnt), .fe_reset_o(fer));

  always #11ns dclk = ~dclk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #60ns rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      int hi = 1 + $urandom % 3;
      @(posedge dclk); stb = 1; model++;
      repeat (hi) @(posedge dclk);
      stb = 0;
      repeat (4 - hi) @(posedge dclk);
      // command at the end of the period
      cmd = 4'($urandom % 6);
      valid = ($urandom % 8) == 0;
      @(posedge dclk); valid = 0;
      @(negedge dclk); #1ns;
      chk(cnt == 32'(model), $sformatf("count %0d expected %0d", cnt, model));
    end
    chk(nclr > 3 && nres > 3, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of clearing: a valid clear or master-reset restarts the count
  always @(negedge dclk) if (valid && (cmd == 4'd1 || cmd == 4'd2)) begin
    model = 0;
    if (cmd == 4'd1) nclr++; else nres++;
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

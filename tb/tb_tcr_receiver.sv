// Testbench of the Trigger/Clock receiver. A cable model sends random
// triggers (about half of them no-trigger) as five 4-bit words per 110 ns
// strobe period, words changing at the data-clock rising edge and the strobe
// high in the first two slots. Checked every period: the recovered command,
// DAQ command and token, the validity pulse once per period, the trigger
// command output holding the last non-zero command from slot 0 on, and the
// two bytes read through the output-enabled bus with the read strobe.
module tb_tcr_receiver;
  import tcd_pkg::*;
  logic dclk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;
  logic stb = 0, oe_n = 1, rd_n = 1, valid, boe;
  logic [3:0] d = 0, tcmd, cmd, daq;
  logic [11:0] tok;
  logic [7:0] bus;
  int checks = 0, failures = 0, nvalid = 0, periods = 0, nz = 0;
  logic [3:0] last_nz = 0;

  tcr_receiver dut (.dclk, .rst_n, .rhic_stb(stb), .d, .oe_n, .rd_stb_n(rd_n),
    .trg_cmd_o(tcmd), .bus_o(bus), .bus_oe_o(boe), .cmd_valid_o(valid),
    .cmd_o(cmd), .daq_o(daq), .token_o(tok));

  always #11ns dclk = ~dclk;
  always @(negedge dclk) if (valid) nvalid++;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    trg_info_t t;
    #60ns rst_n = 1'b1;
    repeat (3) @(posedge dclk);
    for (int n = 0; n < 300; n++) begin
      t = trg_info_t'($urandom);
      if ($urandom % 2) t = '0;
      @(posedge dclk); #1ns d = t.cmd; stb = 1;
      @(negedge dclk); #1ns
      if (n > 0) begin
        if (t.cmd != 0) last_nz = t.cmd;
        chk(tcmd == last_nz, "last non-zero command after slot 0");
      end
      @(posedge dclk); #1ns d = t.daq;
      @(posedge dclk); #1ns d = t.token[11:8]; stb = 0;
      @(posedge dclk); #1ns d = t.token[7:4];
      @(posedge dclk); #1ns d = t.token[3:0];
      @(negedge dclk); #1ns;
      periods++;
      chk(valid, "valid pulse");
      chk(cmd == t.cmd && daq == t.daq && tok == t.token, "fields");
      if (t.cmd != 0) begin
        nz++;
        // read the two bytes during the next period
        fork
          automatic trg_info_t tt = t;
          begin
            oe_n = 0; #1ns chk(boe, "bus enabled");
            chk(bus == {tt.daq, tt.token[11:8]}, "byte 0");
            @(posedge dclk) rd_n = 0; @(posedge dclk) rd_n = 1; @(negedge dclk); #1ns;
            chk(bus == tt.token[7:0], "byte 1");
            oe_n = 1; #1ns chk(!boe, "bus released");
          end
        join_none
      end
    end
    #200ns;
    chk(nvalid == periods, $sformatf("valid pulses %0d periods %0d", nvalid, periods));
    chk(nz > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

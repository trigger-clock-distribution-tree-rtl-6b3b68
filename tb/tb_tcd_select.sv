// Testbench of the trigger decode logic. Random backplane words with random
// detector selects are presented for several detector IDs. Expected:
// readout related commands are taken only with the own select bit set,
// clear/master-reset/spare always with DAQ command and token zeroed,
// no-trigger never; the own BUSY line is low exactly when mezzanine or DAQ
// busy is set, the others stay high. All with one cycle of latency.
module tb_tcd_select;
  import tcd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;
  logic [5:0] det_id;
  backplane_t bp;
  logic stb, mb, db, push, istb, inv;
  trg_info_t info;
  logic [7:0] bsy_n;
  int checks = 0, failures = 0, taken = 0, bcast = 0;

  tcd_select dut (.clk, .rst_n, .detector_id(det_id), .bp_q(bp), .stb_i(stb),
                  .mezz_busy(mb), .daq_busy(db), .push_o(push), .info_o(info),
                  .istb_o(istb), .involved_o(inv), .bsy_n_o(bsy_n));

  always #11ns clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic exp_take, g1;
    logic [2:0] d;
    det_id = 6'o30; bp = '0; stb = 0; mb = 0; db = 0;
    #50ns rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if (n % 100 == 0) det_id = 6'($urandom);
      bp  = {$urandom, $urandom};
      stb = ($urandom % 2) == 0;
      mb  = ($urandom % 4) == 0;
      db  = ($urandom % 4) == 0;
      d   = det_id[5:3];
      g1  = bp.cmd < 4 && bp.cmd != 0;
      exp_take = stb && (g1 || (bp.sel[d] && bp.cmd != 0));
      @(negedge clk);
      chk(push == exp_take && istb == exp_take, "take");
      if (exp_take) begin
        taken++;
        if (g1) bcast++;
        chk(info.cmd == bp.cmd, "cmd");
        chk(info.daq == (g1 ? 4'd0 : bp.daq) && info.token == (g1 ? 12'd0 : bp.token), "daq/token");
      end
      if (stb) chk(inv == bp.sel[d], "involved");
      for (int i = 0; i < 8; i++)
        chk(bsy_n[i] == ((i == int'(d)) ? !(mb || db) : 1'b1), "busy line");
      stb = 0;
    end
    chk(taken > 50 && bcast > 10, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

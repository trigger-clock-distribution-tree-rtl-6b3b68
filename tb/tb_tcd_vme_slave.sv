// Testbench of the VME slave. A VME master task runs asynchronous A32 D8
// cycles; the mezzanine bus ends in a small register model. Checked: writes
// and reads of mezzanine addresses arrive with the right address and data,
// board registers read back jumpers, ID, status and FIFO level, the control
// register pulses overflow-clear and mezzanine reset, and cycles addressed
// to another detector ID or with a foreign address modifier get no DTACK*.
module tb_tcd_vme_slave;
  import tcd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;
  logic as_n = 1, ds_n = 1, write_n = 1, d_oe, dtack_n, clr, mrst_n, ce_n, oe_n, we_n;
  logic [5:0] am = 6'h09;
  logic [31:0] addr = '0;
  logic [7:0] d_i = '0, d_o, cd_w, cd_r;
  logic [18:0] ca;
  logic [7:0] mem [logic [18:0]];
  int checks = 0, failures = 0, nclr = 0, nrst = 0;
  localparam logic [5:0] ID = 6'o21;

  tcd_vme_slave dut (.clk, .rst_n, .as_n, .ds_n, .write_n, .am, .addr, .d_i, .d_o,
    .d_oe, .dtack_n, .detector_id(ID), .phase_jumpers(6'd13), .status_i(8'h5A),
    .fifo_level_i(8'd7), .clr_ovf_o(clr), .mezz_reset_n_o(mrst_n), .ca_o(ca),
    .cd_o(cd_w), .cd_i(cd_r), .ce_n, .oe_n, .we_n);

  always #11ns clk = ~clk;

  // mezzanine register model
  assign cd_r = (!ce_n && !oe_n && mem.exists(ca)) ? mem[ca] : 8'h00;
  always @(posedge clk) if (!ce_n && !we_n) mem[ca] = cd_w;
  always @(posedge clk) begin
    if (clr) nclr++;
    if (!mrst_n) nrst++;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic vme(input logic [31:0] a, input logic w, input logic [7:0] wd,
                     output logic [7:0] rdv, output logic acked);
    int t;
    addr = a; write_n = !w; d_i = wd;
    #15ns as_n = 0;
    #10ns ds_n = 0;
    t = 0; acked = 0;
    while (t < 40 && dtack_n) begin #5ns; t++; end
    if (!dtack_n) begin
      acked = 1;
      if (!w) begin chk(d_oe, "data driven on read"); rdv = d_o; end
    end
    #10ns ds_n = 1; as_n = 1;
    t = 0;
    while (t < 40 && !dtack_n) begin #5ns; t++; end
    chk(dtack_n, "DTACK released");
    #30ns;
  endtask

  function automatic logic [31:0] ma(input logic [5:0] id, input int off);
    return {id, 5'b0, 1'b1, 1'b0, 19'(off)};
  endfunction

  initial begin
    logic [7:0] v; logic ok;
    #60ns rst_n = 1'b1;
    #50ns;
    for (int i = 0; i < 20; i++) begin
      int off = $urandom % 524288;
      logic [7:0] val = 8'($urandom);
      vme(ma(ID, off), 1, val, v, ok); chk(ok, "write acked");
      chk(mem.exists(19'(off)) && mem[19'(off)] == val, "mezzanine write");
      vme(ma(ID, off), 0, 0, v, ok); chk(ok && v == val, "mezzanine read");
    end
    vme({ID, 26'h0}, 0, 0, v, ok); chk(ok && v == 8'd13, "jumpers");
    vme({ID, 26'h1}, 0, 0, v, ok); chk(ok && v == 8'(ID), "detector id");
    vme({ID, 26'h2}, 0, 0, v, ok); chk(ok && v == 8'h5A, "status");
    vme({ID, 26'h3}, 0, 0, v, ok); chk(ok && v == 8'd7, "fifo level");
    vme({ID, 26'h4}, 1, 8'h01, v, ok); chk(ok && nclr == 1 && nrst == 0, "clear overflow");
    vme({ID, 26'h4}, 1, 8'h02, v, ok); chk(ok && nclr == 1 && nrst == 1, "mezzanine reset");
    vme({6'o22, 26'h1}, 0, 0, v, ok); chk(!ok, "other detector ignored");
    am = 6'h3D;
    vme({ID, 26'h1}, 0, 0, v, ok); chk(!ok, "foreign modifier ignored");
    am = 6'h0D;
    vme({ID, 26'h1}, 0, 0, v, ok); chk(ok, "modifier 0x0D");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// Testbench of the trigger command FIFO against a queue model: random
// pushes and pops, including pushes when full (dropped, overflow set) and
// pops when empty (ignored), simultaneous push and pop, and clearing of the
// overflow flag. Head, empty, full and fill level are compared every cycle.
module tb_tcd_cmd_fifo;
  import tcd_pkg::*;
  localparam int D = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;
  logic push, pop, clr, empty, full, ovf;
  trg_info_t din, head;
  logic [$clog2(D):0] cnt;
  trg_info_t q[$];
  logic movf = 1'b0;
  int checks = 0, failures = 0, nfull = 0, ndrop = 0;

  tcd_cmd_fifo #(.DEPTH(D)) dut (.clk, .rst_n, .push_i(push), .data_i(din),
    .pop_i(pop), .clr_ovf_i(clr), .head_o(head), .empty_o(empty), .full_o(full),
    .count_o(cnt), .overflow_o(ovf));

  always #11ns clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    push = 0; pop = 0; clr = 0; din = '0;
    #50ns rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      chk(int'(cnt) == q.size(), "count");
      chk(ovf == movf, "overflow");
      if (q.size() != 0) chk(head == q[0], "head");
      if (full) nfull++;
      bias = (n / 300) % 2 ? 3 : 1;   // alternate filling and draining
      push = ($urandom % 4) < bias;
      pop  = ($urandom % 4) < 4 - bias;
      clr  = ($urandom % 50) == 0;
      din  = trg_info_t'($urandom);
      @(posedge clk);
      begin
        logic dp, dpu;
        dp  = pop && q.size() != 0;
        dpu = push && (q.size() < D || dp);
        if (dp) void'(q.pop_front());
        if (dpu) q.push_back(din);
        if (clr) movf = 1'b0;
        if (push && !dpu) begin movf = 1'b1; ndrop++; end
      end
    end
    chk(nfull > 10 && ndrop > 5, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// Testbench of the serializer. A slot counter, a queue standing in for the
// FIFO and random control codes drive it for many strobe periods. For every
// period the expected 20 bits are worked out from the control code (FIFO
// entry, mezzanine command with FIFO / previous / zero DAQ command and
// token) and compared with the five words seen on the data lines, in the
// order command, DAQ, token 11:8, 7:4, 3:0, with the RHIC strobe high in
// the first two slots only. FIFO pops are checked against the model.
module tb_tcd_serializer;
  import tcd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;
  logic [2:0] slot, ctrl;
  logic locked, empty, pop, stb, load;
  trg_info_t head, sent, prev = '0;
  logic [3:0] mz, d;
  trg_info_t q[$];
  int checks = 0, failures = 0, cyc = 0;
  int nctl[4] = '{0, 0, 0, 0};

  tcd_serializer dut (.clk, .rst_n, .slot_i(slot), .locked_i(locked), .head_i(head),
    .empty_i(empty), .pop_o(pop), .control_i(ctrl), .mz_cmd_i(mz), .d_o(d),
    .rhic_stb_o(stb), .sent_o(sent), .load_o(load));

  always #11ns clk = ~clk;
  assign slot  = 3'(cyc % 5);
  assign empty = q.size() == 0;
  assign head  = empty ? trg_info_t'(20'hABCDE) : q[0];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    trg_info_t e;
    logic tf;
    locked = 0; ctrl = 0; mz = 0;
    #50ns rst_n = 1'b1;
    @(negedge clk);
    chk(d == 0 && !stb, "idle while unlocked");
    locked = 1;
    for (int n = 0; n < 400; n++) begin
      // choose the period's inputs in slot 1
      do @(negedge clk); while (slot != 3'd1);
      ctrl = 3'($urandom % 4);
      mz   = 4'($urandom);
      if ($urandom % 2) q.push_back(trg_info_t'($urandom));
      nctl[ctrl]++;
      // work out what slot 4 will choose
      e = '0; tf = 0;
      unique case (ctrl[1:0])
        2'd0: if (q.size() != 0) begin e = q[0]; tf = 1; end
        2'd1: begin e.cmd = mz; if (q.size() != 0) begin e.daq = q[0].daq; e.token = q[0].token; tf = 1; end end
        2'd2: begin e.cmd = mz; e.daq = prev.daq; e.token = prev.token; end
        2'd3: e.cmd = mz;
      endcase
      do @(negedge clk); while (slot != 3'd4);
      chk(pop == tf, "pop");
      @(posedge clk);
      #1ns;
      if (tf) begin
        if (e.cmd != 0) prev = e;
        void'(q.pop_front());
      end
      @(negedge clk);
      chk(d == e.cmd, $sformatf("command word %h expected %h", d, e.cmd));
      chk(stb, "strobe slot 0");
      chk(sent == e, "sent");
    end
    for (int i = 0; i < 4; i++) chk(nctl[i] > 50, "control coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Word checks for slots 1..4 run beside the main loop.
  trg_info_t cur;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (locked && rst_n) begin
    if (slot == 3'd0) cur = sent;
    else if (cyc > 20) begin
      logic [3:0] w;
      w = (slot == 1) ? cur.daq : (slot == 2) ? cur.token[11:8] :
          (slot == 3) ? cur.token[7:4] : cur.token[3:0];
      chk(d == w, $sformatf("slot %0d: %h expected %h", slot, d, w));
      chk(stb == (slot == 1), "strobe slot");
    end
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

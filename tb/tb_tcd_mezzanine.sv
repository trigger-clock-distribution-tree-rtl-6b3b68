// Testbench of the detector mezzanine. Configuration registers are written
// and read back over the mezzanine bus. Pulser commands are offered with the
// intercept mask on and off, for several sequence lengths and spacings, and
// the control code and command sampled in slot 4 of every strobe period are
// compared with the expected sequence: one idle period, then per fire-only
// pulse (pulser, control 3) followed by spacing-1 idle periods (control 3,
// command 0), then the final pulser with control 1, then control 0. Busy
// must cover the whole sequence. Entries queued ahead of an intercepted
// pulser must first leave with control 0. Both detector clocks are measured.
module tb_tcd_mezzanine;
  import tcd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;
  logic frame, istb, inv, busy, c1, c2, cd_oe, ce_n, oe_n, we_n;
  logic [3:0] cmd_i, busy_i, status_i, mz_cmd;
  logic [15:0] word;
  logic [5:0] did;
  logic [2:0] ctrl;
  logic [18:0] ca;
  logic [7:0] cd_w, cd_r;
  int checks = 0, failures = 0, cyc = 0, seqs = 0;
  logic [7:0] level = 0;
  logic fpop = 0;

  tcd_mezzanine dut (.clk, .rst_n, .frame_i(frame), .involved_i(inv), .istb_i(istb),
    .trg_cmd_i(cmd_i), .trg_word_i(word), .busy_i, .status_i,
    .fifo_level_i(level), .fifo_pop_i(fpop), .detector_id_o(did),
    .det_busy_o(busy), .clk1_o(c1), .clk2_o(c2), .control_o(ctrl), .trg_cmd_o(mz_cmd),
    .ca_i(ca), .cd_i(cd_w), .cd_o(cd_r), .cd_oe_o(cd_oe), .ce_n, .oe_n, .we_n,
    .reset_n(1'b1));

  always #11ns clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign frame = (cyc % 5) == 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input int a, input int v);
    @(negedge clk); ca = 19'(a); cd_w = 8'(v); ce_n = 0; we_n = 0;
    @(negedge clk); ce_n = 1; we_n = 1;
  endtask

  task automatic rd(input int a, output logic [7:0] v);
    @(negedge clk); ca = 19'(a); ce_n = 0; oe_n = 0;
    #1ns v = cd_r; chk(cd_oe, "read enable");
    @(negedge clk); ce_n = 1; oe_n = 1;
  endtask

  // Wait for slot 4 (the cycle before a frame cycle) and return the outputs.
  task automatic sample(output logic [2:0] c, output logic [3:0] m);
    do @(negedge clk); while ((cyc % 5) != 4);
    c = ctrl; m = mz_cmd;
  endtask

  task automatic run_seq(input int p, input int len, input int spc, input logic masked,
                         input int ahead = 0);
    logic [2:0] c; logic [3:0] m;
    // offer the pulser in slot 2
    do @(negedge clk); while ((cyc % 5) != 2);
    istb = 1; inv = 1; cmd_i = 4'(8 + p); word = 16'(1000 + p); level = 8'(ahead);
    @(negedge clk); istb = 0; level = 8'(ahead + 1);
    if (!masked) begin
      sample(c, m); chk(c == 3'd0, "not intercepted");
      return;
    end
    #1ns chk(busy, "busy at start");
    // entries queued ahead of the pulser leave first, in normal operation
    for (int k = 0; k < ahead; k++) begin
      sample(c, m); chk(c == 3'd0, "drain ahead");
      fpop = 1; @(negedge clk); fpop = 0; level--;
    end
    if (ahead == 0) begin
      sample(c, m); chk(c == 3'd3 && m == 4'd0, "first idle");
    end
    for (int k = 0; k < len - 1; k++) begin
      sample(c, m); chk(c == 3'd3 && m == 4'(8 + p), "fire-only pulse");
      chk(busy, "busy during sequence");
      for (int g = 0; g < spc - 1; g++) begin
        sample(c, m); chk(c == 3'd3 && m == 4'd0, "gap");
      end
    end
    sample(c, m); chk(c == 3'd1 && m == 4'(8 + p), "final pulse");
    chk(busy, "busy at final");
    sample(c, m); chk(c == 3'd0, "back to normal");
    chk(!busy, "busy released");
    seqs++;
  endtask

  initial begin
    logic [7:0] v;
    int hi, per, t0, t1;
    istb = 0; inv = 0; cmd_i = 0; word = 0; busy_i = 0; status_i = 0;
    ca = 0; cd_w = 0; ce_n = 1; oe_n = 1; we_n = 1;
    #50ns rst_n = 1'b1;
    chk(did == 6'o30, "detector id");
    rd(5, v); chk(v == 8'o30, "id register");
    wr(0, 8'h05); wr(1, 3); wr(2, 5);
    rd(0, v); chk(v == 8'h05, "mask readback");
    rd(1, v); chk(v == 8'd3, "length readback");
    run_seq(0, 3, 5, 1'b1);
    run_seq(1, 3, 5, 1'b0);
    run_seq(2, 3, 5, 1'b1);
    rd(8, v); chk(v == 8'(1002), "trigger word low");
    rd(7, v); chk(v == 8'd2, "sequence count");
    wr(1, 1); wr(2, 7);
    run_seq(0, 1, 7, 1'b1);
    wr(1, 4); wr(2, 7);
    run_seq(2, 4, 7, 1'b1);
    wr(1, 2); wr(2, 5);
    run_seq(0, 2, 5, 1'b1, 3);
    // busy returned on the cables
    busy_i = 4'b0100; status_i = 4'b1001; #1ns chk(busy, "cable busy");
    rd(6, v); chk(v == 8'h94, "busy/status register");
    busy_i = 0;
    // detector clocks: clock 1 period 15 high 7, clock 2 period 4 high 2
    wr(3, 15); wr(4, 7); wr(8'h0A, 4); wr(8'h0B, 2);
    repeat (40) @(posedge clk);
    @(posedge c1); t0 = cyc; @(negedge c1); hi = cyc - t0; @(posedge c1); per = cyc - t0;
    chk(per == 15 && hi == 7, $sformatf("clock 1 %0d/%0d", hi, per));
    @(posedge c2); t0 = cyc; @(negedge c2); hi = cyc - t0; @(posedge c2); per = cyc - t0;
    chk(per == 4 && hi == 2, $sformatf("clock 2 %0d/%0d", hi, per));
    chk(seqs == 5, "sequences run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

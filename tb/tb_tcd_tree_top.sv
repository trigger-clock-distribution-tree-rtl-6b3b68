// End-to-end testbench of one branch of the tree, at the default parameters.
//
// A trigger control unit model puts a random trigger action word on the
// backplane every 110 ns RHIC strobe: mostly no-trigger, plus triggers,
// pulsers, config, accepts, aborts, clear and master-reset, with random
// detector selects. It sends no new readout trigger or pulser to the
// detector while its backplane BUSY line is low, as the trigger system
// does, keeps readout triggers at least 5 strobes apart (the shortest
// spacing any detector needs), but keeps sending accepts, aborts and broadcasts. A clock model
// generates the 22 ns data clock 2 ns behind the delayed strobe.
//
// The VME master first reads the phase jumpers and detector ID, then
// configures the mezzanine: pulser 0 and 2 intercepted, sequences of 3
// pulses spaced 5 strobes, both detector clocks running.
//
// Checked at each of the four readout boards: the sequence of non-idle
// triggers equals the commands taken for this detector, in order, with
// every intercepted pulser expanded to its fire-only copies (token zero)
// followed by the original with its token; no trigger takes longer than 5
// strobe periods from the backplane to the receiver unless it was held
// behind a pulser sequence; fire-only pulses are 5 periods apart; the
// receiver's trigger command output holds the last non-zero command; the
// redundancy counter restarts at every clear or master-reset. Each
// mechanism (intercepted sequence, commands held in the FIFO, broadcast to
// an unselected detector, backplane busy, clear, master-reset, VME access
// to board and mezzanine, detector clocks) must occur at least once.
module tb_tcd_tree_top;
  import tcd_pkg::*;
  localparam int NC = 4;
  localparam time TSTB = 110ns;
  localparam logic [5:0] ID = 6'o30;

  logic rhic_stb = 1'b0, dly, dclk = 1'b0, rst_n = 1'b1;
  logic [5:0] jump = 6'd7;
  backplane_t bp = '0;
  logic [7:0] bsy_n;
  logic daq_busy = 1'b0;
  logic as_n = 1, ds_n = 1, write_n = 1, d_oe, dtack_n;
  logic [5:0] am = 6'h09;
  logic [31:0] addr = '0;
  logic [7:0] vd_i = '0, vd_o;
  cable_t [NC-1:0] cable;
  logic [NC-1:0] fe_busy = '0, fe_status = '0, rx_oe_n = '1, rx_rd_n = '1;
  logic [NC-1:0][3:0] rx_tcmd, rx_cmd, rx_daq;
  logic [NC-1:0][7:0] rx_bus;
  logic [NC-1:0] rx_boe, rx_valid, rx_fer;
  logic [NC-1:0][11:0] rx_tok;
  logic [NC-1:0][31:0] rx_cnt;
  trg_info_t sent;
  logic sent_load, det_busy;

  tcd_tree_top dut (
    .rhic_stb, .phase_jumpers(jump), .rhic_stb_dly_o(dly), .dclk, .rst_n,
    .bp_i(bp), .bsy_n_o(bsy_n), .daq_busy, .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_am(am), .vme_addr(addr), .vme_d_i(vd_i),
    .vme_d_o(vd_o), .vme_d_oe(d_oe), .vme_dtack_n(dtack_n), .cable_o(cable),
    .fe_busy_i(fe_busy), .fe_status_i(fe_status), .rx_oe_n, .rx_rd_stb_n(rx_rd_n),
    .rx_trg_cmd_o(rx_tcmd), .rx_bus_o(rx_bus), .rx_bus_oe_o(rx_boe),
    .rx_valid_o(rx_valid), .rx_cmd_o(rx_cmd), .rx_daq_o(rx_daq),
    .rx_token_o(rx_tok), .rx_strobes_o(rx_cnt), .rx_fe_reset_o(rx_fer),
    .sent_o(sent), .sent_load_o(sent_load), .det_busy_o(det_busy));

  int checks = 0, failures = 0;
  int n_seq = 0, n_held = 0, n_bcast = 0, n_busy = 0, n_clear = 0, n_mreset = 0;
  int n_vme = 0, n_clk1 = 0, n_clk2 = 0, n_trig = 0, n_acc = 0, max_lat = 0;
  int period = 0, last_g2 = 0;
  bit  run_tcu = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // RHIC strobe, free running, 40 ns high.
  initial begin
    #(TSTB);
    forever begin
      rhic_stb = 1'b1; #40ns rhic_stb = 1'b0; #(TSTB - 40ns);
    end
  end
  always @(posedge rhic_stb) period++;

  // Clock multiplier model: 5x, locked 2 ns behind the delayed strobe.
  initial begin
    @(posedge dly);
    #2ns;
    forever begin dclk = 1'b1; #11ns dclk = 1'b0; #11ns; end
  end

  initial begin
    #5ns rst_n = 1'b0;
    #1us rst_n = 1'b1;
  end

  // ---------------------------------------------------------------- VME
  task automatic vme(input logic [31:0] a, input logic w, input logic [7:0] wd,
                     output logic [7:0] rdv);
    int t = 0;
    addr = a; write_n = !w; vd_i = wd;
    #15ns as_n = 0;
    #10ns ds_n = 0;
    while (t < 100 && dtack_n) begin #5ns; t++; end
    chk(!dtack_n, "VME DTACK");
    if (!w) rdv = vd_o;
    n_vme++;
    #10ns ds_n = 1; as_n = 1;
    t = 0;
    while (t < 100 && !dtack_n) begin #5ns; t++; end
    #30ns;
  endtask

  function automatic logic [31:0] mz(input int off);
    return {ID, 5'b0, 1'b1, 1'b0, 19'(off)};
  endfunction

  // ------------------------------------------------------- expectations
  typedef struct { trg_info_t t; int period; bit may_wait; } exp_t;
  exp_t expq[NC][$];
  logic [3:0] last_nz[NC];
  int last_fire[NC];
  int cnt_model[NC];
  logic [3:0] mask = 4'b0101;
  localparam int SEQ_LEN = 3, SPACING = 5;
  int seq_until = 0;   // period up to which commands may wait behind a sequence

  function automatic void expect_cmd(input trg_info_t t, input int p);
    bit intercepted;
    intercepted = is_pulser(t.cmd) && mask[t.cmd[1:0]];
    for (int r = 0; r < NC; r++) begin
      if (intercepted) begin
        for (int k = 0; k < SEQ_LEN - 1; k++)
          expq[r].push_back('{t: '{cmd: t.cmd, daq: 4'd0, token: 12'd0}, period: p, may_wait: 1});
        expq[r].push_back('{t: t, period: p, may_wait: 1});
      end else begin
        expq[r].push_back('{t: t, period: p, may_wait: (p <= seq_until)});
      end
    end
    if (intercepted) begin
      n_seq++;
      seq_until = p + 3 + SEQ_LEN * SPACING;
    end
  endfunction

  // Trigger control unit model: changes the backplane 5 ns after each edge.
  always @(posedge rhic_stb) begin
    #5ns;
    if (run_tcu) begin
      backplane_t b;
      int r;
      logic busy_det;
      r = $urandom % 100;
      busy_det = !bsy_n[3];
      b = '0;
      b.sel  = 8'($urandom);
      b.word = 16'($urandom);
      if (busy_det) n_busy++;
      if (r < 40)      b.cmd = CMD_NO_TRIGGER;
      else if (r < 55) b.cmd = 4'(4 + $urandom % 4);        // triggers
      else if (r < 67) b.cmd = 4'(8 + $urandom % 4);        // pulsers
      else if (r < 70) b.cmd = CMD_CONFIG;
      else if (r < 90) b.cmd = 4'(13 + $urandom % 3);       // abort, L1, L2
      else if (r < 95) b.cmd = CMD_CLEAR;
      else if (r < 98) b.cmd = CMD_MASTER_RESET;
      else             b.cmd = CMD_SPARE;
      // the trigger system respects the detector busy for new events
      // and keeps readout triggers at least 5 strobes apart
      if (is_group2(b.cmd) && (busy_det || period - last_g2 < 5)) b.cmd = CMD_NO_TRIGGER;
      if (is_group2(b.cmd)) last_g2 = period;
      if (!is_group1(b.cmd)) begin
        b.daq   = 4'($urandom);
        b.token = 12'(1 + $urandom % 4095);
      end
      bp = b;
      // expected at the receivers
      if (b.cmd != CMD_NO_TRIGGER && (is_group1(b.cmd) || b.sel[3])) begin
        trg_info_t t;
        t.cmd = b.cmd;
        t.daq = is_group1(b.cmd) ? 4'd0 : b.daq;
        t.token = is_group1(b.cmd) ? 12'd0 : b.token;
        if (is_group1(b.cmd) && !b.sel[3]) n_bcast++;
        expect_cmd(t, period);
      end
    end else begin
      bp = '0;
    end
  end

  // ------------------------------------------------------- receivers
  for (genvar r = 0; r < NC; r++) begin : g_chk
    logic stb_q;
    always @(negedge cable[r].dclk or negedge rst_n) begin
      stb_q <= cable[r].rhic_stb;
      if (!rst_n) cnt_model[r] = 0;
      else if (cable[r].rhic_stb && !stb_q) cnt_model[r] = cnt_model[r] + 1;
      if (rx_valid[r]) begin
        if (rx_cmd[r] == CMD_CLEAR || rx_cmd[r] == CMD_MASTER_RESET) cnt_model[r] = 0;
        if (rx_cmd[r] != CMD_NO_TRIGGER) begin
          exp_t e;
          int lat;
          last_nz[r] = rx_cmd[r];
          if (expq[r].size() == 0) begin
            chk(0, $sformatf("board %0d: unexpected command %0d", r, rx_cmd[r]));
          end else begin
            e = expq[r].pop_front();
            chk(rx_cmd[r] == e.t.cmd && rx_daq[r] == e.t.daq && rx_tok[r] == e.t.token,
                $sformatf("board %0d: got %h/%h/%h expected %h/%h/%h", r, rx_cmd[r],
                          rx_daq[r], rx_tok[r], e.t.cmd, e.t.daq, e.t.token));
            lat = period - e.period;
            if (!e.may_wait) begin
              chk(lat <= 5, $sformatf("latency %0d strobes", lat));
              if (lat > max_lat) max_lat = lat;
            end else if (r == 0 && lat > 2 && !is_pulser(rx_cmd[r])) n_held++;
            if (r == 0) begin
              if (rx_cmd[r] == CMD_CLEAR) n_clear++;
              if (rx_cmd[r] == CMD_MASTER_RESET) n_mreset++;
              if (rx_cmd[r] >= 4 && rx_cmd[r] <= 7) n_trig++;
              if (rx_cmd[r] >= 13) n_acc++;
            end
            if (is_pulser(rx_cmd[r]) && mask[rx_cmd[r][1:0]]) begin
              if (rx_tok[r] == 0 && last_fire[r] > 0 && period - last_fire[r] < 20)
                chk(period - last_fire[r] == SPACING, "pulse spacing");
              last_fire[r] = (rx_tok[r] == 0) ? period : 0;
            end
          end
        end
      end
      if (rx_valid[r] && period > 20)
        chk(rx_tcmd[r] == last_nz[r], "last non-zero command held");
    end
  end

  // redundancy counters, checked once per period
  always @(posedge rhic_stb) if (period > 20 && rst_n) begin
    #60ns;
    for (int r = 0; r < NC; r++)
      chk(rx_cnt[r] == 32'(cnt_model[r]), $sformatf("board %0d strobe count %0d expected %0d",
          r, rx_cnt[r], cnt_model[r]));
  end

  always @(posedge cable[0].clk1) n_clk1++;
  always @(posedge cable[0].clk2) n_clk2++;

  // ------------------------------------------------------- main
  initial begin
    logic [7:0] v;
    for (int r = 0; r < NC; r++) begin last_nz[r] = 0; last_fire[r] = 0; cnt_model[r] = 0; end
    #2us;
    vme({ID, 26'h0}, 0, 0, v); chk(v == 8'(jump), "phase jumper readback");
    vme({ID, 26'h1}, 0, 0, v); chk(v == 8'(ID), "detector ID readback");
    vme(mz(0), 1, 8'(mask), v);
    vme(mz(1), 1, 8'(SEQ_LEN), v);
    vme(mz(2), 1, 8'(SPACING), v);
    vme(mz(3), 1, 8'd15, v);  vme(mz(4), 1, 8'd7, v);    // SVT-like RHIC/3
    vme(mz(8'h0A), 1, 8'd5, v); vme(mz(8'h0B), 1, 8'd2, v); // RHIC rate
    vme(mz(1), 0, 0, v); chk(v == 8'(SEQ_LEN), "mezzanine readback");
    @(posedge rhic_stb);
    run_tcu = 1;
    repeat (1500) @(posedge rhic_stb);
    run_tcu = 0;
    repeat (40) @(posedge rhic_stb);
    vme({ID, 26'h2}, 0, 0, v); chk(v[4] == 1'b0, "no FIFO overflow");
    chk(v[2] == 1'b0, "slot timer stayed aligned");
    for (int r = 0; r < NC; r++) chk(expq[r].size() == 0, $sformatf("board %0d: %0d triggers missing", r, expq[r].size()));
    $display("mechanisms: sequences %0d held %0d broadcast %0d busy %0d clear %0d master-reset %0d",
             n_seq, n_held, n_bcast, n_busy, n_clear, n_mreset);
    $display("            triggers %0d accepts/aborts %0d vme %0d clk1 %0d clk2 %0d max latency %0d",
             n_trig, n_acc, n_vme, n_clk1, n_clk2, max_lat);
    chk(n_seq > 0, "pulser sequence happened");
    chk(n_held > 0, "command held in FIFO happened");
    chk(n_bcast > 0, "broadcast happened");
    chk(n_busy > 0, "backplane busy happened");
    chk(n_clear > 0, "clear happened");
    chk(n_mreset > 0, "master-reset happened");
    chk(n_trig > 0 && n_acc > 0, "readout and accept commands happened");
    chk(n_vme > 0, "VME access happened");
    chk(n_clk1 > 10 && n_clk2 > 10, "detector clocks ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

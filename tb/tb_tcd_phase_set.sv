// Testbench of the strobe delay line model: for several jumper settings the
// delay between input and output rising edges must be setting x 12 ns, and
// settings above 36 are clamped to 36 (432 ns, about four strobe periods).
module tb_tcd_phase_set;
  logic stb = 1'b0, out;
  logic [5:0] j;
  logic [5:0] rb;
  int checks = 0, failures = 0;

  tcd_phase_set dut (.rhic_stb_i(stb), .jumpers(j), .rhic_stb_o(out), .setting_o(rb));

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int sets[6] = '{0, 1, 5, 9, 36, 50};
    foreach (sets[i]) begin
      time t0, t1;
      int e;
      j = 6'(sets[i]);
      e = (sets[i] > 36) ? 36 : sets[i];
      #1us;
      chk(int'(rb) == e, "readback");
      repeat (3) begin
        stb = 1'b1; t0 = $time;
        fork
          begin @(posedge out); t1 = $time; end
          #2us;
        join_any
        disable fork;
        chk((t1 - t0) == e * 12ns || (e == 0 && t1 == t0),
            $sformatf("setting %0d delay %0t", sets[i], t1 - t0));
        #50ns stb = 1'b0;
        #60ns;
        #600ns;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

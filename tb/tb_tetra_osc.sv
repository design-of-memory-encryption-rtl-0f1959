// tb_tetra_osc: the oscillator model holds while disabled, oscillates when
// enabled, switches its inverter state in both directions, and its output
// edges come at irregular intervals (several different interval lengths).
module tb_tetra_osc;
  logic en = 0, out, sel;
  int checks = 0, failures = 0;
  tetra_osc #(.SEED(3)) dut (.en, .out, .sel);

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int edges0 = 0, edges1 = 0, sel_flips = 0, t0 = 0, t1 = 0;
  time last = 0;
  logic [63:0] seen_iv = '0;   // observed intervals between output edges
  logic sel_prev = 0;
  always @(out) if (en) begin : acc
    if ($time - last < 64) seen_iv[6'($time - last)] = 1'b1;
    if (sel) begin edges1++; t1 += int'($time - last); end
    else     begin edges0++; t0 += int'($time - last); end
    last = $time;
  end
  always @(sel) sel_flips++;

  initial begin
    logic o;
    #200; o = out;
    #200; chk(out == o && edges0 + edges1 == 0, "holds while disabled");
    en = 1; last = $time;
    #20000;
    en = 0;
    chk(edges0 > 100 && edges1 > 100, $sformatf("oscillates in both states %0d %0d", edges0, edges1));
    chk(sel_flips > 4, "inverter state switches");
    chk($countones(seen_iv) >= 3, $sformatf("irregular edge intervals %b", seen_iv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

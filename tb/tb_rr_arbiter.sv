// tb_rr_arbiter: random requesters that hold their request for a random
// number of cycles once granted. Checks one-hot grants, that a grant only
// goes to a requester that asks, that a granted requester keeps the grant
// until it lets go, and that each waiting requester is served within
// N-1 other grants (round-robin fairness).
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req, gnt; logic [1:0] gnt_idx;
  int checks = 0, failures = 0;
  rr_arbiter #(.N(N)) dut (.*);

  int hold [N]; int waited [N]; int grants = 0;
  logic [N-1:0] gnt_prev;
  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    req = 0; gnt_prev = 0;
    foreach (hold[i]) begin hold[i] = 0; waited[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      chk($onehot0(gnt), "onehot");
      chk((gnt & ~req) == 0 || (gnt & ~req) == (gnt_prev & ~req), "grant to requester");
      for (int i = 0; i < N; i++) begin
        if (gnt[i] && !gnt_prev[i]) begin grants++; waited[i] = 0; hold[i] = $urandom_range(1, 6); end
        if (gnt_prev[i] && req[i]) chk(gnt[i], "grant kept while requesting");
        if (req[i] && !gnt[i]) begin
          waited[i]++;
          chk(waited[i] < 8 * (N - 1) + 4, $sformatf("starvation %0d", i));
        end
        if (gnt[i]) begin
          hold[i]--;
          if (hold[i] <= 0) req[i] = 0;
        end else if (!req[i] && $urandom_range(0, 3) == 0) req[i] = 1;
      end
      gnt_prev = gnt;
    end
    chk(grants > 100, "grants happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

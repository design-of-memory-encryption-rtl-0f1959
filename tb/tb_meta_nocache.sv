// tb_meta_nocache: the metadata cache built with CACHE_BYTES = 0, the no-cache
// point of the cache-size sweep. Random reads and masked writes are checked
// against a flat memory image: every answer must carry resp_hit = 0, a read
// must cost exactly one memory read, a write one read and one write, and after
// each write the backing memory must already hold the merged line
// (write-through). The backing memory answers after a fixed delay.
module tb_meta_nocache;
  import smc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_write, resp_valid, resp_hit, mem_req, mem_we, mem_ack;
  addr_t req_addr, mem_addr; blk_t req_wdata, req_wmask, resp_rdata, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  meta_cache #(.CACHE_BYTES(0)) dut (.*);

  blk_t dram [addr_t];
  blk_t gold [addr_t];
  int   n_rd = 0, n_wr = 0;
  function automatic blk_t init_val(addr_t a); return {16{a ^ 32'h3c3c0000}}; endfunction

  // memory with 4-cycle latency
  initial begin
    mem_ack = 0; mem_rdata = '0;
    forever begin
      @(posedge clk);
      if (rst_n && mem_req && !mem_ack) begin
        repeat (3) @(posedge clk);
        #1;
        if (mem_we) begin dram[mem_addr] = mem_wdata; n_wr++; end
        else begin mem_rdata = dram.exists(mem_addr) ? dram[mem_addr] : init_val(mem_addr); n_rd++; end
        mem_ack = 1; @(posedge clk); #1 mem_ack = 0;
      end
    end
  end

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req_valid = 0; req_write = 0; req_addr = 0; req_wdata = 0; req_wmask = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      addr_t a; bit wr; blk_t m, d, exp; int rd0, wr0;
      // few addresses, so the same line comes back often: it must still miss
      a = 32'h8100_0000 | (32'($urandom_range(0, 7)) << 6);
      wr = $urandom_range(0, 1);
      m = '0; for (int k = 0; k < 8; k++) if ($urandom_range(0, 1)) m[k*64 +: 64] = '1;
      d = {16{$urandom}};
      if (!gold.exists(a)) gold[a] = init_val(a);
      exp = wr ? ((gold[a] & ~m) | (d & m)) : gold[a];
      rd0 = n_rd; wr0 = n_wr;
      @(negedge clk); @(negedge clk); req_valid = 1; req_write = wr; req_addr = a; req_wdata = d; req_wmask = m;
      do begin @(posedge clk); #1; end while (!resp_valid);
      req_valid = 0;
      chk(resp_rdata == exp, $sformatf("data at %h", a));
      chk(!resp_hit, "no hit without a cache");
      chk(n_rd - rd0 == 1 && n_wr - wr0 == (wr ? 1 : 0), $sformatf("memory traffic rd %0d wr %0d", n_rd - rd0, n_wr - wr0));
      if (wr) chk(dram.exists(a) && dram[a] == exp, "written through");
      gold[a] = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

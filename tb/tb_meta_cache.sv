// tb_meta_cache: random reads and masked writes to a few sets of the metadata
// cache, checked against a flat memory image (data) and a separate LRU model
// (hit flag, number of dirty write-backs). Also checks the two-cycle hit
// latency. The backing memory answers after a fixed delay.
module tb_meta_cache;
  import smc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_write, resp_valid, resp_hit, mem_req, mem_we, mem_ack;
  addr_t req_addr, mem_addr; blk_t req_wdata, req_wmask, resp_rdata, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  meta_cache dut (.*);

  blk_t dram [addr_t];
  blk_t gold [addr_t];
  int   wb_cnt = 0;
  function automatic blk_t init_val(addr_t a); return {16{a ^ 32'h5a5a0000}}; endfunction

  // memory with 4-cycle latency
  initial begin
    mem_ack = 0; mem_rdata = '0;
    forever begin
      @(posedge clk);
      if (rst_n && mem_req && !mem_ack) begin
        repeat (3) @(posedge clk);
        #1;
        if (mem_we) begin dram[mem_addr] = mem_wdata; wb_cnt++; end
        else mem_rdata = dram.exists(mem_addr) ? dram[mem_addr] : init_val(mem_addr);
        mem_ack = 1; @(posedge clk); #1 mem_ack = 0;
      end
    end
  end

  // LRU reference: per set, tags in most-recent-first order
  addr_t lru [int][$];
  bit    dirty [addr_t];
  int    exp_wb = 0;
  function automatic bit model_access(addr_t a, bit wr);
    int s = int'(a[12:6]); bit h = 0;
    foreach (lru[s][i]) if (lru[s][i] == a) begin h = 1; lru[s].delete(i); break; end
    if (!h && lru[s].size() == 4) begin
      addr_t v = lru[s].pop_back();
      if (dirty.exists(v) && dirty[v]) exp_wb++;
      dirty[v] = 0;
    end
    lru[s].push_front(a);
    if (wr) dirty[a] = 1;
    return h;
  endfunction

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req_valid = 0; req_write = 0; req_addr = 0; req_wdata = 0; req_wmask = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      addr_t a; bit wr, eh; blk_t m, d, exp; int lat;
      a = 32'h8000_0000 | (32'($urandom_range(0, 5)) << 13) | (32'($urandom_range(0, 1) * 37) << 6);
      wr = $urandom_range(0, 1);
      m = '0; for (int k = 0; k < 8; k++) if ($urandom_range(0, 1)) m[k*64 +: 64] = '1;
      d = {16{$urandom}};
      if (!gold.exists(a)) gold[a] = init_val(a);
      exp = wr ? ((gold[a] & ~m) | (d & m)) : gold[a];
      eh = model_access(a, wr);
      // one idle cycle between requests: the response cycle itself is not
      // taken as a new request
      @(negedge clk); @(negedge clk); req_valid = 1; req_write = wr; req_addr = a; req_wdata = d; req_wmask = m;
      lat = 0;
      do begin @(posedge clk); lat++; #1; end while (!resp_valid);
      req_valid = 0;
      gold[a] = exp;
      chk(resp_rdata == exp, $sformatf("data @%h", a));
      chk(resp_hit == eh, $sformatf("hit flag @%h exp %0d", a, eh));
      if (eh) chk(lat == 3, $sformatf("hit latency %0d", lat));
    end
    chk(wb_cnt == exp_wb, $sformatf("write-backs %0d vs %0d", wb_cnt, exp_wb));
    chk(exp_wb > 10, "evictions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

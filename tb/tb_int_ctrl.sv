// tb_int_ctrl: the integrity check controller with a real ASCON core and a
// behavioural metadata store whose hit flag the test controls (a block counts
// as on chip once it has been accessed, until the test "evicts" everything).
// Checks: boot root = root of the all-zero counter image; a full tree walk on
// a cold path (six levels, no fault); early stop on a hit; tampered counter
// block -> fault at level 1; replayed counter block with matching level-1
// node -> fault at level 2; update of data hash and tree path up to the root
// against hashes computed by the reference model; data hash check pass/fail;
// rehash that leaves the tree untouched.
module tb_int_ctrl;
  import smc_pkg::*;
  import ascon_pkg::*;
  import tb_ref_pkg::zero_node;
  import tb_ref_pkg::node_hash;
  import tb_ref_pkg::data_hash;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, done, fault, ev_early_stop;
  logic [2:0] cmd_op, fault_lvl;
  addr_t cmd_addr; smc_pkg::blk_t cmd_ct; logic [63:0] cmd_major; logic [6:0] cmd_minor;
  logic md_req, md_write, md_resp_valid, md_hit;
  addr_t md_addr; smc_pkg::blk_t md_wdata, md_wmask, md_rdata;
  logic a_req, a_gnt, a_start, a_in_valid, a_in_final, a_in_ready, a_done, busy, out_valid, tag_ok;
  logic [127:0] a_in_data, out_data, tag_out; logic [63:0] a_hash;
  int checks = 0, failures = 0;

  int_ctrl dut (.*);
  ascon_core u_core (.clk, .rst_n, .start(a_start), .op(ASCON_HASH), .key('0), .nonce('0), .busy,
    .in_valid(a_in_valid), .in_data(a_in_data), .in_final(a_in_final), .in_ready(a_in_ready),
    .out_valid, .out_data, .tag_in('0), .done(a_done), .tag_out, .tag_ok, .hash_out(a_hash));
  assign a_gnt = a_req;

  // behavioural metadata store
  smc_pkg::blk_t md [addr_t];
  bit seen [addr_t];
  int md_reads = 0;
  function automatic smc_pkg::blk_t dflt(addr_t a);
    if (a >= L5_BASE) return zero_node(5);
    if (a >= L4_BASE) return zero_node(4);
    if (a >= L3_BASE) return zero_node(3);
    if (a >= L2_BASE) return zero_node(2);
    if (a >= L1_BASE) return zero_node(1);
    return '0;
  endfunction
  function automatic smc_pkg::blk_t rd(addr_t a); return md.exists(a) ? md[a] : dflt(a); endfunction
  initial begin
    md_resp_valid = 0; md_rdata = '0; md_hit = 0;
    forever begin
      @(posedge clk);
      if (rst_n && md_req && !md_resp_valid) begin   // requests count only out of reset
        @(posedge clk); #1;
        md_hit = seen.exists(md_addr);
        seen[md_addr] = 1;
        if (md_write) md[md_addr] = (rd(md_addr) & ~md_wmask) | (md_wdata & md_wmask);
        else md_reads++;
        md_rdata = rd(md_addr);
        md_resp_valid = 1;
        @(posedge clk); #1 md_resp_valid = 0;
      end
    end
  end

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic run(logic [2:0] op, addr_t a, smc_pkg::blk_t ct, logic [63:0] mj, logic [6:0] mn);
    @(negedge clk); cmd_valid = 1; cmd_op = op; cmd_addr = a; cmd_ct = ct; cmd_major = mj; cmd_minor = mn;
    @(negedge clk); cmd_valid = 0;
    while (!done) @(posedge clk);
    #1;
  endtask

  // expected root after a change of the counter block of page p
  function automatic smc_pkg::blk_t path_root(addr_t a);
    logic [17:0] pg = 18'((a - SEC_BASE_DEF) >> 12);
    logic [63:0] h = node_hash(rd(ctr_addr(a)));
    for (int l = 1; l <= 5; l++) begin
      smc_pkg::blk_t n = rd(node_addr(3'(l), pg));
      n[64*node_slot(3'(l), pg) +: 64] = h;
      h = node_hash(n);
    end
    begin
      smc_pkg::blk_t r = zero_node(6);
      r[64*node_slot(3'd6, pg) +: 64] = h;
      return r;
    end
  endfunction

  int stops = 0;
  always @(posedge clk) if (rst_n && ev_early_stop) stops++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr_t A = 32'hC012_3440, B = 32'hC012_3480;
    smc_pkg::blk_t ct = {16{32'hdeadbeef}}, c, r_exp;
    cmd_valid = 0; cmd_op = 0; cmd_addr = 0; cmd_ct = 0; cmd_major = 0; cmd_minor = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    run(3'd0, 0, 0, 0, 0);                                   // I_INIT
    chk(dut.root_q == zero_node(6), "boot root");

    run(3'd1, A, 0, 0, 0);                                   // cold walk
    chk(!fault && md_reads == 6 && stops == 0, $sformatf("cold walk fault=%0d reads=%0d", fault, md_reads));
    run(3'd1, A, 0, 0, 0);                                   // warm: stop at counter block
    chk(!fault && stops == 1, "early stop on hit");

    // tampered counter block
    seen.delete();
    c = rd(ctr_addr(A)); md[ctr_addr(A)] = c ^ 512'h1;
    run(3'd1, A, 0, 0, 0);
    chk(fault && fault_lvl == 3'd1, $sformatf("tamper -> level %0d", fault_lvl));
    // replay: counter block and its level-1 entry both changed, level 2 catches it
    seen.delete();
    begin
      logic [17:0] pg;
      smc_pkg::blk_t n1;
      pg = 18'((A - SEC_BASE_DEF) >> 12);
      n1 = rd(node_addr(3'd1, pg));
      n1[64*node_slot(3'd1, pg) +: 64] = node_hash(md[ctr_addr(A)]);
      md[node_addr(3'd1, pg)] = n1;
      run(3'd1, A, 0, 0, 0);
      chk(fault && fault_lvl == 3'd2, $sformatf("replay -> level %0d", fault_lvl));
      md.delete(node_addr(3'd1, pg));
    end

    // legitimate counter change followed by an update
    md[ctr_addr(A)] = {64'd5, 448'd0} | (512'd9 << (7 * 17));
    r_exp = path_root(A);
    run(3'd3, A, ct, 64'd5, 7'd9);                           // I_UPDATE
    chk(!fault, "update no fault");
    chk(rd(dh_addr(A))[64*dh_slot(A) +: 64] == data_hash(A, 64'd5, 7'd9, ct), "data hash stored");
    chk(dut.root_q == r_exp, "root after update");
    seen.delete();
    run(3'd1, A, 0, 0, 0);
    chk(!fault, "walk after update");
    run(3'd2, A, ct, 64'd5, 7'd9);                           // I_VERIFY
    chk(!fault, "verify good data");
    run(3'd2, A, ct ^ (512'd1 << 300), 64'd5, 7'd9);
    chk(fault && fault_lvl == 3'd0, "verify tampered data");
    run(3'd2, A, ct, 64'd5, 7'd8);
    chk(fault && fault_lvl == 3'd0, "verify with stale counter");

    run(3'd4, B, ct, 64'd5, 7'd0);                           // I_REHASH
    chk(rd(dh_addr(B))[64*dh_slot(B) +: 64] == data_hash(B, 64'd5, 7'd0, ct), "rehash stored");
    chk(dut.root_q == r_exp, "rehash leaves root");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

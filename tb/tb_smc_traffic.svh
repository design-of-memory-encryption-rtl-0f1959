// tb_smc_traffic.svh: LLC model and test program shared by the memory
// controller test and the SoC test. The including module provides clk, the
// llc_* / snp_* signals (llc_fault, fault_addr, fault_lvl for the exception),
// the ev_* pulses, a tb_dram_model instance `dram`, the key in use `tkey`,
// checks/failures and chk().
//
// The program, all on the protected window (0xC000_0000, 1 GB) unless noted:
//   * writes random data to blocks of several pages and reads it back;
//     the first write of a fresh page must leave exactly
//     plaintext ^ pad(key, address, major 0, minor 1) in DRAM;
//   * a request outside the window goes to DRAM unencrypted (bypass);
//   * 128 writes to one block overflow its minor counter; the page is
//     re-encrypted under major 1, some of its blocks come from the LLC
//     (snoop hits), and all of them must read back correctly afterwards;
//   * the attacker flips a ciphertext bit in DRAM: the read must fault with
//     level 0 (data hash);
//   * the attacker replays an old ciphertext, data hash and counter block
//     after they have left the on-chip metadata cache: the read must fault
//     at tree level 1;
//   * every mechanism (bypass, re-encryption, snoop hit, early stop on a
//     cached tree node, fault) must have been seen at least once.

  // ---------------------------------------------------------------- LLC look-up model
  blk_t llc_copy [addr_t];       // blocks the LLC holds (plaintext)
  initial begin
    snp_ack = 0; snp_hit = 0; snp_data = '0;
    forever begin
      @(posedge clk);
      if (rst_n && snp_req && !snp_ack) begin
        repeat (2) @(posedge clk);
        #1;
        snp_hit  = llc_copy.exists(snp_addr);
        snp_data = snp_hit ? llc_copy[snp_addr] : '0;
        snp_ack  = 1;
        @(posedge clk); #1 snp_ack = 0;
      end
    end
  end

  // ---------------------------------------------------------------- event counters
  int n_bypass = 0, n_reenc = 0, n_snoop = 0, n_early = 0, n_fault = 0;
  always @(posedge clk) if (rst_n) begin  // event outputs are valid only out of reset
    if (ev_bypass) n_bypass++;
    if (ev_reenc) n_reenc++;
    if (ev_snoop_hit) n_snoop++;
    if (ev_early_stop) n_early++;
    if (ev_fault) n_fault++;
  end

  // ---------------------------------------------------------------- LLC requests
  task automatic llc_rw(input logic we, input addr_t a, input blk_t wd,
                        output blk_t rd, output logic flt, output logic [2:0] lvl);
    @(negedge clk); llc_req = 1; llc_we = we; llc_addr = a; llc_wdata = wd;
    @(posedge clk); #1;
    while (!llc_ack) begin @(posedge clk); #1; end
    rd = llc_rdata; flt = llc_fault; lvl = fault_lvl;
    if (flt && fault_addr != a) begin failures++; $display("FAIL fault address %h", fault_addr); end
    llc_req = 0; llc_we = 0;
  endtask

  blk_t exp_mem [addr_t];        // what each written block should read back as

  task automatic wr_blk(addr_t a, blk_t d);
    blk_t r; logic f; logic [2:0] l;
    llc_rw(1, a, d, r, f, l);
    exp_mem[a] = d;
  endtask

  task automatic rd_chk(addr_t a, string what);
    blk_t r; logic f; logic [2:0] l;
    llc_rw(0, a, '0, r, f, l);
    chk(!f && r == exp_mem[a], $sformatf("%s: read %h", what, a));
  endtask

  function automatic blk_t rnd_blk();
    blk_t b;
    for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom;
    return b;
  endfunction

  // blocks whose counter and data-hash blocks share cache sets with page p
  function automatic addr_t alias_blk(addr_t a, int k);
    return a + addr_t'(k) * 32'h0008_0000;     // 128 pages further
  endfunction

  task automatic evict_meta(addr_t a);
    for (int k = 1; k <= 6; k++) wr_blk(alias_blk(a, k), rnd_blk());
  endtask

  task automatic run_traffic();
    addr_t a, pg, t; blk_t d, r, ctr0, dh0, ct0; logic f; logic [2:0] l;
    // 1. fresh page: exact ciphertext, then read back
    a = 32'hC012_3440;
    d = rnd_blk();
    wr_blk(a, d);
    chk(dram.peek(a) == (d ^ tb_ref_pkg::pad(tkey, a, 64'd0, 7'd1)), "ciphertext in DRAM is the counter-mode encryption");
    rd_chk(a, "fresh block");
    // random blocks in a few pages
    for (int i = 0; i < 24; i++) begin
      t = 32'hC000_0000 | ((32'($urandom_range(0, 5)) * 32'h1000 + 32'($urandom_range(0, 63)) * 64) & 32'h3FFF_FFC0);
      wr_blk(t, rnd_blk());
    end
    foreach (exp_mem[k]) rd_chk(k, "random blocks");
    // 2. bypass
    t = 32'h0010_0040; d = rnd_blk();
    llc_rw(1, t, d, r, f, l);
    chk(dram.peek(t) == d, "bypass write stored as plaintext");
    llc_rw(0, t, '0, r, f, l);
    chk(r == d && !f, "bypass read");
    // 3. minor-counter overflow with re-encryption of the page
    pg = 32'hC040_0000;
    for (int b = 1; b < 8; b++) wr_blk(pg + addr_t'(64 * b), rnd_blk());
    for (int b = 1; b < 4; b++) llc_copy[pg + addr_t'(64 * b)] = exp_mem[pg + addr_t'(64 * b)];
    for (int i = 0; i < 128; i++) wr_blk(pg, rnd_blk());
    chk(n_reenc == 1, $sformatf("one re-encryption after 128 writes (%0d)", n_reenc));
    chk(n_snoop == 3, $sformatf("three snoop hits (%0d)", n_snoop));
    for (int b = 0; b < 8; b++) rd_chk(pg + addr_t'(64 * b), "re-encrypted page");
    chk(dram.peek(pg + 64) == (exp_mem[pg + 64] ^ tb_ref_pkg::pad(tkey, pg + 64, 64'd1, 7'd0)),
        "re-encrypted block under major 1");
    llc_copy.delete();
    // 4. tampering with a ciphertext in DRAM
    t = 32'hC012_3440;
    dram.poke(t, dram.peek(t) ^ (blk_t'(1) << 300));
    llc_rw(0, t, '0, r, f, l);
    chk(f && l == 3'd0 && r == '0, $sformatf("tampered block faults at level 0 (%b %0d)", f, l));
    dram.poke(t, dram.peek(t) ^ (blk_t'(1) << 300));
    rd_chk(t, "restored block");
    // 5. replay of an old block with its hash and counters
    a = 32'hC080_0080;
    wr_blk(a, rnd_blk());
    evict_meta(a);
    ctr0 = dram.peek(smc_pkg::ctr_addr(a));
    dh0  = dram.peek(smc_pkg::dh_addr(a) & ~32'h3F);
    ct0  = dram.peek(a);
    wr_blk(a, rnd_blk());
    evict_meta(a);
    chk(dram.peek(smc_pkg::ctr_addr(a)) != ctr0, "counter block written back");
    dram.poke(smc_pkg::ctr_addr(a), ctr0);
    dram.poke(smc_pkg::dh_addr(a) & ~32'h3F, dh0);
    dram.poke(a, ct0);
    llc_rw(0, a, '0, r, f, l);
    chk(f && l == 3'd1, $sformatf("replay detected at tree level 1 (%b %0d)", f, l));
    // other data is still fine
    rd_chk(32'hC040_0040, "unrelated block after attacks");
    // 6. every mechanism happened
    chk(n_bypass >= 2, "bypass seen");
    chk(n_reenc >= 1, "re-encryption seen");
    chk(n_snoop >= 1, "snoop hit seen");
    chk(n_early >= 1, $sformatf("early stop seen (%0d)", n_early));
    chk(n_fault >= 2, $sformatf("faults seen (%0d)", n_fault));
  endtask

// tb_enc_ctrl: the encryption controller with a real ASCON core, a
// behavioural metadata store, DRAM and last-level-cache snoop port.
// Checks: a write stores plaintext XOR pad(address, major, minor+1) and the
// incremented minor counter; a read returns the plaintext; a write whose minor
// counter is at 127 re-encrypts the page - every other block ends up
// encrypted under (major+1, minor 0), blocks present in the LLC are taken
// from it without a DRAM read, every re-encrypted block is handed on for a
// data-hash refresh, and the counter block becomes {major+1, zeros}.
module tb_enc_ctrl;
  import smc_pkg::*;
  import ascon_pkg::*;
  import tb_ref_pkg::pad;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [127:0] key = 128'h0f1e2d3c4b5a69788796a5b4c3d2e1f0;
  logic cmd_valid, cmd_write, cmd_ready, done, ev_reenc, ev_snoop_hit;
  addr_t cmd_addr; smc_pkg::blk_t cmd_wdata, rdata, ct; logic [63:0] major; logic [6:0] minor;
  logic md_req, md_write, md_resp_valid; addr_t md_addr; smc_pkg::blk_t md_wdata, md_wmask, md_rdata;
  logic a_req, a_gnt, a_start, a_in_valid, a_in_final, a_in_ready, a_out_valid, a_done;
  logic [127:0] a_key, a_nonce, a_in_data, a_out_data, tag_out; logic tag_ok, busy; logic [63:0] hash_out;
  logic d_req, d_we, d_ack, r_req, r_we, r_ack; addr_t d_addr, r_addr; smc_pkg::blk_t d_wdata, d_rdata, r_wdata, r_rdata;
  logic snp_req, snp_ack, snp_hit; addr_t snp_addr; smc_pkg::blk_t snp_data;
  logic rh_valid, rh_done; addr_t rh_addr; smc_pkg::blk_t rh_ct; logic [63:0] rh_major; logic [6:0] rh_minor;
  int checks = 0, failures = 0;

  enc_ctrl dut (.*);
  ascon_core u_core (.clk, .rst_n, .start(a_start), .op(ASCON_ENC), .key(a_key), .nonce(a_nonce), .busy,
    .in_valid(a_in_valid), .in_data(a_in_data), .in_final(a_in_final), .in_ready(a_in_ready),
    .out_valid(a_out_valid), .out_data(a_out_data), .tag_in('0), .done(a_done), .tag_out, .tag_ok,
    .hash_out);
  assign a_gnt = a_req;

  smc_pkg::blk_t md [addr_t];
  smc_pkg::blk_t dram [addr_t];
  smc_pkg::blk_t llc [addr_t];
  int dram_reads = 0, rh_cnt = 0, rh_bad = 0, snoops = 0;

  // metadata store
  initial begin
    md_resp_valid = 0; md_rdata = '0;
    forever begin
      @(posedge clk);
      if (md_req && !md_resp_valid) begin
        @(posedge clk); #1;
        if (!md.exists(md_addr)) md[md_addr] = '0;
        if (md_write) md[md_addr] = (md[md_addr] & ~md_wmask) | (md_wdata & md_wmask);
        md_rdata = md[md_addr]; md_resp_valid = 1;
        @(posedge clk); #1 md_resp_valid = 0;
      end
    end
  end
  // two DRAM ports sharing one array
  initial begin
    d_ack = 0; d_rdata = '0;
    forever begin
      @(posedge clk);
      if (rst_n && d_req && !d_ack) begin
        repeat (9) @(posedge clk); #1;
        if (d_we) dram[d_addr] = d_wdata; else begin d_rdata = dram[d_addr]; dram_reads++; end
        d_ack = 1; @(posedge clk); #1 d_ack = 0;
      end
    end
  end
  initial begin
    r_ack = 0; r_rdata = '0;
    forever begin
      @(posedge clk);
      if (rst_n && r_req && !r_ack) begin
        repeat (9) @(posedge clk); #1;
        if (r_we) dram[r_addr] = r_wdata; else begin r_rdata = dram[r_addr]; dram_reads++; end
        r_ack = 1; @(posedge clk); #1 r_ack = 0;
      end
    end
  end
  // LLC snoop
  initial begin
    snp_ack = 0; snp_hit = 0; snp_data = '0;
    forever begin
      @(posedge clk);
      if (rst_n && snp_req && !snp_ack) begin
        @(posedge clk); #1;
        snoops++;
        snp_hit = llc.exists(snp_addr); snp_data = snp_hit ? llc[snp_addr] : '0;
        snp_ack = 1; @(posedge clk); #1 snp_ack = 0;
      end
    end
  end
  // data-hash refresh requests
  initial begin
    rh_done = 0;
    forever begin
      @(posedge clk);
      if (rh_valid && !rh_done) begin
        repeat (3) @(posedge clk); #1;
        rh_cnt++;
        if (rh_major != 64'd8 || rh_minor != 0 || rh_ct != dram[rh_addr]) rh_bad++;
        rh_done = 1; @(posedge clk); #1 rh_done = 0;
      end
    end
  end

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic op(logic wr, addr_t a, smc_pkg::blk_t d);
    @(negedge clk); cmd_valid = 1; cmd_write = wr; cmd_addr = a; cmd_wdata = d;
    @(negedge clk); cmd_valid = 0;
    while (!done) @(posedge clk);
    #1;
  endtask

  int reencs = 0, snhits = 0;
  always @(posedge clk) if (rst_n) begin if (ev_reenc) reencs++; if (ev_snoop_hit) snhits++; end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr_t A = 32'hC000_5040, P = 32'hC001_2000, B;
    smc_pkg::blk_t d1 = {16{32'h01234567}}, c, plain [64];
    logic [6:0] mins [64];
    cmd_valid = 0; cmd_write = 0; cmd_addr = 0; cmd_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // page of A: major 3, minor of block 1 = 10
    md[ctr_addr(A)] = {64'd3, 448'd0} | (512'd10 << 7);
    op(1, A, d1);
    chk(dram[A] == (d1 ^ pad(key, A, 64'd3, 7'd11)), "write ciphertext");
    chk(md[ctr_addr(A)][7 +: 7] == 7'd11 && md[ctr_addr(A)][511:448] == 64'd3, "minor incremented");
    chk(major == 3 && minor == 11 && ct == dram[A], "reported counters");
    op(0, A, 0);
    chk(rdata == d1, "read back plaintext");

    // overflow: page P, major 7, random minors, block 5 at 127
    c = {64'd7, 448'd0};
    for (int j = 0; j < 64; j++) begin
      addr_t aj; aj = P + 32'(j * 64);
      mins[j] = (j == 5) ? 7'd127 : 7'($urandom_range(0, 126));
      c[7*j +: 7] = mins[j];
      plain[j] = {16{$urandom}};
      dram[aj] = plain[j] ^ pad(key, aj, 64'd7, mins[j]);
      if (j % 4 == 1) llc[aj] = plain[j];      // some blocks also in the LLC
    end
    md[ctr_addr(P)] = c;
    B = P + 32'(5 * 64);
    dram_reads = 0;
    op(1, B, d1);
    chk(reencs == 1, "re-encryption started");
    chk(md[ctr_addr(P)] == {64'd8, 448'd0}, "counter block after overflow");
    chk(dram[B] == (d1 ^ pad(key, B, 64'd8, 7'd0)), "written block under new major");
    for (int j = 0; j < 64; j++) if (j != 5) begin
      addr_t aj; aj = P + 32'(j * 64);
      chk(dram[aj] == (plain[j] ^ pad(key, aj, 64'd8, 7'd0)), $sformatf("re-encrypted block %0d", j));
    end
    chk(snoops == 63 && snhits == 15, $sformatf("snoops %0d hits %0d", snoops, snhits));
    chk(dram_reads == 63 - 15, $sformatf("dram reads %0d", dram_reads));
    chk(rh_cnt == 63 && rh_bad == 0, $sformatf("rehash %0d bad %0d", rh_cnt, rh_bad));
    op(0, P + 32'(9 * 64), 0);
    chk(rdata == plain[9], "read after re-encryption");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_secure_soc: end-to-end test of the secure SoC at full size (default
// parameters: 32 KB metadata cache, 1 GB protected window, 8 storage slots).
// A behavioural DRAM, LLC and processor bus drive it. The test:
//   * waits for the boot (tree root) through the status register;
//   * reads random words from the TRNG;
//   * generates the memory key and the storage key from the TRNG through
//     the key manager;
//   * stores and loads a secret in the secure storage, and checks that a
//     tampered slot raises the storage exception;
//   * runs the memory traffic program (encryption, bypass, re-encryption
//     with LLC snoops, tampering and replay detection) under the generated
//     memory key.
// Every mechanism is counted; one that never happened is a failure.
module tb_secure_soc;
  import smc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [127:0] tkey;
  logic sys_req = 0, sys_we = 0, sys_ack; logic [31:0] sys_addr = 0, sys_wdata = 0, sys_rdata;
  logic llc_req = 0, llc_we = 0, llc_ack, llc_fault; addr_t llc_addr = 0, fault_addr; blk_t llc_wdata = '0, llc_rdata;
  logic [2:0] fault_lvl;
  logic snp_req, snp_ack, snp_hit; addr_t snp_addr; blk_t snp_data;
  logic mem_req, mem_we, mem_ack; addr_t mem_addr; blk_t mem_wdata, mem_rdata;
  logic storage_exc, smc_ready, ev_bypass, ev_reenc, ev_snoop_hit, ev_early_stop, ev_fault, ev_keygen;
  int checks = 0, failures = 0, n_keygen = 0, n_sexc = 0;

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  secure_soc dut (.clk, .rst_n, .sys_req, .sys_we, .sys_addr, .sys_wdata, .sys_rdata, .sys_ack,
    .llc_req, .llc_we, .llc_addr, .llc_wdata, .llc_ack, .llc_rdata,
    .snp_req, .snp_addr, .snp_ack, .snp_hit, .snp_data,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .mem_fault(llc_fault), .fault_addr, .fault_lvl, .storage_exc, .smc_ready,
    .ev_bypass, .ev_reenc, .ev_snoop_hit, .ev_early_stop, .ev_fault, .ev_keygen);

  tb_dram_model #(.LATENCY(30)) dram (.clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .ack(mem_ack), .rdata(mem_rdata));

  `include "tb_smc_traffic.svh"

  always @(posedge clk) if (rst_n) begin
    if (ev_keygen) n_keygen++;
    if (storage_exc) n_sexc++;
  end

  task automatic bw(logic [31:0] a, logic [31:0] d);
    @(negedge clk); sys_req = 1; sys_we = 1; sys_addr = a; sys_wdata = d;
    @(posedge clk); #1; while (!sys_ack) begin @(posedge clk); #1; end
    sys_req = 0; sys_we = 0;
    @(negedge clk);
  endtask
  task automatic br(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); sys_req = 1; sys_we = 0; sys_addr = a;
    @(posedge clk); #1; while (!sys_ack) begin @(posedge clk); #1; end
    d = sys_rdata; sys_req = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] w, w2, st; logic [127:0] secret, got;
    for (int l = 1; l <= 5; l++) dram.zero_lvl[l] = tb_ref_pkg::zero_node(l);
    repeat (3) @(posedge clk); rst_n = 1;
    // boot
    do br(32'h1000_0008, st); while (!st[0]);
    chk(dut.u_smc.u_int.root_q == tb_ref_pkg::zero_node(6), "boot root");
    br(32'h1000_0000, w); chk(w == 32'hC000_0000, "window base");
    br(32'h1000_0004, w); chk(w == 32'h4000_0000, "window size");
    // TRNG words
    do br(32'h1000_2004, st); while (!st[0]);
    br(32'h1000_2000, w);
    do br(32'h1000_2004, st); while (!st[0]);
    br(32'h1000_2000, w2);
    chk(w != w2 && w != 0, $sformatf("TRNG words %h %h", w, w2));
    // keys from the TRNG
    bw(32'h1000_1000, 32'h1);                      // memory key
    do br(32'h1000_1000, st); while (st[0]);
    bw(32'h1000_1000, 32'h3);                      // storage key
    do br(32'h1000_1000, st); while (st[0]);
    chk(st[2:1] == 2'b11 && n_keygen == 2, "both keys generated");
    tkey = dut.mem_key;
    chk(tkey != 0 && tkey != dut.store_key, "keys random and distinct");
    // secure storage
    secret = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 4; i++) bw(32'h1000_3000 + 32'(4 * i), secret[127 - 32*i -: 32]);
    bw(32'h1000_3010, 32'h5);                      // store in slot 5
    do br(32'h1000_3014, st); while (st[0]);
    chk(dut.u_store.ct_q[5] != secret, "slot encrypted");
    for (int i = 0; i < 4; i++) bw(32'h1000_3000 + 32'(4 * i), 32'h0);
    bw(32'h1000_3010, 32'h105);                    // load slot 5
    do br(32'h1000_3014, st); while (st[0]);
    for (int i = 0; i < 4; i++) begin br(32'h1000_3000 + 32'(4 * i), w); got[127 - 32*i -: 32] = w; end
    chk(got == secret && !st[1], "secret loaded back");
    dut.u_store.tag_q[5] = dut.u_store.tag_q[5] ^ 128'h8;
    bw(32'h1000_3010, 32'h105);
    do br(32'h1000_3014, st); while (st[0]);
    chk(st[1] && n_sexc == 1, "tampered slot raises the storage exception");
    br(32'h1000_7000, w); chk(w == 0, "unmapped register reads zero");
    // memory traffic
    run_traffic();
    chk(n_keygen >= 2, "key generation seen");
    chk(n_sexc >= 1, "storage exception seen");
    $display("DRAM reads %0d writes %0d, events: bypass %0d reenc %0d snoop %0d early-stop %0d fault %0d keygen %0d",
             dram.reads, dram.writes, n_bypass, n_reenc, n_snoop, n_early, n_fault, n_keygen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

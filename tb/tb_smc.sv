// tb_smc: the secure memory controller on its own, with a behavioural DRAM
// and LLC. After the boot (root of the all-zero counter image) it checks the
// secure-window registers, a hash through the shared ASCON port (empty
// message, known answer), and runs the shared traffic program: encryption,
// bypass, re-encryption with snoops, tampering and replay detection.
// The metadata cache is reduced to 4 KB here so that metadata is evicted
// often; the SoC test runs the full 32 KB.
module tb_smc;
  import smc_pkg::*;
  import ascon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [127:0] tkey = 128'h0f1e2d3c4b5a69788796a5b4c3d2e1f0;
  logic ready, cfg_we = 0, cfg_addr = 0; logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic llc_req = 0, llc_we = 0, llc_ack, llc_fault; addr_t llc_addr = 0, fault_addr; blk_t llc_wdata = '0, llc_rdata;
  logic [2:0] fault_lvl;
  logic snp_req, snp_ack, snp_hit; addr_t snp_addr; blk_t snp_data;
  logic mem_req, mem_we, mem_ack; addr_t mem_addr; blk_t mem_wdata, mem_rdata;
  logic x_req = 0, x_gnt, x_start = 0, x_in_valid = 0, x_in_final = 0, x_in_ready, x_out_valid, x_done, x_tag_ok;
  ascon_op_e x_op = ASCON_HASH;
  logic [127:0] x_key = '0, x_nonce = '0, x_in_data = '0, x_tag_in = '0, x_out_data, x_tag_out;
  logic [63:0] x_hash;
  logic ev_bypass, ev_reenc, ev_snoop_hit, ev_early_stop, ev_fault;
  int checks = 0, failures = 0;

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  smc #(.META_CACHE_BYTES(4096), .META_WAYS(4)) dut (.clk, .rst_n, .key(tkey), .ready,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .llc_req, .llc_we, .llc_addr, .llc_wdata, .llc_ack, .llc_rdata, .llc_fault, .fault_addr, .fault_lvl,
    .snp_req, .snp_addr, .snp_ack, .snp_hit, .snp_data,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .x_req, .x_gnt, .x_start, .x_op, .x_key, .x_nonce, .x_in_valid, .x_in_data, .x_in_final, .x_in_ready,
    .x_out_valid, .x_out_data, .x_tag_in, .x_done, .x_tag_out, .x_tag_ok, .x_hash,
    .ev_bypass, .ev_reenc, .ev_snoop_hit, .ev_early_stop, .ev_fault);

  tb_dram_model #(.LATENCY(20)) dram (.clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .ack(mem_ack), .rdata(mem_rdata));

  `include "tb_smc_traffic.svh"

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int l = 1; l <= 5; l++) dram.zero_lvl[l] = tb_ref_pkg::zero_node(l);
    repeat (3) @(posedge clk); rst_n = 1;
    chk(!ready, "not ready during boot");
    while (!ready) @(posedge clk);
    chk(dut.u_int.root_q == tb_ref_pkg::zero_node(6), "boot root");
    // window registers
    @(negedge clk); cfg_addr = 0; #1 chk(cfg_rdata == 32'hC000_0000, "default base");
    cfg_addr = 1; #1 chk(cfg_rdata == 32'h4000_0000, "default size");
    cfg_we = 1; cfg_wdata = 32'h2000_0000; @(negedge clk); cfg_we = 0;
    #1 chk(cfg_rdata == 32'h2000_0000, "size written");
    cfg_we = 1; cfg_wdata = 32'h4000_0000; @(negedge clk); cfg_we = 0;
    // ASCON port: hash of the empty message
    @(negedge clk); x_req = 1;
    while (!x_gnt) @(negedge clk);
    x_start = 1; x_op = ASCON_HASH; @(negedge clk); x_start = 0;
    x_in_valid = 1; x_in_final = 1; x_in_data = {64'd0, 64'h8000000000000000};
    while (!x_in_ready) @(negedge clk);
    @(negedge clk); x_in_valid = 0;
    while (!x_done) @(negedge clk);
    chk(x_hash == 64'h7346bc14f036e87a, $sformatf("hash through the shared port %h", x_hash));
    x_req = 0;
    run_traffic();
    $display("DRAM reads %0d writes %0d, events: bypass %0d reenc %0d snoop %0d early-stop %0d fault %0d",
             dram.reads, dram.writes, n_bypass, n_reenc, n_snoop, n_early, n_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

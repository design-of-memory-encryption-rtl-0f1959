// secure_soc: the secure part of the IoT edge SoC - secure memory controller,
// TRNG, key manager and secure on-chip storage - with the processor's system
// bus, the last-level-cache (LLC) ports and the DRAM port as plain signals.
//
// The processor core, its caches and the DRAM controller/PHY are outside this
// module: the LLC miss/write-back port (llc_*) and the LLC look-up port
// (snp_*) connect to the cache, mem_* to the DRAM controller (one 512-bit
// block per request), sys_* to the processor's 32-bit system bus.
//
// System bus (sys_req held until the one-cycle sys_ack; sys_rdata is valid
// with sys_ack). Address bits 15:12 select the device, bits 4:0 the
// register:
//   0x1000_0xxx  memory controller: 0x0 secure window base, 0x4 size,
//                0x8 status (bit 0 ready)
//   0x1000_1xxx  key manager: 0x0 write bit 0 = 1 generate a key from the
//                TRNG, bit 1 target (0 memory key, 1 storage key);
//                0x4 write: load EXT0..3 as key, bit 1 target;
//                0x10..0x1C EXT0..3 (EXT0 = bits 127:96), write only;
//                0x0 read: bit 0 busy, bit 1 memory key valid,
//                bit 2 storage key valid
//   0x1000_2xxx  TRNG: 0x0 read random word (consumes it), 0x4 read status
//                bit 0 word valid; 0x4 write bit 0 oscillator enable
//   0x1000_3xxx  secure storage register window (see secure_storage)
// Unmapped addresses read zero. Every access is answered.
//
// Exceptions to the processor: mem_fault with fault_addr/fault_lvl when an
// integrity check of a secure memory read fails (tampering or replay);
// storage_exc when a secure-storage load fails authentication. The ev_*
// outputs pulse once per event for performance counters.
//
// Key handling: the memory controller always uses the current memory key,
// so the memory key is generated (or loaded) before secure data is written;
// the key manager keeps the previous memory key for software-driven
// re-keying. The blocks and their connections follow the design; the
// register map and the bus protocol are this design's choices. The ASCON
// hash output of the shared core is not used by the storage and is left
// unconnected.
module secure_soc
  import smc_pkg::*;
  import ascon_pkg::*;
#(
  parameter int unsigned META_CACHE_BYTES = 32768,
  parameter int unsigned META_WAYS        = 4,
  parameter int unsigned STORAGE_SLOTS    = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // processor system bus
  input  logic         sys_req,
  input  logic         sys_we,
  input  logic [31:0]  sys_addr,
  input  logic [31:0]  sys_wdata,
  output logic [31:0]  sys_rdata,
  output logic         sys_ack,
  // LLC miss / write-back
  input  logic         llc_req,
  input  logic         llc_we,
  input  addr_t        llc_addr,
  input  blk_t         llc_wdata,
  output logic         llc_ack,
  output blk_t         llc_rdata,
  // LLC look-up
  output logic         snp_req,
  output addr_t        snp_addr,
  input  logic         snp_ack,
  input  logic         snp_hit,
  input  blk_t         snp_data,
  // DRAM
  output logic         mem_req,
  output logic         mem_we,
  output addr_t        mem_addr,
  output blk_t         mem_wdata,
  input  logic         mem_ack,
  input  blk_t         mem_rdata,
  // exceptions and events
  output logic         mem_fault,
  output addr_t        fault_addr,
  output logic [2:0]   fault_lvl,
  output logic         storage_exc,
  output logic         smc_ready,
  output logic         ev_bypass,
  output logic         ev_reenc,
  output logic         ev_snoop_hit,
  output logic         ev_early_stop,
  output logic         ev_fault,
  output logic         ev_keygen
);
  // ---------------------------------------------------------------- decode
  logic [3:0] dev;
  logic       sel_ss, local_req, lack_q;
  logic [31:0] lrdata_q;
  assign dev       = sys_addr[15:12];
  assign sel_ss    = sys_addr[31:16] == 16'h1000 && dev == 4'd3;
  assign local_req = sys_req && !sel_ss;

  // ---------------------------------------------------------------- blocks
  logic [127:0] mem_key, mem_key_prev, store_key, ext_key_q;
  logic         mem_key_valid, store_key_valid, km_busy, km_done;
  logic         gen_req, gen_target, ext_load, ext_target;
  logic         rbit, rbit_valid, rword_valid, rword_rd, trng_en_q;
  logic [31:0]  rword, cfg_rdata, ss_rdata;
  logic         cfg_we, ss_ack;

  trng u_trng (.clk, .rst_n, .en(trng_en_q), .rbit, .rbit_valid, .rword, .rword_valid, .rword_rd);

  key_manager u_keys (.clk, .rst_n, .gen_req, .gen_target, .ext_load, .ext_target, .ext_key(ext_key_q),
    .rbit, .rbit_valid, .mem_key, .mem_key_prev, .store_key, .mem_key_valid, .store_key_valid,
    .busy(km_busy), .done(km_done));
  assign ev_keygen = km_done;

  logic         x_req, x_gnt, x_start, x_in_valid, x_in_final, x_in_ready, x_out_valid, x_done, x_tag_ok;
  ascon_op_e    x_op;
  logic [127:0] x_key, x_nonce, x_in_data, x_out_data, x_tag_in, x_tag_out;

  smc #(.META_CACHE_BYTES(META_CACHE_BYTES), .META_WAYS(META_WAYS)) u_smc (
    .clk, .rst_n, .key(mem_key), .ready(smc_ready),
    .cfg_we, .cfg_addr(sys_addr[2]), .cfg_wdata(sys_wdata), .cfg_rdata,
    .llc_req, .llc_we, .llc_addr, .llc_wdata, .llc_ack, .llc_rdata,
    .llc_fault(mem_fault), .fault_addr, .fault_lvl,
    .snp_req, .snp_addr, .snp_ack, .snp_hit, .snp_data,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .x_req, .x_gnt, .x_start, .x_op, .x_key, .x_nonce, .x_in_valid, .x_in_data, .x_in_final,
    .x_in_ready, .x_out_valid, .x_out_data, .x_tag_in, .x_done, .x_tag_out, .x_tag_ok, .x_hash(),
    .ev_bypass, .ev_reenc, .ev_snoop_hit, .ev_early_stop, .ev_fault);

  secure_storage #(.SLOTS(STORAGE_SLOTS)) u_store (
    .clk, .rst_n, .key(store_key),
    .bus_req(sys_req && sel_ss), .bus_we(sys_we), .bus_addr(sys_addr[4:0]), .bus_wdata(sys_wdata),
    .bus_rdata(ss_rdata), .bus_ack(ss_ack), .exc(storage_exc),
    .x_req, .x_gnt, .x_start, .x_op, .x_key, .x_nonce, .x_in_valid, .x_in_data, .x_in_final,
    .x_in_ready, .x_out_valid, .x_out_data, .x_tag_in, .x_done, .x_tag_out, .x_tag_ok);

  // ---------------------------------------------------------------- local registers
  logic acc;   // first cycle of a local access
  logic in_page;
  assign in_page  = sys_addr[31:16] == 16'h1000;
  assign acc      = local_req && !lack_q;
  assign cfg_we   = acc && sys_we && in_page && dev == 4'd0 && sys_addr[4:3] == 2'b00;
  assign gen_req  = acc && sys_we && in_page && dev == 4'd1 && sys_addr[4:0] == 5'h00 && sys_wdata[0];
  assign gen_target = sys_wdata[1];
  assign ext_load   = acc && sys_we && in_page && dev == 4'd1 && sys_addr[4:0] == 5'h04;
  assign ext_target = sys_wdata[1];
  assign rword_rd = acc && !sys_we && in_page && dev == 4'd2 && sys_addr[4:0] == 5'h00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lack_q <= 1'b0; lrdata_q <= '0; ext_key_q <= '0; trng_en_q <= 1'b1;
    end else begin
      lack_q <= acc;
      if (acc) begin
        lrdata_q <= '0;
        if (in_page && sys_we) begin
          if (dev == 4'd1 && sys_addr[4]) ext_key_q[127 - 32*sys_addr[3:2] -: 32] <= sys_wdata;
          if (dev == 4'd2 && sys_addr[4:0] == 5'h04) trng_en_q <= sys_wdata[0];
        end else if (in_page) begin
          unique case (dev)
            4'd0: lrdata_q <= sys_addr[3] ? {31'd0, smc_ready} : cfg_rdata;
            4'd1: lrdata_q <= {29'd0, store_key_valid, mem_key_valid, km_busy};
            4'd2: lrdata_q <= sys_addr[2] ? {30'd0, trng_en_q, rword_valid} : rword;
            default: lrdata_q <= '0;
          endcase
        end
      end
    end
  end

  assign sys_ack   = lack_q | ss_ack;
  assign sys_rdata = ss_ack ? ss_rdata : lrdata_q;

  // the previous memory key is held for software re-keying only
  logic unused_prev;
  assign unused_prev = ^mem_key_prev;
endmodule

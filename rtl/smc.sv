// smc: secure memory controller, placed between the last-level cache (LLC)
// and the DRAM interface.
//
// A request from the LLC (llc_req held until llc_ack) is first checked
// against the secure window set by two memory-mapped registers, in the
// manner of RISC-V physical memory protection (cfg_addr 0: base, 1: size;
// default 1 GB at 0xC000_0000). Outside the window the request goes straight
// to DRAM. Inside it the controller runs, one after the other:
//   1. int_ctrl I_CHECK_CTR - authenticate the page's counter block through
//      the Bonsai Merkle tree (stops early at a node found on chip);
//   2. enc_ctrl             - counter-mode decryption of the DRAM block, or
//      counter increment and encryption for a write (with page
//      re-encryption on minor-counter overflow, whose re-encrypted blocks get
//      their data hashes refreshed through int_ctrl I_REHASH);
//   3. int_ctrl I_VERIFY (read: compare the data hash) or I_UPDATE (write:
//      store the data hash and update the tree up to the on-chip root).
// A read returns the plaintext only if every check passed; otherwise llc_ack
// comes with llc_fault, fault_addr and fault_lvl (0 = data hash, 1..6 = the
// tree level whose entry mismatched) for the processor's exception.
// At reset the controller computes the root of the all-zero counter image
// (int_ctrl I_INIT) and raises `ready`.
//
// Shared resources and their arbiters: the DRAM port has four masters
// (bypass, encryption controller, re-encryption sequencer, metadata cache),
// the ASCON core three (encryption controller, integrity controller, and the
// x_* port for the processor bus and the secure storage), the metadata cache
// two. All DRAM transfers are whole 512-bit blocks (mem_req held until
// mem_ack). The block split and the arbiters follow the design; running the
// three steps in sequence rather than overlapped, and the single outstanding
// request, are this design's simplifications.
module smc
  import smc_pkg::*;
  import ascon_pkg::*;
#(
  parameter int unsigned META_CACHE_BYTES = 32768,
  parameter int unsigned META_WAYS        = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  output logic         ready,
  // secure-window registers
  input  logic         cfg_we,
  input  logic         cfg_addr,
  input  logic [31:0]  cfg_wdata,
  output logic [31:0]  cfg_rdata,
  // LLC miss / write-back port
  input  logic         llc_req,
  input  logic         llc_we,
  input  addr_t        llc_addr,
  input  blk_t         llc_wdata,
  output logic         llc_ack,
  output blk_t         llc_rdata,
  output logic         llc_fault,
  output addr_t        fault_addr,
  output logic [2:0]   fault_lvl,
  // LLC look-up (snoop) port
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
  // ASCON port for the system bus / secure storage
  input  logic         x_req,
  output logic         x_gnt,
  input  logic         x_start,
  input  ascon_op_e    x_op,
  input  logic [127:0] x_key,
  input  logic [127:0] x_nonce,
  input  logic         x_in_valid,
  input  logic [127:0] x_in_data,
  input  logic         x_in_final,
  output logic         x_in_ready,
  output logic         x_out_valid,
  output logic [127:0] x_out_data,
  input  logic [127:0] x_tag_in,
  output logic         x_done,
  output logic [127:0] x_tag_out,
  output logic         x_tag_ok,
  output logic [63:0]  x_hash,
  // events, one-cycle pulses
  output logic         ev_bypass,
  output logic         ev_reenc,
  output logic         ev_snoop_hit,
  output logic         ev_early_stop,
  output logic         ev_fault
);
  localparam logic [2:0] I_INIT = 3'd0, I_CHECK_CTR = 3'd1, I_VERIFY = 3'd2,
                         I_UPDATE = 3'd3, I_REHASH = 3'd4;

  // ---------------- secure window registers ----------------
  addr_t win_base_q, win_size_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_base_q <= SEC_BASE_DEF;
      win_size_q <= SEC_SIZE_DEF;
    end else if (cfg_we) begin
      if (cfg_addr) win_size_q <= cfg_wdata;
      else          win_base_q <= cfg_wdata;
    end
  end
  assign cfg_rdata = cfg_addr ? win_size_q : win_base_q;
  // the window may only narrow the region covered by the metadata
  wire in_window = ((llc_addr - win_base_q) < win_size_q) &&
                   ((llc_addr - SEC_BASE_DEF) < SEC_SIZE_DEF);

  // ---------------- ASCON core and its arbiter ----------------
  logic [2:0]   a_reqv, a_gntv;
  logic [1:0]   a_idx;
  logic         c_start, c_in_valid, c_in_final, c_in_ready, c_out_valid, c_done, c_tag_ok, c_busy;
  ascon_op_e    c_op;
  logic [127:0] c_key, c_nonce, c_in_data, c_out_data, c_tag_in, c_tag_out;
  logic [63:0]  c_hash;

  // enc_ctrl side
  logic         e_a_start, e_a_in_valid, e_a_in_final;
  logic [127:0] e_a_key, e_a_nonce, e_a_in_data;
  // int_ctrl side
  logic         i_a_start, i_a_in_valid, i_a_in_final;
  logic [127:0] i_a_in_data;

  rr_arbiter #(.N(3)) u_ascon_arb (.clk, .rst_n, .req(a_reqv), .gnt(a_gntv), .gnt_idx(a_idx));

  always_comb begin
    c_start = 1'b0; c_op = ASCON_ENC; c_key = '0; c_nonce = '0; c_in_valid = 1'b0;
    c_in_data = '0; c_in_final = 1'b0; c_tag_in = '0;
    unique case (a_idx)
      2'd0: begin
        c_start = e_a_start & a_gntv[0]; c_op = ASCON_ENC; c_key = e_a_key; c_nonce = e_a_nonce;
        c_in_valid = e_a_in_valid & a_gntv[0]; c_in_data = e_a_in_data; c_in_final = e_a_in_final;
      end
      2'd1: begin
        c_start = i_a_start & a_gntv[1]; c_op = ASCON_HASH;
        c_in_valid = i_a_in_valid & a_gntv[1]; c_in_data = i_a_in_data; c_in_final = i_a_in_final;
      end
      default: begin
        c_start = x_start & a_gntv[2]; c_op = x_op; c_key = x_key; c_nonce = x_nonce;
        c_in_valid = x_in_valid & a_gntv[2]; c_in_data = x_in_data; c_in_final = x_in_final;
        c_tag_in = x_tag_in;
      end
    endcase
  end

  ascon_core u_ascon (
    .clk, .rst_n, .start(c_start), .op(c_op), .key(c_key), .nonce(c_nonce), .busy(c_busy),
    .in_valid(c_in_valid), .in_data(c_in_data), .in_final(c_in_final), .in_ready(c_in_ready),
    .out_valid(c_out_valid), .out_data(c_out_data), .tag_in(c_tag_in), .done(c_done),
    .tag_out(c_tag_out), .tag_ok(c_tag_ok), .hash_out(c_hash)
  );

  assign x_gnt       = a_gntv[2];
  assign x_in_ready  = c_in_ready & a_gntv[2];
  assign x_out_valid = c_out_valid & a_gntv[2];
  assign x_out_data  = c_out_data;
  assign x_done      = c_done & a_gntv[2];
  assign x_tag_out   = c_tag_out;
  assign x_tag_ok    = c_tag_ok;
  assign x_hash      = c_hash;

  // ---------------- metadata cache and its arbiter ----------------
  logic [1:0] m_reqv, m_gntv;
  logic       m_idx;
  logic       e_md_req, e_md_write, i_md_req, i_md_write;
  addr_t      e_md_addr, i_md_addr;
  blk_t       e_md_wdata, e_md_wmask, i_md_wdata, i_md_wmask;
  logic       mc_req, mc_resp_valid, mc_hit, mc_mem_req, mc_mem_we;
  blk_t       mc_rdata, mc_mem_wdata;
  addr_t      mc_mem_addr;

  assign m_reqv = {i_md_req, e_md_req};
  rr_arbiter #(.N(2)) u_md_arb (.clk, .rst_n, .req(m_reqv), .gnt(m_gntv), .gnt_idx(m_idx));
  assign mc_req = |(m_gntv & m_reqv);

  // ---------------- DRAM arbiter ----------------
  logic [3:0] d_reqv, d_gntv;
  logic [1:0] d_idx;
  logic       byp_req, e_d_req, e_d_we, e_r_req, e_r_we;
  addr_t      e_d_addr, e_r_addr;
  blk_t       e_d_wdata, e_r_wdata;

  assign d_reqv = {mc_mem_req, e_r_req, e_d_req, byp_req};
  rr_arbiter #(.N(4)) u_dram_arb (.clk, .rst_n, .req(d_reqv), .gnt(d_gntv), .gnt_idx(d_idx));

  always_comb begin
    mem_req = |(d_gntv & d_reqv);
    unique case (d_idx)
      2'd0:    begin mem_we = llc_we;    mem_addr = llc_addr;    mem_wdata = llc_wdata;    end
      2'd1:    begin mem_we = e_d_we;    mem_addr = e_d_addr;    mem_wdata = e_d_wdata;    end
      2'd2:    begin mem_we = e_r_we;    mem_addr = e_r_addr;    mem_wdata = e_r_wdata;    end
      default: begin mem_we = mc_mem_we; mem_addr = mc_mem_addr; mem_wdata = mc_mem_wdata; end
    endcase
  end

  meta_cache #(.CACHE_BYTES(META_CACHE_BYTES), .WAYS(META_WAYS)) u_meta_cache (
    .clk, .rst_n, .req_valid(mc_req), .req_write(m_idx ? i_md_write : e_md_write),
    .req_addr(m_idx ? i_md_addr : e_md_addr), .req_wdata(m_idx ? i_md_wdata : e_md_wdata),
    .req_wmask(m_idx ? i_md_wmask : e_md_wmask), .resp_valid(mc_resp_valid), .resp_rdata(mc_rdata),
    .resp_hit(mc_hit), .mem_req(mc_mem_req), .mem_we(mc_mem_we), .mem_addr(mc_mem_addr),
    .mem_wdata(mc_mem_wdata), .mem_ack(mem_ack & d_gntv[3]), .mem_rdata(mem_rdata)
  );

  // ---------------- encryption controller ----------------
  logic        e_cmd_valid, e_cmd_ready, e_done, rh_valid, rh_done;
  blk_t        e_rdata, e_ct, rh_ct;
  logic [63:0] e_major, rh_major;
  logic [6:0]  e_minor, rh_minor;
  addr_t       rh_addr;

  enc_ctrl u_enc (
    .clk, .rst_n, .key,
    .cmd_valid(e_cmd_valid), .cmd_write(llc_we), .cmd_addr(llc_addr), .cmd_wdata(llc_wdata),
    .cmd_ready(e_cmd_ready), .done(e_done), .rdata(e_rdata), .ct(e_ct), .major(e_major), .minor(e_minor),
    .ev_reenc, .ev_snoop_hit,
    .md_req(e_md_req), .md_write(e_md_write), .md_addr(e_md_addr), .md_wdata(e_md_wdata),
    .md_wmask(e_md_wmask), .md_resp_valid(mc_resp_valid & m_gntv[0]), .md_rdata(mc_rdata),
    .a_req(a_reqv[0]), .a_gnt(a_gntv[0]), .a_start(e_a_start), .a_key(e_a_key), .a_nonce(e_a_nonce),
    .a_in_valid(e_a_in_valid), .a_in_data(e_a_in_data), .a_in_final(e_a_in_final),
    .a_in_ready(c_in_ready & a_gntv[0]), .a_out_valid(c_out_valid & a_gntv[0]), .a_out_data(c_out_data),
    .a_done(c_done & a_gntv[0]),
    .d_req(e_d_req), .d_we(e_d_we), .d_addr(e_d_addr), .d_wdata(e_d_wdata),
    .d_ack(mem_ack & d_gntv[1]), .d_rdata(mem_rdata),
    .r_req(e_r_req), .r_we(e_r_we), .r_addr(e_r_addr), .r_wdata(e_r_wdata),
    .r_ack(mem_ack & d_gntv[2]), .r_rdata(mem_rdata),
    .snp_req, .snp_addr, .snp_ack, .snp_hit, .snp_data,
    .rh_valid, .rh_addr, .rh_ct, .rh_major, .rh_minor, .rh_done
  );

  // ---------------- integrity check controller ----------------
  logic        i_cmd_valid, i_cmd_ready, i_done, i_fault;
  logic [2:0]  i_cmd_op, i_fault_lvl;
  addr_t       i_cmd_addr;
  blk_t        i_cmd_ct;
  logic [63:0] i_cmd_major;
  logic [6:0]  i_cmd_minor;

  int_ctrl u_int (
    .clk, .rst_n, .cmd_valid(i_cmd_valid), .cmd_op(i_cmd_op), .cmd_addr(i_cmd_addr), .cmd_ct(i_cmd_ct),
    .cmd_major(i_cmd_major), .cmd_minor(i_cmd_minor), .cmd_ready(i_cmd_ready), .done(i_done),
    .fault(i_fault), .fault_lvl(i_fault_lvl), .ev_early_stop,
    .md_req(i_md_req), .md_write(i_md_write), .md_addr(i_md_addr), .md_wdata(i_md_wdata),
    .md_wmask(i_md_wmask), .md_resp_valid(mc_resp_valid & m_gntv[1]), .md_rdata(mc_rdata), .md_hit(mc_hit),
    .a_req(a_reqv[1]), .a_gnt(a_gntv[1]), .a_start(i_a_start), .a_in_valid(i_a_in_valid),
    .a_in_data(i_a_in_data), .a_in_final(i_a_in_final), .a_in_ready(c_in_ready & a_gntv[1]),
    .a_done(c_done & a_gntv[1]), .a_hash(c_hash)
  );

  assign a_reqv[2] = x_req;

  // ---------------- top-level sequencing ----------------
  typedef enum logic [3:0] {
    S_BOOT, S_BOOT_W, S_IDLE, S_BYP, S_CHK, S_CHK_W, S_ENC, S_ENC_W, S_INT, S_INT_W, S_ACK
  } sst_e;
  sst_e  sst_q;
  logic  rh_busy_q, fault_q;
  blk_t  pt_q, ct_q;
  logic [63:0] major_q;
  logic [6:0]  minor_q;
  logic [2:0]  flvl_q;

  assign ready       = (sst_q != S_BOOT) && (sst_q != S_BOOT_W);
  assign byp_req     = (sst_q == S_BYP);
  assign e_cmd_valid = (sst_q == S_ENC);
  assign rh_done     = rh_busy_q && i_done;

  always_comb begin
    i_cmd_valid = 1'b0; i_cmd_op = I_INIT; i_cmd_addr = llc_addr; i_cmd_ct = ct_q;
    i_cmd_major = major_q; i_cmd_minor = minor_q;
    unique case (sst_q)
      S_BOOT: i_cmd_valid = 1'b1;
      S_CHK:  begin i_cmd_valid = 1'b1; i_cmd_op = I_CHECK_CTR; end
      S_INT:  begin i_cmd_valid = 1'b1; i_cmd_op = llc_we ? I_UPDATE : I_VERIFY; end
      S_ENC_W: if (rh_valid && !rh_busy_q && i_cmd_ready) begin
        i_cmd_valid = 1'b1; i_cmd_op = I_REHASH; i_cmd_addr = rh_addr; i_cmd_ct = rh_ct;
        i_cmd_major = rh_major; i_cmd_minor = rh_minor;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sst_q <= S_BOOT; rh_busy_q <= 1'b0; fault_q <= 1'b0; pt_q <= '0; ct_q <= '0;
      major_q <= '0; minor_q <= '0; flvl_q <= '0;
      llc_ack <= 1'b0; llc_rdata <= '0; llc_fault <= 1'b0; fault_addr <= '0; fault_lvl <= '0;
      ev_bypass <= 1'b0; ev_fault <= 1'b0;
    end else begin
      llc_ack   <= 1'b0;
      ev_bypass <= 1'b0;
      ev_fault  <= 1'b0;
      unique case (sst_q)
        S_BOOT:   if (i_cmd_ready) sst_q <= S_BOOT_W;
        S_BOOT_W: if (i_done) sst_q <= S_IDLE;
        S_IDLE: if (llc_req && !llc_ack) begin
          fault_q <= 1'b0;
          if (in_window) sst_q <= S_CHK;
          else begin sst_q <= S_BYP; ev_bypass <= 1'b1; end
        end
        S_BYP: if (mem_ack && d_gntv[0]) begin
          pt_q  <= mem_rdata;
          sst_q <= S_ACK;
        end
        S_CHK:   sst_q <= S_CHK_W;
        S_CHK_W: if (i_done) begin
          if (i_fault) begin fault_q <= 1'b1; flvl_q <= i_fault_lvl; sst_q <= S_ACK; end
          else sst_q <= S_ENC;
        end
        S_ENC: sst_q <= S_ENC_W;
        S_ENC_W: begin
          if (i_cmd_valid) rh_busy_q <= 1'b1;
          if (rh_busy_q && i_done) rh_busy_q <= 1'b0;
          if (e_done) begin
            pt_q <= e_rdata; ct_q <= e_ct; major_q <= e_major; minor_q <= e_minor;
            sst_q <= S_INT;
          end
        end
        S_INT:   sst_q <= S_INT_W;
        S_INT_W: if (i_done) begin
          if (i_fault) begin fault_q <= 1'b1; flvl_q <= i_fault_lvl; end
          sst_q <= S_ACK;
        end
        S_ACK: begin
          llc_ack    <= 1'b1;
          llc_rdata  <= fault_q ? '0 : pt_q;
          llc_fault  <= fault_q;
          fault_addr <= llc_addr;
          fault_lvl  <= flvl_q;
          ev_fault   <= fault_q;
          sst_q      <= S_IDLE;
        end
        default: sst_q <= S_IDLE;
      endcase
    end
  end

endmodule

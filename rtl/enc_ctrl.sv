// enc_ctrl: split-counter-mode encryption controller.
//
// Every 4 KB page has a 64-bit major counter and every 512-bit block a 7-bit
// minor counter, packed into one 512-bit counter block (see smc_pkg). The
// one-time pad of a block is the ASCON-128a encryption of the 512-bit seed
//   seed = { SEED_IV (409 bits), block address (32), major (64), minor (7) }
// and the block is XORed with the pad in both directions.
//
// Three sequencers (state machines) work together:
//  * the counter sequencer (main FSM) reads the counter block from the
//    metadata cache, and for a write increments the block's minor counter
//    and merges it back into the cache;
//  * the re-encryption sequencer runs when a minor counter would overflow:
//    the page's major counter is incremented, all minors are reset, and each
//    other block of the page is brought in - from the last-level cache through
//    a snoop if it is there, else read from DRAM and decrypted with the old
//    counters - then encrypted with the new counters, written back, and its
//    data hash refreshed through the integrity controller (rh_* handshake);
//  * the encryption sequencer drives the shared ASCON core: it requests the
//    core, starts an encryption under `key`, feeds the four seed blocks and a
//    padding block and collects the four pad blocks.
// For a read, the DRAM read and the pad generation run at the same time; the
// plaintext is ct XOR pad once both are in. For a write, the ciphertext is
// written to DRAM after the pad is ready.
//
// Command: cmd_valid is a one-cycle pulse while idle (cmd_ready). done pulses
// once with rdata (plaintext, reads), ct (ciphertext) and the counters used.
// Memory-type ports (md_*, d_*, r_*, snp_*) hold their request until the
// matching ack/resp. d_* carries the requested block, r_* the re-encryption
// traffic. The split-counter sizes, seed layout and the snoop during
// re-encryption follow the design; the ASCON nonce (address and counters,
// so that every pad block depends on them), the choice of minor 0 for blocks
// after an overflow and the rehash of re-encrypted blocks are this design's.
module enc_ctrl
  import smc_pkg::*;
  import ascon_pkg::*;
#(
  parameter logic [408:0] SEED_IV = 409'({13{32'h9e3779b9}})
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  // command / result
  input  logic         cmd_valid,
  input  logic         cmd_write,
  input  addr_t        cmd_addr,
  input  blk_t         cmd_wdata,
  output logic         cmd_ready,
  output logic         done,
  output blk_t         rdata,
  output blk_t         ct,
  output logic [63:0]  major,
  output logic [6:0]   minor,
  output logic         ev_reenc,
  output logic         ev_snoop_hit,
  // metadata cache
  output logic         md_req,
  output logic         md_write,
  output addr_t        md_addr,
  output blk_t         md_wdata,
  output blk_t         md_wmask,
  input  logic         md_resp_valid,
  input  blk_t         md_rdata,
  // ASCON core (shared)
  output logic         a_req,
  input  logic         a_gnt,
  output logic         a_start,
  output logic [127:0] a_key,
  output logic [127:0] a_nonce,
  output logic         a_in_valid,
  output logic [127:0] a_in_data,
  output logic         a_in_final,
  input  logic         a_in_ready,
  input  logic         a_out_valid,
  input  logic [127:0] a_out_data,
  input  logic         a_done,
  // DRAM, requested block
  output logic         d_req,
  output logic         d_we,
  output addr_t        d_addr,
  output blk_t         d_wdata,
  input  logic         d_ack,
  input  blk_t         d_rdata,
  // DRAM, re-encryption traffic
  output logic         r_req,
  output logic         r_we,
  output addr_t        r_addr,
  output blk_t         r_wdata,
  input  logic         r_ack,
  input  blk_t         r_rdata,
  // last-level cache look-up
  output logic         snp_req,
  output addr_t        snp_addr,
  input  logic         snp_ack,
  input  logic         snp_hit,
  input  blk_t         snp_data,
  // data-hash refresh of re-encrypted blocks
  output logic         rh_valid,
  output addr_t        rh_addr,
  output blk_t         rh_ct,
  output logic [63:0]  rh_major,
  output logic [6:0]   rh_minor,
  input  logic         rh_done
);

  // ------------------------------------------------------------------
  // encryption sequencer: pad = ASCON-128a_K(nonce, seed)
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {E_IDLE, E_GNT, E_FEED, E_WAIT} est_e;
  est_e         est_q;
  logic         pad_go, pad_done;
  addr_t        pad_addr;
  logic [63:0]  pad_major;
  logic [6:0]   pad_minor;
  blk_t         pad_q, seed_q;
  logic [2:0]   in_cnt_q, out_cnt_q;

  assign a_req      = (est_q != E_IDLE);
  assign a_key      = key;
  assign a_in_valid = (est_q == E_FEED);
  assign a_in_final = (in_cnt_q == 3'd4);
  assign a_in_data  = a_in_final ? {8'h80, 120'd0} : seed_q[511 - 128*in_cnt_q[1:0] -: 128];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_q <= E_IDLE; pad_q <= '0; seed_q <= '0; in_cnt_q <= '0; out_cnt_q <= '0;
      a_start <= 1'b0; a_nonce <= '0; pad_done <= 1'b0;
    end else begin
      a_start  <= 1'b0;
      pad_done <= 1'b0;
      unique case (est_q)
        E_IDLE: if (pad_go) begin
          seed_q  <= {SEED_IV, pad_addr, pad_major, pad_minor};
          a_nonce <= {pad_addr, pad_major, 25'd0, pad_minor};
          est_q   <= E_GNT;
        end
        E_GNT: if (a_gnt) begin
          a_start   <= 1'b1;
          in_cnt_q  <= '0;
          out_cnt_q <= '0;
          est_q     <= E_FEED;
        end
        E_FEED: if (a_in_ready) begin
          in_cnt_q <= in_cnt_q + 3'd1;
          if (a_in_final) est_q <= E_WAIT;
        end
        E_WAIT: if (a_done) begin
          pad_done <= 1'b1;
          est_q    <= E_IDLE;
        end
        default: est_q <= E_IDLE;
      endcase
      if (a_out_valid && out_cnt_q < 3'd4) begin
        pad_q[511 - 128*out_cnt_q[1:0] -: 128] <= a_out_data;
        out_cnt_q <= out_cnt_q + 3'd1;
      end
    end
  end

  // ------------------------------------------------------------------
  // counter and re-encryption sequencers
  // ------------------------------------------------------------------
  typedef enum logic [3:0] {
    M_IDLE, M_CTR_RD, M_RD, M_CTR_WR, M_WPAD, M_WR_DRAM,
    M_RE_SNP, M_RE_RD, M_RE_ENC, M_RE_WR, M_RE_RH, M_RE_CTR, M_DONE
  } mst_e;
  mst_e        mst_q;
  logic        write_q;
  addr_t       addr_q;
  blk_t        wdata_q, ctr_q, blk_q;
  logic [63:0] major_q;
  logic [6:0]  minor_q;
  logic [5:0]  j_q;
  logic        got_ct_q, got_pad_q, pad_busy_q;

  wire [5:0]  cur_idx   = addr_q[11:6];
  wire addr_t page_base = {addr_q[31:12], 12'd0};
  wire addr_t j_addr    = page_base | {20'd0, j_q, 6'd0};
  wire [63:0] ctr_major = ctr_q[511:448];

  function automatic logic [6:0] minor_of(input blk_t c, input logic [5:0] i);
    return c[7*i +: 7];
  endfunction

  assign cmd_ready = (mst_q == M_IDLE);
  assign md_req    = (mst_q == M_CTR_RD) || (mst_q == M_CTR_WR) || (mst_q == M_RE_CTR);
  assign md_write  = (mst_q != M_CTR_RD);
  assign md_addr   = ctr_addr(addr_q);
  always_comb begin
    md_wdata = '0; md_wmask = '0;
    if (mst_q == M_RE_CTR) begin
      md_wdata = {major_q, 448'd0};
      md_wmask = '1;
    end else begin
      md_wdata[7*cur_idx +: 7] = minor_q;
      md_wmask[7*cur_idx +: 7] = '1;
    end
  end

  assign d_req   = ((mst_q == M_RD) && !got_ct_q) || (mst_q == M_WR_DRAM);
  assign d_we    = (mst_q == M_WR_DRAM);
  assign d_addr  = addr_q;
  assign d_wdata = blk_q;

  assign r_req   = ((mst_q == M_RE_RD) && !got_ct_q) || (mst_q == M_RE_WR);
  assign r_we    = (mst_q == M_RE_WR);
  assign r_addr  = j_addr;
  assign r_wdata = blk_q;

  assign snp_req  = (mst_q == M_RE_SNP) && (j_q != cur_idx);
  assign snp_addr = j_addr;

  assign rh_valid = (mst_q == M_RE_RH);
  assign rh_addr  = j_addr;
  assign rh_ct    = blk_q;
  assign rh_major = major_q;
  assign rh_minor = 7'd0;

  // pad request for the current state (a one-cycle pulse on entry)
  always_comb begin
    pad_go = 1'b0; pad_addr = addr_q; pad_major = major_q; pad_minor = minor_q;
    if (!pad_busy_q && !got_pad_q) begin
      unique case (mst_q)
        M_RD, M_WPAD: pad_go = 1'b1;
        M_RE_RD: begin
          pad_go = 1'b1; pad_addr = j_addr; pad_major = ctr_major; pad_minor = minor_of(ctr_q, j_q);
        end
        M_RE_ENC: begin
          pad_go = 1'b1; pad_addr = j_addr; pad_minor = 7'd0;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst_q <= M_IDLE; write_q <= 1'b0; addr_q <= '0; wdata_q <= '0; ctr_q <= '0; blk_q <= '0;
      major_q <= '0; minor_q <= '0; j_q <= '0; got_ct_q <= 1'b0; got_pad_q <= 1'b0; pad_busy_q <= 1'b0;
      done <= 1'b0; rdata <= '0; ct <= '0; major <= '0; minor <= '0; ev_reenc <= 1'b0; ev_snoop_hit <= 1'b0;
    end else begin
      done         <= 1'b0;
      ev_reenc     <= 1'b0;
      ev_snoop_hit <= 1'b0;
      if (pad_go)   pad_busy_q <= 1'b1;
      if (pad_done) begin pad_busy_q <= 1'b0; got_pad_q <= 1'b1; end
      unique case (mst_q)
        M_IDLE: if (cmd_valid) begin
          write_q <= cmd_write; addr_q <= cmd_addr; wdata_q <= cmd_wdata;
          got_ct_q <= 1'b0; got_pad_q <= 1'b0;
          mst_q <= M_CTR_RD;
        end
        M_CTR_RD: if (md_resp_valid) begin
          ctr_q   <= md_rdata;
          major_q <= md_rdata[511:448];
          minor_q <= minor_of(md_rdata, cur_idx);
          if (!write_q) mst_q <= M_RD;
          else if (minor_of(md_rdata, cur_idx) != 7'h7f) begin
            minor_q <= minor_of(md_rdata, cur_idx) + 7'd1;
            mst_q   <= M_CTR_WR;
          end else begin
            // minor counter overflow: re-encrypt the page under major+1
            major_q  <= md_rdata[511:448] + 64'd1;
            minor_q  <= 7'd0;
            j_q      <= '0;
            ev_reenc <= 1'b1;
            mst_q    <= M_RE_SNP;
          end
        end
        M_RD: begin
          if (d_ack) begin blk_q <= d_rdata; got_ct_q <= 1'b1; end
          if ((got_ct_q || d_ack) && (got_pad_q || pad_done)) begin
            rdata <= (got_ct_q ? blk_q : d_rdata) ^ pad_q;
            ct    <= got_ct_q ? blk_q : d_rdata;
            mst_q <= M_DONE;
          end
        end
        M_CTR_WR: if (md_resp_valid) begin
          got_pad_q <= 1'b0;
          mst_q     <= M_WPAD;
        end
        M_WPAD: if (got_pad_q) begin
          blk_q <= wdata_q ^ pad_q;
          mst_q <= M_WR_DRAM;
        end
        M_WR_DRAM: if (d_ack) begin
          ct    <= blk_q;
          mst_q <= M_DONE;
        end
        M_DONE: begin
          done  <= 1'b1;
          major <= major_q;
          minor <= minor_q;
          mst_q <= M_IDLE;
        end
        // ---------------- re-encryption of the page ----------------
        M_RE_SNP: begin
          got_ct_q <= 1'b0; got_pad_q <= 1'b0;
          if (j_q == cur_idx) begin
            j_q <= j_q + 6'd1;
            if (j_q == 6'd63) mst_q <= M_RE_CTR;
          end else if (snp_ack) begin
            if (snp_hit) begin
              blk_q        <= snp_data;
              ev_snoop_hit <= 1'b1;
              mst_q        <= M_RE_ENC;
            end else begin
              mst_q <= M_RE_RD;
            end
          end
        end
        M_RE_RD: begin
          if (r_ack) begin blk_q <= r_rdata; got_ct_q <= 1'b1; end
          if ((got_ct_q || r_ack) && (got_pad_q || pad_done)) begin
            blk_q     <= (got_ct_q ? blk_q : r_rdata) ^ pad_q;
            got_pad_q <= 1'b0;
            mst_q     <= M_RE_ENC;
          end
        end
        M_RE_ENC: if (got_pad_q) begin
          blk_q <= blk_q ^ pad_q;
          mst_q <= M_RE_WR;
        end
        M_RE_WR: if (r_ack) mst_q <= M_RE_RH;
        M_RE_RH: if (rh_done) begin
          j_q   <= j_q + 6'd1;
          mst_q <= (j_q == 6'd63) ? M_RE_CTR : M_RE_SNP;
        end
        M_RE_CTR: if (md_resp_valid) begin
          got_pad_q <= 1'b0;
          mst_q     <= M_WPAD;
        end
        default: mst_q <= M_IDLE;
      endcase
    end
  end

endmodule

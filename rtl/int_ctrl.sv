// int_ctrl: integrity check controller with a Bonsai Merkle tree.
//
// Data blocks are authenticated by a 64-bit ASCON-Hash over
//   { address (32) , 25'b0 , minor (7) } , major (64) , ciphertext (8 x 64)
// i.e. ten 64-bit message words; the hashes live in memory, eight per block.
// Because the counters are part of the message, replaying an old
// ciphertext/hash pair fails once the counter has moved on, so only the
// counter blocks need the tree: an 8-ary tree whose nodes are 512-bit blocks
// of eight 64-bit hashes, each hashing one node (or counter block) of the
// level below. Levels 1..5 are in memory (through the metadata cache), the
// top node (level 6, the root) is a register only this block can write.
//
// Commands (cmd_valid pulse while cmd_ready; done pulses at the end):
//   I_INIT      compute the root of an all-zero counter image (boot).
//   I_CHECK_CTR walk up from the counter block of cmd_addr: hash the node,
//               compare with its entry in the parent; stop with success as
//               soon as a node came from the metadata cache (resp_hit), since
//               nodes on chip were verified when they were fetched, or at the
//               root. A mismatch raises fault with fault_lvl = parent level.
//   I_VERIFY    hash the data block and compare with the stored data hash
//               (fault_lvl = 0 on mismatch).
//   I_UPDATE    write the new data hash, then re-hash the counter block and
//               every ancestor up to the root, writing each new hash into its
//               parent (the cache returns the merged parent block).
//   I_REHASH    only write a new data hash (blocks re-encrypted by enc_ctrl).
// The hash sequencer requests the shared ASCON core, starts ASCON_HASH and
// feeds the words plus a padding block, then takes the 64-bit hash.
// The tree shape (8-ary, six levels with on-chip root), 64-bit hashes, the
// hash messages and the early stop on a cache hit follow the design; the
// update always climbing to the root (so that an evicted dirty node never
// leaves a stale parent) and the command split are this design's choices.
module int_ctrl
  import smc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  input  logic [2:0]   cmd_op,
  input  addr_t        cmd_addr,
  input  blk_t         cmd_ct,
  input  logic [63:0]  cmd_major,
  input  logic [6:0]   cmd_minor,
  output logic         cmd_ready,
  output logic         done,
  output logic         fault,
  output logic [2:0]   fault_lvl,
  output logic         ev_early_stop,
  // metadata cache
  output logic         md_req,
  output logic         md_write,
  output addr_t        md_addr,
  output blk_t         md_wdata,
  output blk_t         md_wmask,
  input  logic         md_resp_valid,
  input  blk_t         md_rdata,
  input  logic         md_hit,
  // ASCON core (shared)
  output logic         a_req,
  input  logic         a_gnt,
  output logic         a_start,
  output logic         a_in_valid,
  output logic [127:0] a_in_data,
  output logic         a_in_final,
  input  logic         a_in_ready,
  input  logic         a_done,
  input  logic [63:0]  a_hash
);
  localparam logic [2:0] I_INIT = 3'd0, I_CHECK_CTR = 3'd1, I_VERIFY = 3'd2,
                         I_UPDATE = 3'd3, I_REHASH = 3'd4;

  // ------------------------------------------------------------------
  // hash generation sequencer
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {H_IDLE, H_GNT, H_FEED, H_WAIT} hst_e;
  hst_e             hst_q;
  logic             h_go, h_done;
  logic [9:0][63:0] msg_q;         // msg_q[0] is sent first
  logic [3:0]       nw_q, wcnt_q;
  hash_t            h_q;

  assign a_req      = (hst_q != H_IDLE);
  assign a_in_valid = (hst_q == H_FEED);
  assign a_in_final = (wcnt_q == nw_q);
  assign a_in_data  = {64'd0, a_in_final ? 64'h8000_0000_0000_0000 : msg_q[wcnt_q]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hst_q <= H_IDLE; wcnt_q <= '0; h_q <= '0; h_done <= 1'b0; a_start <= 1'b0;
    end else begin
      h_done  <= 1'b0;
      a_start <= 1'b0;
      unique case (hst_q)
        H_IDLE: if (h_go) hst_q <= H_GNT;
        H_GNT:  if (a_gnt) begin a_start <= 1'b1; wcnt_q <= '0; hst_q <= H_FEED; end
        H_FEED: if (a_in_ready) begin
          wcnt_q <= wcnt_q + 4'd1;
          if (a_in_final) hst_q <= H_WAIT;
        end
        H_WAIT: if (a_done) begin h_q <= a_hash; h_done <= 1'b1; hst_q <= H_IDLE; end
        default: hst_q <= H_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // metadata / integrity tree sequencer
  // ------------------------------------------------------------------
  typedef enum logic [3:0] {
    T_IDLE, T_INIT_H, T_CTR_RD, T_NODE_H, T_PARENT, T_DH_H, T_DH_RD, T_DH_WR,
    T_U_CTR, T_U_H, T_U_WR, T_FIN
  } tst_e;
  tst_e        tst_q;
  logic [2:0]  op_q;
  addr_t       addr_q;
  logic [2:0]  lvl_q;       // level of the node being hashed (0 = counter block)
  blk_t        root_q;
  logic        fault_q;
  logic [2:0]  flvl_q;
  logic        hgo_q;

  wire [17:0] page = 18'((addr_q - SEC_BASE_DEF) >> 12);
  wire [2:0]  plvl = lvl_q + 3'd1;

  function automatic logic [9:0][63:0] blk_msg(input blk_t b);
    logic [9:0][63:0] m;
    m = '0;
    for (int i = 0; i < 8; i++) m[i] = b[511 - 64*i -: 64];
    return m;
  endfunction

  assign h_go      = hgo_q;
  assign cmd_ready = (tst_q == T_IDLE);

  always_comb begin
    md_req = 1'b0; md_write = 1'b0; md_addr = '0; md_wdata = '0; md_wmask = '0;
    unique case (tst_q)
      T_CTR_RD, T_U_CTR: begin md_req = 1'b1; md_addr = ctr_addr(addr_q); end
      T_PARENT: begin md_req = (plvl != 3'd6); md_addr = node_addr(plvl, page); end
      T_DH_RD:  begin md_req = 1'b1; md_addr = dh_addr(addr_q); end
      T_DH_WR: begin
        md_req = 1'b1; md_write = 1'b1; md_addr = dh_addr(addr_q);
        md_wdata[64*dh_slot(addr_q) +: 64] = h_q;
        md_wmask[64*dh_slot(addr_q) +: 64] = '1;
      end
      T_U_WR: begin
        md_req = (plvl != 3'd6); md_write = 1'b1; md_addr = node_addr(plvl, page);
        md_wdata[64*node_slot(plvl, page) +: 64] = h_q;
        md_wmask[64*node_slot(plvl, page) +: 64] = '1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst_q <= T_IDLE; op_q <= '0; addr_q <= '0; lvl_q <= '0; root_q <= '0;
      fault_q <= 1'b0; flvl_q <= '0; hgo_q <= 1'b0; msg_q <= '0; nw_q <= 4'd8;
      done <= 1'b0; fault <= 1'b0; fault_lvl <= '0; ev_early_stop <= 1'b0;
    end else begin
      done          <= 1'b0;
      ev_early_stop <= 1'b0;
      hgo_q         <= 1'b0;
      unique case (tst_q)
        T_IDLE: if (cmd_valid) begin
          op_q <= cmd_op; addr_q <= cmd_addr; fault_q <= 1'b0; flvl_q <= '0; lvl_q <= '0;
          unique case (cmd_op)
            I_INIT: begin
              msg_q <= '0; nw_q <= 4'd8; hgo_q <= 1'b1; tst_q <= T_INIT_H;
            end
            I_CHECK_CTR: tst_q <= T_CTR_RD;
            default: begin   // data hash first
              msg_q[0] <= {cmd_addr, 25'd0, cmd_minor};
              msg_q[1] <= cmd_major;
              for (int i = 0; i < 8; i++) msg_q[2 + i] <= cmd_ct[511 - 64*i -: 64];
              nw_q  <= 4'd10;
              hgo_q <= 1'b1;
              tst_q <= T_DH_H;
            end
          endcase
        end
        // boot: root of the all-zero counter image
        T_INIT_H: if (h_done) begin
          if (lvl_q == 3'd5) begin
            root_q <= {8{h_q}};
            tst_q  <= T_FIN;
          end else begin
            msg_q <= blk_msg({8{h_q}}); nw_q <= 4'd8; hgo_q <= 1'b1;
            lvl_q <= lvl_q + 3'd1;
          end
        end
        // tree verification
        T_CTR_RD: if (md_resp_valid) begin
          if (md_hit) begin
            ev_early_stop <= 1'b1;
            tst_q <= T_FIN;
          end else begin
            msg_q <= blk_msg(md_rdata); nw_q <= 4'd8; hgo_q <= 1'b1;
            tst_q <= T_NODE_H;
          end
        end
        T_NODE_H: if (h_done) tst_q <= T_PARENT;
        T_PARENT: begin
          if (plvl == 3'd6) begin
            if (root_q[64*node_slot(plvl, page) +: 64] != h_q) begin fault_q <= 1'b1; flvl_q <= plvl; end
            tst_q <= T_FIN;
          end else if (md_resp_valid) begin
            if (md_rdata[64*node_slot(plvl, page) +: 64] != h_q) begin
              fault_q <= 1'b1; flvl_q <= plvl; tst_q <= T_FIN;
            end else if (md_hit) begin
              ev_early_stop <= 1'b1; tst_q <= T_FIN;
            end else begin
              msg_q <= blk_msg(md_rdata); hgo_q <= 1'b1; lvl_q <= plvl;
              tst_q <= T_NODE_H;
            end
          end
        end
        // data hash
        T_DH_H: if (h_done) tst_q <= (op_q == I_VERIFY) ? T_DH_RD : T_DH_WR;
        T_DH_RD: if (md_resp_valid) begin
          if (md_rdata[64*dh_slot(addr_q) +: 64] != h_q) begin fault_q <= 1'b1; flvl_q <= 3'd0; end
          tst_q <= T_FIN;
        end
        T_DH_WR: if (md_resp_valid) tst_q <= (op_q == I_UPDATE) ? T_U_CTR : T_FIN;
        // tree update
        T_U_CTR: if (md_resp_valid) begin
          msg_q <= blk_msg(md_rdata); nw_q <= 4'd8; hgo_q <= 1'b1; lvl_q <= '0;
          tst_q <= T_U_H;
        end
        T_U_H: if (h_done) tst_q <= T_U_WR;
        T_U_WR: begin
          if (plvl == 3'd6) begin
            root_q[64*node_slot(plvl, page) +: 64] <= h_q;
            tst_q <= T_FIN;
          end else if (md_resp_valid) begin
            msg_q <= blk_msg(md_rdata); hgo_q <= 1'b1; lvl_q <= plvl;
            tst_q <= T_U_H;
          end
        end
        T_FIN: begin
          done      <= 1'b1;
          fault     <= fault_q;
          fault_lvl <= flvl_q;
          tst_q     <= T_IDLE;
        end
        default: tst_q <= T_IDLE;
      endcase
    end
  end

endmodule

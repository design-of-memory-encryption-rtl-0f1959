// smc_pkg: sizes and the memory map shared by the secure memory controller.
//
// Protected data region: 1 GB at 0xC000_0000 (the design's sizing), 64-byte
// (512-bit) blocks, 4 KB pages of 64 blocks. Each page has one 512-bit
// counter block: a 64-bit major counter in bits [511:448] and 64 seven-bit
// minor counters, block i's minor in bits [7*i +: 7]. Each data block has a
// 64-bit hash, eight to a block. The counter blocks are covered by an 8-ary
// Bonsai Merkle tree: levels 1..5 are stored in memory, level 6 (eight
// 64-bit hashes, one 512-bit block) is the on-chip root. Where these
// metadata regions sit in the address map is this design's choice.
package smc_pkg;

  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned BLK_W     = 512;
  localparam int unsigned HASH_W    = 64;
  localparam int unsigned MAJOR_W   = 64;
  localparam int unsigned MINOR_W   = 7;
  localparam int unsigned TREE_LVLS = 6;      // levels including the on-chip root

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [BLK_W-1:0]  blk_t;
  typedef logic [HASH_W-1:0] hash_t;

  localparam addr_t SEC_BASE_DEF = 32'hC000_0000;
  localparam addr_t SEC_SIZE_DEF = 32'h4000_0000;   // 1 GB

  // metadata layout (byte addresses)
  localparam addr_t CTR_BASE = 32'h8000_0000;   // 16 MB of counter blocks
  localparam addr_t DH_BASE  = 32'h8100_0000;   // 128 MB of data hashes
  localparam addr_t L1_BASE  = 32'h8900_0000;   // 2 MB
  localparam addr_t L2_BASE  = 32'h8920_0000;   // 256 KB
  localparam addr_t L3_BASE  = 32'h8924_0000;   // 32 KB
  localparam addr_t L4_BASE  = 32'h8924_8000;   // 4 KB
  localparam addr_t L5_BASE  = 32'h8924_9000;   // 512 B

  // data block index (0 .. 2^24-1) of a byte address in the protected region
  function automatic logic [23:0] blk_index(input addr_t a);
    return 24'((a - SEC_BASE_DEF) >> 6);
  endfunction

  function automatic addr_t ctr_addr(input addr_t a);
    return CTR_BASE + {8'd0, blk_index(a)[23:6], 6'd0};
  endfunction

  function automatic addr_t dh_addr(input addr_t a);
    return DH_BASE + {5'd0, blk_index(a)[23:3], 6'd0};
  endfunction

  function automatic logic [2:0] dh_slot(input addr_t a);
    return blk_index(a)[2:0];
  endfunction

  // Tree node holding the hash of the level-(lvl-1) node of page p
  // (level 0 = the counter block). lvl = 1..5 are memory blocks.
  function automatic addr_t node_addr(input logic [2:0] lvl, input logic [17:0] page);
    unique case (lvl)
      3'd1:    return L1_BASE + {11'd0, page[17:3],  6'd0};
      3'd2:    return L2_BASE + {14'd0, page[17:6],  6'd0};
      3'd3:    return L3_BASE + {17'd0, page[17:9],  6'd0};
      3'd4:    return L4_BASE + {20'd0, page[17:12], 6'd0};
      default: return L5_BASE + {23'd0, page[17:15], 6'd0};
    endcase
  endfunction

  function automatic logic [2:0] node_slot(input logic [2:0] lvl, input logic [17:0] page);
    return 3'(page >> (3 * (lvl - 3'd1)));
  endfunction

endpackage

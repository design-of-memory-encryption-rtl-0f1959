// meta_cache: the metadata cache of the secure memory controller. It holds
// counter blocks, data-hash blocks and integrity-tree nodes, 512 bits per line.
//
// Organisation (the design's base configuration): 32 KB, 4-way set
// associative, least-recently-used replacement, write-back with write-allocate.
// With 64-byte lines that is 128 sets. LRU keeps a 2-bit age per way; the
// accessed way becomes age 0 and younger ways age by one; the victim is an
// invalid way if there is one, else the way of age WAYS-1.
//
// Request port (one client; the controller arbitrates): req_valid is held
// until resp_valid and may stay high in the cycle of resp_valid; a new
// request is taken from the cycle after. A read returns the line. A write merges req_wdata into
// the line under the bit mask req_wmask (this is how new counters or a single
// 64-bit hash are written into a cached block) and returns the merged line.
// resp_hit tells whether the line was present before the request; the
// integrity tree uses it to stop a traversal at a node that is on chip.
// A hit answers two cycles after the request is raised; a miss adds a
// write-back of a dirty victim and a fill, each one transfer on the memory
// port (mem_req held until mem_ack). The arrays are plain register arrays
// (the ASIC used foundry SRAMs, the FPGA block RAMs).
// CACHE_BYTES = 0 gives the no-cache point of the cache-size sweep: every
// request is a miss (resp_hit = 0), a read is one fill, and a write is a fill,
// the masked merge and a write-through of the merged line before the answer.
// The arrays then shrink to two sets that only buffer the line in flight;
// no line is kept from one request to the next.
// The handshake assertion below is disabled during reset with `disable iff`,
// a synchronous use of rst_n next to the asynchronous reset of the flops;
// lint reports rst_n as used both ways, which is intended here.
module meta_cache
  import smc_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned WAYS        = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid,
  input  logic  req_write,
  input  addr_t req_addr,
  input  blk_t  req_wdata,
  input  blk_t  req_wmask,
  output logic  resp_valid,
  output blk_t  resp_rdata,
  output logic  resp_hit,
  output logic  mem_req,
  output logic  mem_we,
  output addr_t mem_addr,
  output blk_t  mem_wdata,
  input  logic  mem_ack,
  input  blk_t  mem_rdata
);

  localparam bit          NOCACHE = (CACHE_BYTES == 0);
  localparam int unsigned LINES = NOCACHE ? 2 * WAYS : CACHE_BYTES / (BLK_W / 8);
  localparam int unsigned SETS  = LINES / WAYS;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = ADDR_W - 6 - IDX_W;

  typedef logic [TAG_W-1:0] tag_t;

  blk_t             data_q  [SETS][WAYS];
  tag_t             tag_q   [SETS][WAYS];
  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAYS-1:0]  dirty_q [SETS];
  logic [WAY_W-1:0] age_q   [SETS][WAYS];

  typedef enum logic [2:0] {C_IDLE, C_LOOKUP, C_WB, C_FILL, C_DONE} cst_e;
  cst_e cst_q;

  wire [IDX_W-1:0] idx = req_addr[6 +: IDX_W];
  wire tag_t       tag = req_addr[ADDR_W-1 -: TAG_W];

  logic             hit;
  logic [WAY_W-1:0] hit_way, victim;
  logic [WAY_W-1:0] way_q;
  logic             was_hit_q;
  logic             wt_q;       // no-cache mode: write-through done

  always_comb begin
    hit = 1'b0; hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[idx][w] && tag_q[idx][w] == tag) begin hit = 1'b1; hit_way = WAY_W'(w); end
    victim = '0;
    for (int w = 0; w < WAYS; w++)
      if (age_q[idx][w] == WAY_W'(WAYS - 1)) victim = WAY_W'(w);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid_q[idx][w]) victim = WAY_W'(w);
  end

  assign mem_addr  = (cst_q == C_WB) ? {tag_q[idx][way_q], idx, 6'd0} : {req_addr[ADDR_W-1:6], 6'd0};
  assign mem_wdata = data_q[idx][way_q];
  assign mem_req   = (cst_q == C_WB) || (cst_q == C_FILL);
  assign mem_we    = (cst_q == C_WB);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst_q      <= C_IDLE;
      way_q      <= '0;
      was_hit_q  <= 1'b0;
      wt_q       <= 1'b0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      resp_hit   <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) age_q[s][w] <= WAY_W'(w);
      end
    end else begin
      resp_valid <= 1'b0;
      unique case (cst_q)
        // the master sees resp_valid one cycle late and still holds the
        // finished request during that cycle: do not serve it twice
        C_IDLE: if (req_valid && !resp_valid) cst_q <= C_LOOKUP;
        C_LOOKUP: begin
          was_hit_q <= hit;
          if (hit) begin
            way_q <= hit_way;
            cst_q <= C_DONE;
          end else begin
            way_q <= victim;
            cst_q <= (valid_q[idx][victim] && dirty_q[idx][victim]) ? C_WB : C_FILL;
          end
        end
        C_WB: if (mem_ack) cst_q <= wt_q ? C_DONE : C_FILL;
        C_FILL: if (mem_ack) begin
          data_q[idx][way_q]  <= mem_rdata;
          tag_q[idx][way_q]   <= tag;
          valid_q[idx][way_q] <= !NOCACHE;
          dirty_q[idx][way_q] <= 1'b0;
          cst_q               <= C_DONE;
        end
        C_DONE: begin
          automatic blk_t line = data_q[idx][way_q];
          if (req_write) begin
            line = (line & ~req_wmask) | (req_wdata & req_wmask);
            data_q[idx][way_q]  <= line;
            dirty_q[idx][way_q] <= !NOCACHE;
          end
          if (NOCACHE && req_write && !wt_q) begin
            // write the merged line through, then answer (the merge is
            // repeated on the way back and gives the same line)
            wt_q  <= 1'b1;
            cst_q <= C_WB;
          end else begin
            for (int w = 0; w < WAYS; w++)
              if (age_q[idx][w] < age_q[idx][way_q]) age_q[idx][w] <= age_q[idx][w] + 1'b1;
            age_q[idx][way_q] <= '0;
            resp_rdata <= line;
            resp_hit   <= was_hit_q;
            resp_valid <= 1'b1;
            wt_q       <= 1'b0;
            cst_q      <= C_IDLE;
          end
        end
        default: cst_q <= C_IDLE;
      endcase
    end
  end

  // the request must stay stable while it is being served
  property p_req_held;
    @(posedge clk) disable iff (!rst_n) (cst_q != C_IDLE) |-> req_valid;
  endproperty
  a_req_held: assert property (p_req_held);

endmodule

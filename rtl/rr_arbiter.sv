// rr_arbiter: round-robin arbiter with grant locking, used wherever several
// agents share one resource (the DRAM port, the ASCON core, the metadata
// cache port).
//
// A requester raises req[i] and keeps it high for as long as it uses the
// resource (a whole transfer or a whole ASCON job). The grant is registered:
// gnt becomes one-hot one cycle after the winning request and stays on that
// requester until it drops req; the search for the next winner starts after
// the last one, so no requester waits more than N-1 turns.
// The handshake assertion below is disabled during reset with `disable iff`,
// a synchronous use of rst_n next to the asynchronous reset of the flops;
// lint reports rst_n as used both ways, which is intended here.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic [$clog2(N)-1:0] gnt_idx
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last_q;
  logic          busy_q;
  logic [IW-1:0] pick;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = last_q;
    for (int k = 1; k <= N; k++) begin
      automatic int unsigned c = (int'(last_q) + k) % N;
      if (!any && req[c]) begin any = 1'b1; pick = IW'(c); end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= IW'(N - 1);
      busy_q <= 1'b0;
    end else if (busy_q) begin
      if (!req[last_q]) busy_q <= 1'b0;
    end else if (any) begin
      last_q <= pick;
      busy_q <= 1'b1;
    end
  end

  assign gnt_idx = last_q;
  always_comb begin
    gnt = '0;
    if (busy_q) gnt[last_q] = 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule

// tb_dram_model: behavioural DRAM for the testbenches. Whole 512-bit blocks,
// req held until a one-cycle ack after LATENCY cycles. Unwritten blocks read
// as the boot image of the protected memory: zero counters, zero data and
// data hashes, and tree nodes of the all-zero counter image (given by the
// caller through zero_lvl). Counts reads and writes; the tasks poke/peek let
// a test play the attacker on the memory bus.
module tb_dram_model #(
  parameter int LATENCY = 30
) (
  input  logic         clk,
  input  logic         req,
  input  logic         we,
  input  logic [31:0]  addr,
  input  logic [511:0] wdata,
  output logic         ack,
  output logic [511:0] rdata
);
  logic [511:0] mem [logic [31:0]];
  logic [511:0] zero_lvl [1:5];
  int reads = 0, writes = 0;

  function automatic logic [511:0] dflt(logic [31:0] a);
    if (a >= 32'h8924_9000 && a < 32'h8924_9200) return zero_lvl[5];
    if (a >= 32'h8924_8000) return (a < 32'h8924_9000) ? zero_lvl[4] : '0;
    if (a >= 32'h8924_0000) return zero_lvl[3];
    if (a >= 32'h8920_0000) return zero_lvl[2];
    if (a >= 32'h8900_0000 && a < 32'h8920_0000) return zero_lvl[1];
    return '0;
  endfunction

  function automatic logic [511:0] peek(logic [31:0] a);
    return mem.exists(a) ? mem[a] : dflt(a);
  endfunction
  function automatic void poke(logic [31:0] a, logic [511:0] d);
    mem[a] = d;
  endfunction

  initial begin
    ack = 0; rdata = '0;
    forever begin
      @(posedge clk);
      if (req && !ack) begin
        repeat (LATENCY - 1) @(posedge clk);
        #1;
        if (we) begin mem[addr] = wdata; writes++; end
        else begin rdata = peek(addr); reads++; end
        ack = 1;
        @(posedge clk); #1 ack = 0;
      end
    end
  end
endmodule

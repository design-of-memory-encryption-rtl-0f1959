// trng: true random number generator built from four modified tetrahedral
// oscillators. Each oscillator output is captured by its own flip-flop on the
// sampling clock, the four samples are XORed and the result registered as
// the random bit (the structure of the design's schematic: sampling before
// the XOR catches each oscillator exactly at the sampling instant).
//
// rbit is new on every clock edge after reset (rbit_valid). The bits are also
// shifted into a 32-bit word for the system bus: rword_valid rises when 32
// fresh bits have been collected and falls when the word is read
// (rword_rd). The word collector and the enable are this design's additions;
// the oscillators are behavioural models (tetra_osc), so this block only
// simulates - in silicon they are custom cells.
module trng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic        rbit,
  output logic        rbit_valid,
  output logic [31:0] rword,
  output logic        rword_valid,
  input  logic        rword_rd
);
  logic [3:0] osc, osc_sel, samp_q;
  logic       vld_q;
  logic [5:0] cnt_q;

  for (genvar i = 0; i < 4; i++) begin : g_osc
    tetra_osc #(.SEED(i + 1), .MIN_DLY(2 + i)) u_osc (.en(en), .out(osc[i]), .sel(osc_sel[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samp_q <= '0; rbit <= 1'b0; vld_q <= 1'b0; rbit_valid <= 1'b0;
      rword <= '0; rword_valid <= 1'b0; cnt_q <= '0;
    end else begin
      samp_q     <= osc;
      rbit       <= ^samp_q;
      vld_q      <= en;
      rbit_valid <= vld_q & en;
      if (rbit_valid) begin
        rword <= {rword[30:0], rbit};
        if (cnt_q != 6'd32) cnt_q <= cnt_q + 6'd1;
      end
      if (rword_rd) begin
        rword_valid <= 1'b0;
        cnt_q       <= '0;
      end else if (cnt_q == 6'd32) begin
        rword_valid <= 1'b1;
      end
    end
  end
endmodule

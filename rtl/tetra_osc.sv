// tetra_osc: model of one modified tetrahedral ring oscillator, the entropy
// source of the TRNG, built from inverter stages with propagation delays.
//
// The real part is a hand-placed network of inverters whose nested loops
// fight over a shared node, which makes the oscillation irregular; three
// switchable inverters, chosen through a multiplexer, turn the stable loops
// unstable and back. This model keeps that structure at gate level:
//   - three inverter loops of 3, 5 and 7 stages. Each loop starts with a
//     NAND with `en`, so all loops hold while en is low.
//   - The shared node is modelled as the XOR of the three loop outputs
//     (`out`); the loops run at unrelated periods, so the phase at `out` wanders.
//   - A multiplexer (`sel`) switches two extra inverters into the 3-stage
//     loop, the fastest one. A loop must keep an odd number of inversions, so the pair is
//     switched together; this is this model's choice. Switching them in
//     lengthens the period.
//   - `sel` is toggled by the oscillator itself every 128 output edges, as in
//     the real circuit where the select signal is made inside the oscillators.
// The stage delays (MIN_DLY, SEED sets the per-instance spread) exist only in
// simulation. Synthesis ignores them and sees the loops as intended
// combinational loops: in silicon this is a custom, hand-placed cell and
// its randomness comes from analog jitter, which logic simulation cannot show.
// The sampling clock should be several times slower than a loop period.
module tetra_osc #(
  parameter int unsigned SEED    = 1,
  parameter int unsigned MIN_DLY = 2
) (
  input  logic en,
  output logic out,
  output logic sel
);
  localparam int unsigned DA = MIN_DLY;
  localparam int unsigned DB = MIN_DLY + 1 + SEED % 3;
  localparam int unsigned DC = MIN_DLY + 2 + SEED % 5;

  logic [2:0] ra;
  logic [4:0] rb;
  logic [6:0] rc;
  logic [1:0] rs;      // switchable inverters
  logic       fb;      // feedback of the 3-stage loop after the multiplexer
  logic [7:0] cnt_q;

  assign #(DA) ra[0] = ~(en & fb);
  assign #(DB) rb[0] = ~(en & rb[4]);
  assign #(DC) rc[0] = ~(en & rc[6]);
  for (genvar i = 1; i < 3; i++) begin : g_a
    assign #(DA) ra[i] = ~ra[i-1];
  end
  for (genvar i = 1; i < 5; i++) begin : g_b
    assign #(DB) rb[i] = ~rb[i-1];
  end
  for (genvar i = 1; i < 7; i++) begin : g_c
    assign #(DC) rc[i] = ~rc[i-1];
  end
  assign #(DA) rs[0] = ~ra[2];
  assign #(DA) rs[1] = ~rs[0];
  assign fb  = sel ? rs[1] : ra[2];
  assign out = ra[2] ^ rb[4] ^ rc[6];

  always_ff @(posedge out or negedge en) begin
    if (!en) cnt_q <= '0;
    else     cnt_q <= cnt_q + 8'd1;
  end
  assign sel = cnt_q[7];
endmodule

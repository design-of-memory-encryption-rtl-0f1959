// secure_storage: 128 bytes of on-chip storage for sensitive user data, kept
// encrypted and authenticated with ASCON-128a under the storage key.
//
// The storage is eight 128-bit slots. Each slot holds the ciphertext, its
// 128-bit tag and a write counter that makes every nonce unique
// (nonce = {64'h0, 29'h0, slot, counter}). The processor works through a
// small register window on the system bus (32-bit words, byte offsets):
//   0x00..0x0C  DATA0..3   plaintext staging buffer (DATA0 = bits 127:96)
//   0x10        CMD        write: bits 2:0 slot, bit 8: 1 = load, 0 = store
//   0x14        STATUS     bit 0 busy, bit 1 last load failed authentication,
//                          bit 2 slot holds data, bits 6:4 last slot
// Store: DATA is encrypted (one block, then the padding block) and the
// ciphertext and tag go into the slot. Load: the slot's ciphertext is
// decrypted with the stored tag as reference; on success DATA gets the
// plaintext, otherwise DATA is cleared, STATUS.bit1 is set and `exc` pulses
// so the processor takes an exception. bus_ack answers every access one
// cycle after bus_req. The ASCON core is shared (x_* port with req/gnt).
// Encrypting the slots, the tag check on read and the key from the key
// manager follow the design; the slot size, nonce and register map are this
// design's choices.
module secure_storage
  import ascon_pkg::*;
#(
  parameter int unsigned SLOTS = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  input  logic         bus_req,
  input  logic         bus_we,
  input  logic [4:0]   bus_addr,
  input  logic [31:0]  bus_wdata,
  output logic [31:0]  bus_rdata,
  output logic         bus_ack,
  output logic         exc,
  // ASCON core (shared)
  output logic         x_req,
  input  logic         x_gnt,
  output logic         x_start,
  output ascon_op_e    x_op,
  output logic [127:0] x_key,
  output logic [127:0] x_nonce,
  output logic         x_in_valid,
  output logic [127:0] x_in_data,
  output logic         x_in_final,
  input  logic         x_in_ready,
  input  logic         x_out_valid,
  input  logic [127:0] x_out_data,
  output logic [127:0] x_tag_in,
  input  logic         x_done,
  input  logic [127:0] x_tag_out,
  input  logic         x_tag_ok
);
  localparam int unsigned SW = $clog2(SLOTS);

  logic [127:0]  ct_q   [SLOTS];
  logic [127:0]  tag_q  [SLOTS];
  logic [31:0]   wcnt_q [SLOTS];
  logic [SLOTS-1:0] valid_q;
  logic [127:0]  data_q, res_q;
  logic [SW-1:0] slot_q;
  logic          load_q, fail_q, sent_q, got_q;

  typedef enum logic [1:0] {Q_IDLE, Q_GNT, Q_FEED, Q_WAIT} qst_e;
  qst_e qst_q;

  wire cmd_wr = bus_req && bus_we && (bus_addr[4:2] == 3'd4) && (qst_q == Q_IDLE);

  assign x_req      = (qst_q != Q_IDLE);
  assign x_op       = load_q ? ASCON_DEC : ASCON_ENC;
  assign x_key      = key;
  assign x_nonce    = {64'd0, 29'd0, 3'(slot_q), load_q ? wcnt_q[slot_q] : wcnt_q[slot_q] + 32'd1};
  assign x_in_valid = (qst_q == Q_FEED);
  assign x_in_final = sent_q;
  assign x_in_data  = sent_q ? {8'h80, 120'd0} : (load_q ? ct_q[slot_q] : data_q);
  assign x_tag_in   = tag_q[slot_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qst_q <= Q_IDLE; data_q <= '0; res_q <= '0; slot_q <= '0; load_q <= 1'b0; fail_q <= 1'b0;
      sent_q <= 1'b0; got_q <= 1'b0; valid_q <= '0; bus_ack <= 1'b0; bus_rdata <= '0; exc <= 1'b0; x_start <= 1'b0;
      for (int i = 0; i < SLOTS; i++) begin ct_q[i] <= '0; tag_q[i] <= '0; wcnt_q[i] <= '0; end
    end else begin
      bus_ack <= bus_req && !bus_ack;
      exc     <= 1'b0;
      x_start <= 1'b0;
      // register window
      if (bus_req && !bus_ack) begin
        if (bus_we && bus_addr[4] == 1'b0 && qst_q == Q_IDLE)
          data_q[127 - 32*bus_addr[3:2] -: 32] <= bus_wdata;
        unique case (bus_addr[4:2])
          3'd0, 3'd1, 3'd2, 3'd3: bus_rdata <= data_q[127 - 32*bus_addr[3:2] -: 32];
          3'd5:    bus_rdata <= {25'd0, 3'(slot_q), 1'b0, valid_q[slot_q], fail_q, qst_q != Q_IDLE};
          default: bus_rdata <= '0;
        endcase
      end
      unique case (qst_q)
        Q_IDLE: if (cmd_wr && !bus_ack) begin
          slot_q <= bus_wdata[SW-1:0];
          load_q <= bus_wdata[8];
          sent_q <= 1'b0;
          qst_q  <= Q_GNT;
        end
        Q_GNT: if (x_gnt) begin x_start <= 1'b1; got_q <= 1'b0; qst_q <= Q_FEED; end
        Q_FEED: if (x_in_ready) begin
          if (sent_q) qst_q <= Q_WAIT;
          sent_q <= 1'b1;
        end
        Q_WAIT: if (x_done) begin
          if (load_q) begin
            fail_q <= !x_tag_ok || !valid_q[slot_q];
            exc    <= !x_tag_ok || !valid_q[slot_q];
            data_q <= (x_tag_ok && valid_q[slot_q]) ? res_q : '0;
          end else begin
            ct_q[slot_q]    <= res_q;
            tag_q[slot_q]   <= x_tag_out;
            wcnt_q[slot_q]  <= wcnt_q[slot_q] + 32'd1;
            valid_q[slot_q] <= 1'b1;
            fail_q          <= 1'b0;
          end
          qst_q <= Q_IDLE;
        end
        default: qst_q <= Q_IDLE;
      endcase
      if (x_out_valid && !got_q) begin   // first output block; the padding block's is unused
        res_q <= x_out_data;
        got_q <= 1'b1;
      end
    end
  end
endmodule

// ascon_core: ASCON-128a authenticated encryption/decryption and ASCON-Hash in
// one iterative datapath, shared by the memory encryption, the integrity check
// and the secure on-chip storage.
//
// One permutation round is computed per clock on a 320-bit state register, so
// p^12 takes 12 cycles and p^8 takes 8. A job starts with `start` and `op`:
//   ASCON_ENC / ASCON_DEC: state = IV || K || N, p^12, K XORed into the last
//     128 bits, no associated data (only the domain-separation bit). Each
//     128-bit input block is XORed into the rate (ENC) or replaces it (DEC)
//     and the output block is presented on out_data with out_valid for one
//     cycle; p^8 follows every block except the final one. The final block
//     carries the padding (callers of this design always send whole blocks
//     and then an explicit padding block 0x80..0, which is XORed in both
//     directions). Finalisation: K XORed into words 2..3, p^12, tag = words
//     3..4 XOR K; tag_ok compares it with tag_in.
//   ASCON_HASH: state = p^12(IV_H || 0); each 64-bit block (in_data[63:0]) is
//     XORed into x0 and followed by p^12; after the final (padded) block p^12
//     runs and x0 is the first 64 bits of the digest, given on hash_out. The
//     design uses 64-bit hashes, so only that first squeezed block is taken.
// `done` pulses for one cycle with tag_out, tag_ok and hash_out valid.
// The choice of ASCON-128a and of 64-bit hashes follows the design; the
// block-wide handshake (rather than a 32-bit instruction bus) and one round
// per cycle are this implementation's choices.
module ascon_core
  import ascon_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  ascon_op_e    op,
  input  logic [127:0] key,
  input  logic [127:0] nonce,
  output logic         busy,
  input  logic         in_valid,
  input  logic [127:0] in_data,
  input  logic         in_final,
  output logic         in_ready,
  output logic         out_valid,
  output logic [127:0] out_data,
  input  logic [127:0] tag_in,
  output logic         done,
  output logic [127:0] tag_out,
  output logic         tag_ok,
  output logic [63:0]  hash_out
);

  typedef enum logic [1:0] {S_IDLE, S_PERM, S_ABSORB} fsm_e;
  typedef enum logic [1:0] {PH_INIT, PH_DATA, PH_FINAL} phase_e;

  fsm_e         fsm_q;
  phase_e       phase_q;
  ascon_op_e    op_q;
  ascon_state_t st_q;
  logic [3:0]   rnd_q;        // round index within a 12-round schedule
  logic [127:0] key_q;

  wire [127:0] rate = {st_q[0], st_q[1]};
  wire         take = (fsm_q == S_ABSORB) && in_valid;

  assign busy     = (fsm_q != S_IDLE);
  assign in_ready = (fsm_q == S_ABSORB);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q     <= S_IDLE;
      phase_q   <= PH_INIT;
      op_q      <= ASCON_ENC;
      st_q      <= '0;
      rnd_q     <= '0;
      key_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      done      <= 1'b0;
      tag_out   <= '0;
      tag_ok    <= 1'b0;
      hash_out  <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (fsm_q)
        S_IDLE: if (start) begin
          op_q    <= op;
          key_q   <= key;
          phase_q <= PH_INIT;
          rnd_q   <= 4'(12 - ROUNDS_A);
          fsm_q   <= S_PERM;
          if (op == ASCON_HASH) st_q <= {64'd0, 64'd0, 64'd0, 64'd0, IV_HASH};
          else st_q <= {nonce[63:0], nonce[127:64], key[63:0], key[127:64], IV_AEAD128A};
        end
        S_PERM: begin
          if (rnd_q != 4'd11) begin
            st_q  <= ascon_round(st_q, round_const(rnd_q));
            rnd_q <= rnd_q + 4'd1;
          end else begin
            automatic ascon_state_t s = ascon_round(st_q, round_const(rnd_q));
            unique case (phase_q)
              PH_INIT: begin
                if (op_q != ASCON_HASH) begin
                  s[3] = s[3] ^ key_q[127:64];
                  s[4] = s[4] ^ key_q[63:0] ^ 64'd1;   // key, then domain separation (no AD)
                end
                fsm_q <= S_ABSORB;
              end
              PH_DATA: fsm_q <= S_ABSORB;
              default: begin   // PH_FINAL
                tag_out  <= {s[3] ^ key_q[127:64], s[4] ^ key_q[63:0]};
                tag_ok   <= ({s[3] ^ key_q[127:64], s[4] ^ key_q[63:0]} == tag_in);
                hash_out <= s[0];
                done     <= 1'b1;
                fsm_q    <= S_IDLE;
              end
            endcase
            st_q <= s;
          end
        end
        S_ABSORB: if (take) begin
          automatic ascon_state_t s = st_q;
          if (op_q == ASCON_HASH) begin
            s[0] = s[0] ^ in_data[63:0];
          end else if (op_q == ASCON_DEC && !in_final) begin
            {s[0], s[1]} = in_data;
            out_data  <= in_data ^ rate;
            out_valid <= 1'b1;
          end else begin
            {s[0], s[1]} = rate ^ in_data;
            out_data  <= rate ^ in_data;
            out_valid <= 1'b1;
          end
          if (in_final) begin
            if (op_q != ASCON_HASH) begin
              s[2] = s[2] ^ key_q[127:64];
              s[3] = s[3] ^ key_q[63:0];
            end
            phase_q <= PH_FINAL;
            rnd_q   <= 4'(12 - ROUNDS_A);
          end else begin
            phase_q <= PH_DATA;
            rnd_q   <= (op_q == ASCON_HASH) ? 4'(12 - ROUNDS_B_HASH) : 4'(12 - ROUNDS_B_AEAD);
          end
          st_q  <= s;
          fsm_q <= S_PERM;
        end
        default: fsm_q <= S_IDLE;
      endcase
    end
  end

endmodule

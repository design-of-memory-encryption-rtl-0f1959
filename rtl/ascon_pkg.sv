// ascon_pkg: types, constants and the round function of the ASCON permutation.
//
// The 320-bit ASCON state is five 64-bit words x0..x4. One round adds a round
// constant to x2, applies the 5-bit S-box bitsliced across the 64 columns and
// then the linear diffusion layer (each word XORed with two rotations of
// itself). p^a uses the 12 constants 0xf0..0x4b, p^b the last b of them.
// ASCON-128a (a=12, b=8, 128-bit rate) is the cipher and ASCON-Hash the hash,
// as named by the design; the algorithm itself is the published ASCON.
package ascon_pkg;

  typedef logic [4:0][63:0] ascon_state_t;   // [0] = x0 ... [4] = x4

  typedef enum logic [1:0] {
    ASCON_ENC  = 2'd0,   // ASCON-128a authenticated encryption
    ASCON_DEC  = 2'd1,   // ASCON-128a authenticated decryption
    ASCON_HASH = 2'd2    // ASCON-Hash, 64-bit rate
  } ascon_op_e;

  localparam logic [63:0] IV_AEAD128A = 64'h80800c0800000000;
  localparam logic [63:0] IV_HASH     = 64'h00400c0000000100;

  localparam int unsigned ROUNDS_A      = 12;
  localparam int unsigned ROUNDS_B_AEAD = 8;
  localparam int unsigned ROUNDS_B_HASH = 12;

  function automatic logic [63:0] ror64(input logic [63:0] x, input int unsigned n);
    return (x >> n) | (x << (64 - n));
  endfunction

  // Round constant of round index i (0..11) of a 12-round permutation.
  function automatic logic [7:0] round_const(input logic [3:0] i);
    return {4'hf - i, i};
  endfunction

  function automatic ascon_state_t ascon_round(input ascon_state_t s, input logic [7:0] rc);
    logic [63:0] x0, x1, x2, x3, x4, t0, t1, t2, t3, t4;
    ascon_state_t r;
    x0 = s[0]; x1 = s[1]; x2 = s[2] ^ {56'd0, rc}; x3 = s[3]; x4 = s[4];
    // substitution layer
    x0 = x0 ^ x4; x4 = x4 ^ x3; x2 = x2 ^ x1;
    t0 = ~x0 & x1; t1 = ~x1 & x2; t2 = ~x2 & x3; t3 = ~x3 & x4; t4 = ~x4 & x0;
    x0 = x0 ^ t1; x1 = x1 ^ t2; x2 = x2 ^ t3; x3 = x3 ^ t4; x4 = x4 ^ t0;
    x1 = x1 ^ x0; x0 = x0 ^ x4; x3 = x3 ^ x2; x2 = ~x2;
    // linear diffusion layer
    r[0] = x0 ^ ror64(x0, 19) ^ ror64(x0, 28);
    r[1] = x1 ^ ror64(x1, 61) ^ ror64(x1, 39);
    r[2] = x2 ^ ror64(x2, 1)  ^ ror64(x2, 6);
    r[3] = x3 ^ ror64(x3, 10) ^ ror64(x3, 17);
    r[4] = x4 ^ ror64(x4, 7)  ^ ror64(x4, 41);
    return r;
  endfunction

endpackage

// tb_ref_pkg: reference model for the testbenches. ASCON is modelled with a
// table S-box applied column by column (independent of the design's
// bitsliced rounds); on top of it the seed/pad, data-hash and tree-node
// computations of the memory protection scheme and the hashes of the
// all-zero counter image (default contents of each tree level).
package tb_ref_pkg;
  typedef logic [511:0] blk_t;

  localparam logic [4:0] SBOX [32] = '{5'h04,5'h0b,5'h1f,5'h14,5'h1a,5'h15,5'h09,5'h02,
                                       5'h1b,5'h05,5'h08,5'h12,5'h1d,5'h03,5'h06,5'h1c,
                                       5'h1e,5'h13,5'h07,5'h0e,5'h00,5'h0d,5'h11,5'h18,
                                       5'h10,5'h0c,5'h01,5'h19,5'h16,5'h0a,5'h0f,5'h17};
  localparam logic [408:0] SEED_IV = 409'({13{32'h9e3779b9}});

  function automatic logic [63:0] rr(logic [63:0] x, int n); return 64'({x, x} >> n); endfunction

  function automatic void perm(ref logic [63:0] s [5], input int nr);
    for (int r = 12 - nr; r < 12; r++) begin
      logic [63:0] t [5];
      s[2] ^= 64'((15 - r) * 16 + r);
      for (int b = 0; b < 64; b++) begin
        logic [4:0] v;
        v = SBOX[{s[0][b], s[1][b], s[2][b], s[3][b], s[4][b]}];
        {t[0][b], t[1][b], t[2][b], t[3][b], t[4][b]} = v;
      end
      s[0] = t[0] ^ rr(t[0],19) ^ rr(t[0],28);
      s[1] = t[1] ^ rr(t[1],61) ^ rr(t[1],39);
      s[2] = t[2] ^ rr(t[2],1)  ^ rr(t[2],6);
      s[3] = t[3] ^ rr(t[3],10) ^ rr(t[3],17);
      s[4] = t[4] ^ rr(t[4],7)  ^ rr(t[4],41);
    end
  endfunction

  // ASCON-128a over nb (1..4) full 128-bit blocks p[0..nb-1], no AD;
  // returns the ciphertext blocks and the tag
  function automatic void aead(input logic [127:0] k, input logic [127:0] n, input logic [127:0] p [4],
                               input int nb, output logic [127:0] c [4], output logic [127:0] tag);
    logic [63:0] s [5];
    s[0] = 64'h80800c0800000000; s[1] = k[127:64]; s[2] = k[63:0]; s[3] = n[127:64]; s[4] = n[63:0];
    perm(s, 12); s[3] ^= k[127:64]; s[4] ^= k[63:0] ^ 64'd1;
    for (int i = 0; i < 4; i++) c[i] = '0;
    for (int i = 0; i < nb; i++) begin
      s[0] ^= p[i][127:64]; s[1] ^= p[i][63:0]; c[i] = {s[0], s[1]}; perm(s, 8);
    end
    s[0] ^= 64'h8000000000000000; s[2] ^= k[127:64]; s[3] ^= k[63:0]; perm(s, 12);
    tag = {s[3] ^ k[127:64], s[4] ^ k[63:0]};
  endfunction

  // ASCON-Hash (first 64 bits) of nw 64-bit words
  function automatic logic [63:0] hash(input logic [63:0] w [10], input int nw);
    logic [63:0] s [5];
    s[0] = 64'h00400c0000000100; s[1] = 0; s[2] = 0; s[3] = 0; s[4] = 0; perm(s, 12);
    for (int i = 0; i < nw; i++) begin s[0] ^= w[i]; perm(s, 12); end
    s[0] ^= 64'h8000000000000000; perm(s, 12);
    return s[0];
  endfunction

  function automatic blk_t pad(logic [127:0] key, logic [31:0] a, logic [63:0] major, logic [6:0] minor);
    blk_t seed;
    logic [127:0] p [4];
    logic [127:0] c [4];
    logic [127:0] t;
    seed = {SEED_IV, a, major, minor};
    for (int i = 0; i < 4; i++) p[i] = seed[511 - 128*i -: 128];
    aead(key, {a, major, 25'd0, minor}, p, 4, c, t);
    return {c[0], c[1], c[2], c[3]};
  endfunction

  function automatic logic [63:0] data_hash(logic [31:0] a, logic [63:0] major, logic [6:0] minor, blk_t ct);
    logic [63:0] w [10];
    w[0] = {a, 25'd0, minor}; w[1] = major;
    for (int i = 0; i < 8; i++) w[2 + i] = ct[511 - 64*i -: 64];
    return hash(w, 10);
  endfunction

  function automatic logic [63:0] node_hash(blk_t b);
    logic [63:0] w [10];
    for (int i = 0; i < 10; i++) w[i] = '0;
    for (int i = 0; i < 8; i++) w[i] = b[511 - 64*i -: 64];
    return hash(w, 8);
  endfunction

  // default content of tree level l (1..6) for an all-zero counter image
  function automatic blk_t zero_node(int l);
    blk_t b;
    b = '0;
    for (int i = 0; i < l; i++) b = {8{node_hash(b)}};
    return b;
  endfunction

  // counter-block fields
  function automatic logic [6:0] minor_of(blk_t c, int i); return c[7*i +: 7]; endfunction
endpackage

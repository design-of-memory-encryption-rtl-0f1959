// tb_ascon_core: self-checking test of the ASCON-128a / ASCON-Hash core.
// Reference values come from (a) published ASCON known answers (empty-message
// hash, empty-message ASCON-128a tag with key = nonce = 00..0f) and (b) a
// model in this file that applies the S-box as a 32-entry table column by
// column, independently of the bitsliced formulation in the design.
// Also checks decryption round-trip, tag rejection and the cycle count of a
// one-block hash (1 + 12 + 1 + 12 clock edges).
module tb_ascon_core;
  import ascon_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start; ascon_op_e op; logic [127:0] key, nonce, in_data, tag_in;
  logic in_valid, in_final, busy, in_ready, out_valid, done, tag_ok;
  logic [127:0] out_data, tag_out; logic [63:0] hash_out;
  int checks = 0, failures = 0;

  ascon_core dut (.*);

  // ---------------- reference model ----------------
  typedef logic [63:0] w5_t [5];
  localparam logic [4:0] SBOX [32] = '{5'h04,5'h0b,5'h1f,5'h14,5'h1a,5'h15,5'h09,5'h02,
                                       5'h1b,5'h05,5'h08,5'h12,5'h1d,5'h03,5'h06,5'h1c,
                                       5'h1e,5'h13,5'h07,5'h0e,5'h00,5'h0d,5'h11,5'h18,
                                       5'h10,5'h0c,5'h01,5'h19,5'h16,5'h0a,5'h0f,5'h17};
  function automatic logic [63:0] rr(logic [63:0] x, int n); return {x, x} >> n; endfunction
  function automatic void perm(ref logic [63:0] s [5], input int nr);
    for (int r = 12 - nr; r < 12; r++) begin
      logic [63:0] t [5];
      s[2] ^= 64'((15 - r) * 16 + r);
      for (int b = 0; b < 64; b++) begin
        logic [4:0] v;
        v = {s[0][b], s[1][b], s[2][b], s[3][b], s[4][b]};
        v = SBOX[v];
        {t[0][b], t[1][b], t[2][b], t[3][b], t[4][b]} = v;
      end
      s[0] = t[0] ^ rr(t[0],19) ^ rr(t[0],28);
      s[1] = t[1] ^ rr(t[1],61) ^ rr(t[1],39);
      s[2] = t[2] ^ rr(t[2],1)  ^ rr(t[2],6);
      s[3] = t[3] ^ rr(t[3],10) ^ rr(t[3],17);
      s[4] = t[4] ^ rr(t[4],7)  ^ rr(t[4],41);
    end
  endfunction

  // ---------------- driver ----------------
  task automatic kick(ascon_op_e o, logic [127:0] k, logic [127:0] n);
    @(negedge clk); start = 1; op = o; key = k; nonce = n;
    @(negedge clk); start = 0;
  endtask
  task automatic send(logic [127:0] d, logic fin, output logic [127:0] o);
    @(negedge clk); in_valid = 1; in_data = d; in_final = fin;
    while (!in_ready) @(negedge clk);
    @(posedge clk); #1 in_valid = 0; o = out_data;
  endtask
  task automatic wait_done();
    while (!done) @(posedge clk);
    #1;
  endtask
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] k, n, o, pt [4], ct [4], t;
    logic [63:0] s [5];
    int cyc;
    start = 0; in_valid = 0; in_final = 0; in_data = 0; tag_in = 0; op = ASCON_ENC; key = 0; nonce = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // KAT: ASCON-Hash("") -> 7346bc14f036e87a...
    kick(ASCON_HASH, 0, 0);
    send({64'd0, 64'h8000000000000000}, 1, o);
    wait_done();
    chk(hash_out == 64'h7346bc14f036e87a, $sformatf("hash empty %h", hash_out));

    // latency of a one-block hash
    @(negedge clk); start = 1; op = ASCON_HASH; in_valid = 1; in_final = 1; in_data = {64'd0, 64'h8000000000000000};
    cyc = 0;
    @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1 cyc++; if (!in_ready) ; end
    in_valid = 0;
    chk(cyc == 25, $sformatf("hash latency %0d edges after start", cyc));

    // KAT: ASCON-128a, K = N = 000102..0f, empty AD and PT
    k = 128'h000102030405060708090a0b0c0d0e0f;
    kick(ASCON_ENC, k, k);
    send({8'h80, 120'd0}, 1, o);
    wait_done();
    chk(tag_out == 128'h7a834e6f09210957067b10fd831f0078, $sformatf("aead kat tag %h", tag_out));

    // random 4-block encryption against the model, then decryption
    for (int it = 0; it < 6; it++) begin
      k = {$urandom, $urandom, $urandom, $urandom}; n = {$urandom, $urandom, $urandom, $urandom};
      foreach (pt[i]) pt[i] = {$urandom, $urandom, $urandom, $urandom};
      s[0] = IV_AEAD128A; s[1] = k[127:64]; s[2] = k[63:0]; s[3] = n[127:64]; s[4] = n[63:0];
      perm(s, 12); s[3] ^= k[127:64]; s[4] ^= k[63:0] ^ 64'd1;
      for (int i = 0; i < 4; i++) begin
        s[0] ^= pt[i][127:64]; s[1] ^= pt[i][63:0]; ct[i] = {s[0], s[1]}; perm(s, 8);
      end
      s[0] ^= 64'h8000000000000000; s[2] ^= k[127:64]; s[3] ^= k[63:0]; perm(s, 12);
      t = {s[3] ^ k[127:64], s[4] ^ k[63:0]};
      kick(ASCON_ENC, k, n);
      for (int i = 0; i < 4; i++) begin send(pt[i], 0, o); chk(o == ct[i], "ct block"); end
      send({8'h80, 120'd0}, 1, o);
      wait_done();
      chk(tag_out == t, "enc tag");
      tag_in = (it % 2) ? t : t ^ 128'h1;
      kick(ASCON_DEC, k, n);
      for (int i = 0; i < 4; i++) begin send(ct[i], 0, o); chk(o == pt[i], "dec block"); end
      send({8'h80, 120'd0}, 1, o);
      wait_done();
      chk(tag_ok == (it % 2 == 1), "tag check");
      // hash of the ciphertext blocks (eight 64-bit words) against the model
      s[0] = IV_HASH; s[1] = 0; s[2] = 0; s[3] = 0; s[4] = 0; perm(s, 12);
      kick(ASCON_HASH, 0, 0);
      for (int i = 0; i < 8; i++) begin
        logic [63:0] w = i[0] ? ct[i/2][63:0] : ct[i/2][127:64];
        s[0] ^= w; perm(s, 12); send({64'd0, w}, 0, o);
      end
      s[0] ^= 64'h8000000000000000; perm(s, 12);
      send({64'd0, 64'h8000000000000000}, 1, o);
      wait_done();
      chk(hash_out == s[0], "hash of 8 words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_secure_storage: the secure storage with a real ASCON core. Stores
// random data in several slots through the register window, checks that the
// slot contents are the ASCON-128a ciphertext and tag computed by the
// reference model (never the plaintext), loads them back, and checks that a
// tampered ciphertext or tag makes the load fail with an exception and
// cleared data.
module tb_secure_storage;
  import ascon_pkg::*;
  import tb_ref_pkg::aead;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [127:0] key = 128'h00112233445566778899aabbccddeeff;
  logic bus_req = 0, bus_we = 0, bus_ack, exc; logic [4:0] bus_addr = 0; logic [31:0] bus_wdata = 0, bus_rdata;
  logic x_req, x_gnt, x_start, x_in_valid, x_in_final, x_in_ready, x_out_valid, x_done, x_tag_ok, busy;
  ascon_op_e x_op; logic [127:0] x_key, x_nonce, x_in_data, x_out_data, x_tag_in, x_tag_out; logic [63:0] hash_out;
  int checks = 0, failures = 0, excs = 0;

  secure_storage dut (.*);
  ascon_core u_core (.clk, .rst_n, .start(x_start), .op(x_op), .key(x_key), .nonce(x_nonce), .busy,
    .in_valid(x_in_valid), .in_data(x_in_data), .in_final(x_in_final), .in_ready(x_in_ready),
    .out_valid(x_out_valid), .out_data(x_out_data), .tag_in(x_tag_in), .done(x_done),
    .tag_out(x_tag_out), .tag_ok(x_tag_ok), .hash_out);
  assign x_gnt = x_req;
  always @(posedge clk) if (rst_n && exc) excs++;

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(logic [4:0] a, logic [31:0] d);
    @(negedge clk); bus_req = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(posedge clk); #1; while (!bus_ack) begin @(posedge clk); #1; end
    bus_req = 0; bus_we = 0;
  endtask
  task automatic rd(logic [4:0] a, output logic [31:0] d);
    @(negedge clk); bus_req = 1; bus_we = 0; bus_addr = a;
    @(posedge clk); #1; while (!bus_ack) begin @(posedge clk); #1; end
    d = bus_rdata; bus_req = 0;
  endtask
  task automatic wait_idle();
    logic [31:0] st;
    do rd(5'h14, st); while (st[0]);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] d [8], got, p [4], c [4], t; logic [31:0] w, st;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 8; s += 3) begin
      d[s] = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 4; i++) wr(5'(4 * i), d[s][127 - 32*i -: 32]);
      wr(5'h10, 32'(s));                // store
      wait_idle();
      p[0] = d[s];
      aead(key, {64'd0, 29'd0, 3'(s), 32'd1}, p, 1, c, t);
      chk(dut.ct_q[s] == c[0] && dut.tag_q[s] == t, $sformatf("slot %0d ciphertext and tag", s));
      chk(dut.ct_q[s] != d[s], "slot not plaintext");
    end
    for (int i = 0; i < 4; i++) wr(5'(4 * i), 32'h0);
    for (int s = 0; s < 8; s += 3) begin
      wr(5'h10, 32'h100 | 32'(s));      // load
      wait_idle();
      for (int i = 0; i < 4; i++) begin rd(5'(4 * i), w); got[127 - 32*i -: 32] = w; end
      rd(5'h14, st);
      chk(got == d[s] && !st[1] && st[2], $sformatf("load slot %0d", s));
    end
    // attacker flips a ciphertext bit inside the chip
    dut.ct_q[3] = dut.ct_q[3] ^ 128'h1;
    wr(5'h10, 32'h103); wait_idle();
    rd(5'h14, st); rd(5'h0, w);
    chk(st[1] && w == 0 && excs == 1, "tampered ciphertext rejected");
    dut.ct_q[3] = dut.ct_q[3] ^ 128'h1;
    dut.tag_q[6] = dut.tag_q[6] ^ (128'h1 << 77);
    wr(5'h10, 32'h106); wait_idle();
    rd(5'h14, st);
    chk(st[1] && excs == 2, "tampered tag rejected");
    wr(5'h10, 32'h103); wait_idle();
    rd(5'h14, st); rd(5'h0, w);
    chk(!st[1] && w == d[3][127:96], "restored slot loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_trng: collects 4096 random bits from the TRNG (oscillator models
// inside) and checks: the bit stream is balanced (45..55 % ones), it changes
// often (runs), consecutive 32-bit words differ, every word matches the last
// 32 bits of the stream seen by an independent shift model, and the word
// handshake (valid after 32 new bits, cleared on read).
module tb_trng;
  logic clk = 0, rst_n = 0, en = 0, rbit, rbit_valid, rword_valid, rword_rd = 0;
  logic [31:0] rword;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;
  trng dut (.*);

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ones = 0, n = 0, changes = 0, words = 0, same = 0;
    logic prev = 0; logic [31:0] shadow = 0, lastw = 0;
    repeat (3) @(posedge clk); rst_n = 1; en = 1;
    while (n < 4096) begin
      @(posedge clk); #1;
      if (rword_valid && !rword_rd) begin
        chk(rword == shadow, "word equals last 32 bits");
        if (rword == lastw) same++;
        lastw = rword; words++;
        rword_rd = 1;
      end else rword_rd = 0;
      if (rbit_valid) begin
        shadow = {shadow[30:0], rbit};
        ones += rbit; if (n > 0 && rbit != prev) changes++;
        prev = rbit; n++;
      end
    end
    chk(ones > 4096 * 45 / 100 && ones < 4096 * 55 / 100, $sformatf("balance %0d/4096", ones));
    chk(changes > 4096 * 40 / 100 && changes < 4096 * 60 / 100, $sformatf("changes %0d", changes));
    chk(words > 60 && same == 0, $sformatf("words %0d repeats %0d", words, same));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

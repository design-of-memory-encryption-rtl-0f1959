// tb_key_manager: feeds a known bit stream (with gaps in rbit_valid) and
// checks that generated keys are exactly the next 128 bits, MSB first, that
// a new memory key pushes the old one to mem_key_prev, that the storage key
// is separate, that an external key loads, and that collection takes 128
// valid bits.
module tb_key_manager;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic gen_req = 0, gen_target = 0, ext_load = 0, ext_target = 0, rbit = 0, rbit_valid = 0;
  logic [127:0] ext_key = 0, mem_key, mem_key_prev, store_key;
  logic mem_key_valid, store_key_valid, busy, done;
  int checks = 0, failures = 0;
  key_manager dut (.*);

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic gen(logic tgt, output logic [127:0] exp, output int bits);
    exp = '0; bits = 0;
    @(negedge clk); gen_req = 1; gen_target = tgt;
    @(negedge clk); gen_req = 0;
    while (!done) begin
      rbit_valid = ($urandom_range(0, 2) != 0); rbit = $urandom_range(0, 1);
      @(posedge clk); #1;
      if (rbit_valid && (busy || done) && bits < 128) begin exp = {exp[126:0], rbit}; bits++; end
      rbit_valid = 0;
    end
  endtask

  initial begin
    logic [127:0] k1, k2, k3; int b;
    repeat (3) @(posedge clk); rst_n = 1;
    chk(!mem_key_valid && !store_key_valid, "no key after reset");
    gen(0, k1, b);
    chk(mem_key == k1 && mem_key_valid && b == 128, "memory key 1");
    gen(0, k2, b);
    chk(mem_key == k2 && mem_key_prev == k1 && k1 != k2, "memory key 2, previous kept");
    gen(1, k3, b);
    chk(store_key == k3 && store_key_valid && mem_key == k2, "storage key");
    @(negedge clk); ext_load = 1; ext_target = 0; ext_key = 128'hfeedface;
    @(negedge clk); ext_load = 0;
    chk(mem_key == 128'hfeedface && mem_key_prev == k2, "external key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

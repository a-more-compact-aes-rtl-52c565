// tb_aes_dec_core: iterative AES-128 decryption core with its tower-basis key
// schedule. Checks the FIPS-197 appendix C.1 example, then random keys and
// blocks against the standard-basis reference, including back-to-back blocks
// (a new start in the cycle done pulses). Every block must take exactly 11
// clocks from start to done, and a start given while busy must be ignored.
module tb_aes_dec_core;
  import aes_tower_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, key_load = 0, start = 0, ks_ready, busy, done;
  block_t key, din, dout, rk;
  rnd_t rk_idx;

  key_schedule #(.XM(X94), .XIM(XI94), .N(N94), .NU(NU94)) u_ks (
    .clk, .rst_n, .key_load, .key, .ready(ks_ready), .rd_idx(rk_idx), .rd_key(rk));
  aes_dec_core dut (.clk, .rst_n, .start, .ct(din), .pt(dout), .busy, .done, .rk_idx, .rk);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(block_t value, block_t expected, bit poke_busy);
    int cyc;
    din   = value;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      if (poke_busy && cyc == 4) begin
        // A start while busy must not disturb the block in flight.
        start = 1; din = ~value;
        @(negedge clk);
        start = 0; din = value;
      end else @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (cyc != 11) begin
      failures++; $display("latency %0d clocks, expected 11", cyc);
    end
    if (dout !== expected) begin
      failures++; $display("in=%h out=%h expected=%h", value, dout, expected);
    end
  endtask

  initial begin
    init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      key = (n == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand_blk();
      @(negedge clk) key_load = 1;
      @(negedge clk) key_load = 0;
      while (!ks_ready) @(negedge clk);
      if (n == 0) run_block(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff, 0);
      for (int b = 0; b < 20; b++) begin
        block_t v = rand_blk();
        din = v;
        run_block(v, decrypt(key, din), b == 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_key_schedule: tower-field key expansion for both bases. For several keys
// (the FIPS-197 example key and random ones) every stored round key must equal
// X^-1 applied to the reference round key, and ready must rise exactly 11
// clocks after the load pulse (load clock plus ten expansion clocks). A second
// load given right after completion must replace the old keys.
module tb_key_schedule;
  import aes_tower_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, key_load = 0;
  block_t key, rk127, rk94;
  logic rdy127, rdy94;
  rnd_t idx;
  rk_t ref_rk;

  key_schedule #(.XM(X127), .XIM(XI127), .N(N127), .NU(NU127)) dut127 (
    .clk, .rst_n, .key_load, .key, .ready(rdy127), .rd_idx(idx), .rd_key(rk127));
  key_schedule #(.XM(X94), .XIM(XI94), .N(N94), .NU(NU94)) dut94 (
    .clk, .rst_n, .key_load, .key, .ready(rdy94), .rd_idx(idx), .rd_key(rk94));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    init();
    idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      key = (n == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand_blk();
      ref_rk = expand(key);
      @(negedge clk) key_load = 1;
      @(negedge clk) key_load = 0;
      cyc = 1;
      while (!rdy127) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 11 || !rdy94) begin
        failures++; $display("ready after %0d clocks (expected 11)", cyc);
      end
      for (int r = 0; r <= 10; r++) begin
        idx = rnd_t'(r);
        #1;
        checks += 2;
        if (rk127 !== mblk(XI127, ref_rk[r])) begin
          failures++; $display("key %0d round %0d basis127 %h", n, r, rk127);
        end
        if (rk94 !== mblk(XI94, ref_rk[r])) begin
          failures++; $display("key %0d round %0d basis94 %h", n, r, rk94);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

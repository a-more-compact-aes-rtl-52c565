// tb_aes128_block: the basic workload of the design, one AES-128 block each
// way through aes_compact_top at its default configuration, using the two
// FIPS-197 known-answer examples (Appendix B and Appendix C.1). For each key:
// load it, encrypt the plaintext, decrypt the ciphertext, compare both results
// with the published values and check that each block takes 11 clocks from
// acceptance to the output pulse.
module tb_aes128_block;
  import aes_tower_pkg::*;

  int checks = 0, failures = 0;
  logic   clk = 0, rst_n = 0;
  logic   key_load = 0, key_load_ready, key_ready;
  block_t key = '0;
  logic   enc_in_valid = 0, enc_in_ready, enc_out_valid;
  logic   dec_in_valid = 0, dec_in_ready, dec_out_valid;
  block_t enc_in = '0, enc_out, dec_in = '0, dec_out;

  aes_compact_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  block_t vk [2] = '{128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h000102030405060708090a0b0c0d0e0f};
  block_t vp [2] = '{128'h3243f6a8885a308d313198a2e0370734, 128'h00112233445566778899aabbccddeeff};
  block_t vc [2] = '{128'h3925841d02dc09fbdc118597196a0b32, 128'h69c4e0d86a7b0430d8cdb78070b4c55a};

  task automatic check(string what, block_t got, block_t exp, int cyc);
    checks += 2;
    if (got !== exp) begin failures++; $display("%s: %h expected %h", what, got, exp); end
    if (cyc != 11) begin failures++; $display("%s: %0d clocks, expected 11", what, cyc); end
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 2; v++) begin
      @(negedge clk) begin key = vk[v]; key_load = 1; end
      @(negedge clk) key_load = 0;
      while (!key_ready) @(negedge clk);
      enc_in = vp[v]; enc_in_valid = 1;
      @(negedge clk) enc_in_valid = 0;
      cyc = 1;
      while (!enc_out_valid) begin @(negedge clk); cyc++; end
      check("encrypt", enc_out, vc[v], cyc);
      dec_in = vc[v]; dec_in_valid = 1;
      @(negedge clk) dec_in_valid = 0;
      cyc = 1;
      while (!dec_out_valid) begin @(negedge clk); cyc++; end
      check("decrypt", dec_out, vp[v], cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

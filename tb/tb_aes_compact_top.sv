// tb_aes_compact_top: end-to-end test of the encryptor/decryptor pair at its
// only (default) configuration. Several cipher keys are loaded in turn; for
// each, random plaintexts are streamed into the encryptor and random reference
// ciphertexts into the decryptor at the same time, each stream holding its
// valid high until accepted. A scoreboard compares every output with the
// standard-basis reference model and checks the 11-clock latency.
//
// Mechanisms counted (each must occur at least once):
//   key expansions, encryptions, decryptions, encryption and decryption input
//   stalls (valid while not ready), key loads held off while a core is busy,
//   clocks with both cores busy at once, and the FIPS-197 C.1 example.
module tb_aes_compact_top;
  import aes_tower_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic   clk = 0, rst_n = 0;
  logic   key_load = 0, key_load_ready, key_ready;
  block_t key = '0;
  logic   enc_in_valid = 0, enc_in_ready, enc_out_valid;
  logic   dec_in_valid = 0, dec_in_ready, dec_out_valid;
  block_t enc_in = '0, enc_out, dec_in = '0, dec_out;

  aes_compact_top dut (.*);

  always #5 clk = ~clk;

  longint cycle = 0;
  always @(posedge clk) cycle++;

  // Scoreboards: expected output and the clock it must appear in.
  block_t enc_exp[$], dec_exp[$];
  longint enc_due[$], dec_due[$];

  int n_keys = 0, n_enc = 0, n_dec = 0, n_enc_stall = 0, n_dec_stall = 0;
  int n_key_held = 0, n_both_busy = 0, n_fips = 0;
  block_t cur_key;

  always @(posedge clk) if (rst_n) begin
    block_t e;
    longint d;
    if (enc_in_valid && enc_in_ready) begin
      enc_exp.push_back(encrypt(cur_key, enc_in));
      enc_due.push_back(cycle + 11);
    end
    if (dec_in_valid && dec_in_ready) begin
      dec_exp.push_back(decrypt(cur_key, dec_in));
      dec_due.push_back(cycle + 11);
    end
    if (enc_in_valid && !enc_in_ready) n_enc_stall++;
    if (dec_in_valid && !dec_in_ready) n_dec_stall++;
    if (key_load && !key_load_ready) n_key_held++;
    if (dut.enc_busy && dut.dec_busy) n_both_busy++;
    if (enc_out_valid) begin
      checks += 2;
      if (enc_exp.size() == 0) begin
        failures++; $display("unexpected encryption output");
      end else begin
        e = enc_exp.pop_front();
        d = enc_due.pop_front();
        if (enc_out !== e) begin failures++; $display("enc out %h expected %h", enc_out, e); end
        if (cycle != d) begin failures++; $display("enc output in clock %0d, expected %0d", cycle, d); end
        if (e == 128'h69c4e0d86a7b0430d8cdb78070b4c55a && enc_out == e) n_fips++;
        n_enc++;
      end
    end
    if (dec_out_valid) begin
      checks += 2;
      if (dec_exp.size() == 0) begin
        failures++; $display("unexpected decryption output");
      end else begin
        e = dec_exp.pop_front();
        d = dec_due.pop_front();
        if (dec_out !== e) begin failures++; $display("dec out %h expected %h", dec_out, e); end
        if (cycle != d) begin failures++; $display("dec output in clock %0d, expected %0d", cycle, d); end
        n_dec++;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(block_t k);
    @(negedge clk);
    key = k; key_load = 1;
    do @(posedge clk); while (!key_load_ready);
    cur_key = k;
    @(negedge clk) key_load = 0;
    while (!key_ready) @(negedge clk);
    n_keys++;
  endtask

  task automatic send_enc(block_t v);
    enc_in = v; enc_in_valid = 1;
    do @(posedge clk); while (!enc_in_ready);
    @(negedge clk) enc_in_valid = 0;
  endtask

  task automatic send_dec(block_t v);
    dec_in = v; dec_in_valid = 1;
    do @(posedge clk); while (!dec_in_ready);
    @(negedge clk) dec_in_valid = 0;
  endtask

  task automatic report(string name, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", name); end
    else $display("%s: %0d", name, n);
  endtask

  initial begin
    init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      automatic block_t kv = (k == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand_blk();
      load_key(kv);
      fork
        begin
          if (k == 0) send_enc(128'h00112233445566778899aabbccddeeff);
          for (int b = 0; b < 12; b++) begin
            send_enc(rand_blk());
            repeat ($urandom_range(0, 3)) @(negedge clk);
          end
        end
        begin
          repeat (k) @(negedge clk);
          for (int b = 0; b < 12; b++) begin
            send_dec(encrypt(kv, rand_blk()));
            repeat ($urandom_range(0, 3)) @(negedge clk);
          end
        end
      join
      // The next key is requested while the last blocks are still in flight.
    end
    // Drain.
    repeat (20) @(negedge clk);
    checks++;
    if (enc_exp.size() != 0 || dec_exp.size() != 0) begin
      failures++; $display("blocks lost: enc %0d dec %0d", enc_exp.size(), dec_exp.size());
    end
    report("key expansions", n_keys);
    report("encryptions", n_enc);
    report("decryptions", n_dec);
    report("encryption input stalls", n_enc_stall);
    report("decryption input stalls", n_dec_stall);
    report("key loads held off by busy cores", n_key_held);
    report("clocks with both cores busy", n_both_busy);
    report("FIPS-197 C.1 encryption", n_fips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

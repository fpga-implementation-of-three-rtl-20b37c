// tb_ipsec_crypto_top: end-to-end test of the three cores on their own
// clocks (periods in the ratio of 19.4, 99.7 and 38.6 MHz), run at the
// same time. RC4 encrypts a published vector and random data with random
// input gaps; CAST5 streams blocks in all four modes and round-trips them;
// SHA-1 hashes standard vectors and random multi-block messages. Every
// result is compared with the reference models, and each mechanism of the
// design is counted and must occur at least once: RC4 key setup, RC4 input
// stall, CAST5 encryption and decryption in 16- and 12-round mode, CAST5
// back-to-back acceptance and waiting for in_ready, SHA-1 new message and
// chained block.
module tb_ipsec_crypto_top;
  import cast5_pkg::*;
  import cast5_ref_pkg::*;
  import sha1_ref_pkg::*;
  import rc4_ref_pkg::*;

  typedef logic [7:0] bq_t [$];

  logic rc4_clk = 0, cast5_clk = 0, sha1_clk = 0;
  logic rc4_rst_n = 0, cast5_rst_n = 0, sha1_rst_n = 0;
  // RC4
  logic rc4_key_we = 0, rc4_start = 0, rc4_ready, rc4_in_valid = 0, rc4_out_valid;
  logic [3:0] rc4_key_waddr = 0;
  logic [7:0] rc4_key_wdata = 0, rc4_in_data = 0, rc4_out_data;
  logic [4:0] rc4_key_len = 1;
  // CAST5
  logic cast5_sk_we = 0, cast5_sb_we = 0, cast5_in_valid = 0, cast5_in_decrypt = 0;
  logic cast5_in_short = 0, cast5_in_ready, cast5_out_valid;
  logic [3:0]  cast5_sk_waddr = 0;
  subkey_t     cast5_sk_wdata = '0;
  logic [1:0]  cast5_sb_sel = 0;
  logic [7:0]  cast5_sb_waddr = 0;
  logic [31:0] cast5_sb_wdata = 0;
  logic [63:0] cast5_in_block = 0, cast5_out_block;
  // SHA-1
  logic sha1_blk_valid = 0, sha1_blk_ready, sha1_blk_first = 0, sha1_digest_valid;
  logic [511:0] sha1_blk_data = '0;
  logic [159:0] sha1_digest;

  int checks = 0, failures = 0;
  int n_rc4_setup = 0, n_rc4_stall = 0, n_rc4_bytes = 0;
  int n_enc16 = 0, n_dec16 = 0, n_enc12 = 0, n_dec12 = 0, n_b2b = 0, n_wait = 0;
  int n_sha_first = 0, n_sha_chain = 0;

  always #26 rc4_clk = ~rc4_clk;
  always #5  cast5_clk = ~cast5_clk;
  always #13 sha1_clk = ~sha1_clk;

  ipsec_crypto_top dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- RC4
  task automatic rc4_run(bq_t key, bq_t pt, output bq_t ct);
    int k = 0;
    ct = {};
    foreach (key[n]) begin
      rc4_key_we = 1; rc4_key_waddr = 4'(n); rc4_key_wdata = key[n];
      @(negedge rc4_clk);
    end
    rc4_key_we = 0;
    rc4_key_len = 5'(key.size());
    rc4_start = 1;
    @(negedge rc4_clk);
    rc4_start = 0;
    while (!rc4_ready) @(negedge rc4_clk);
    n_rc4_setup++;
    while (ct.size() < pt.size()) begin
      rc4_in_valid = (k < pt.size()) && ($urandom_range(4) != 0);
      if (k < pt.size() && !rc4_in_valid) n_rc4_stall++;
      if (rc4_in_valid) begin rc4_in_data = pt[k]; k++; end
      @(negedge rc4_clk);
      if (rc4_out_valid) begin ct.push_back(rc4_out_data); n_rc4_bytes++; end
    end
    rc4_in_valid = 0;
  endtask

  task automatic rc4_test();
    bq_t key, pt, ct, ks;
    key = '{8'h4B, 8'h65, 8'h79};                                  // "Key"
    pt  = '{8'h50, 8'h6C, 8'h61, 8'h69, 8'h6E, 8'h74, 8'h65, 8'h78, 8'h74};
    repeat (2) @(negedge rc4_clk);
    rc4_rst_n = 1;
    rc4_run(key, pt, ct);
    ks = '{8'hBB, 8'hF3, 8'h16, 8'hE8, 8'hD9, 8'h40, 8'hAF, 8'h0A, 8'hD3};
    foreach (ks[n]) check(ct[n] == ks[n], "RC4 Key/Plaintext");
    for (int rep = 0; rep < 2; rep++) begin
      key = {};
      repeat (rep ? 16 : 5) key.push_back(8'($urandom()));
      pt = {};
      repeat (100) pt.push_back(8'($urandom()));
      rc4_run(key, pt, ct);
      ks = keystream(key, 100);
      foreach (pt[n]) check(ct[n] == (pt[n] ^ ks[n]), "RC4 random key");
    end
  endtask

  // -------------------------------------------------------------- CAST5
  task automatic cast5_stream(logic [63:0] blk[$], bit dec[$], bit sh[$],
                              output logic [63:0] res[$]);
    int k = 0;
    bit accepted_last = 0;
    res = {};
    while (res.size() < blk.size()) begin
      cast5_in_valid = (k < blk.size());
      if (cast5_in_valid) begin
        cast5_in_block = blk[k]; cast5_in_decrypt = dec[k]; cast5_in_short = sh[k];
        if (!cast5_in_ready) n_wait++;
      end
      if (cast5_in_valid && cast5_in_ready) begin
        if (k > 0 && accepted_last) n_b2b++;
        accepted_last = 1;
        unique case ({dec[k], sh[k]})
          2'b00: n_enc16++;
          2'b10: n_dec16++;
          2'b01: n_enc12++;
          2'b11: n_dec12++;
        endcase
        k++;
      end
      @(negedge cast5_clk);
      if (cast5_out_valid) res.push_back(cast5_out_block);
    end
    cast5_in_valid = 0;
  endtask

  task automatic cast5_test();
    logic [63:0] blk[$], res[$], back[$];
    bit dec[$], sh[$], dec1[$];
    randomize_tables();
    repeat (2) @(negedge cast5_clk);
    cast5_rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 256; k++) begin
        cast5_sb_we = 1; cast5_sb_sel = 2'(b); cast5_sb_waddr = 8'(k);
        cast5_sb_wdata = sbox[b][k];
        @(negedge cast5_clk);
      end
    cast5_sb_we = 0;
    for (int k = 0; k < 16; k++) begin
      cast5_sk_we = 1; cast5_sk_waddr = 4'(k); cast5_sk_wdata = '{km: km[k], kr: kr[k]};
      @(negedge cast5_clk);
    end
    cast5_sk_we = 0;
    for (int n = 0; n < 16; n++) begin
      blk.push_back({$urandom(), $urandom()});
      dec.push_back(n[0]);
      sh.push_back(n[1]);
      dec1.push_back(1'b1);
    end
    cast5_stream(blk, dec, sh, res);
    foreach (blk[n]) check(res[n] == cipher(blk[n], dec[n], sh[n] ? 12 : 16), "CAST5 block");
    foreach (dec[n]) dec[n] = 0;
    cast5_stream(blk, dec, sh, res);
    cast5_stream(res, dec1, sh, back);
    foreach (blk[n]) check(back[n] == blk[n], "CAST5 round trip");
  endtask

  // -------------------------------------------------------------- SHA-1
  task automatic sha1_hash(bq_t msg, output logic [159:0] d);
    blk_q_t q = pad(msg);
    foreach (q[b]) begin
      sha1_blk_valid = 1; sha1_blk_data = q[b]; sha1_blk_first = (b == 0);
      while (!sha1_blk_ready) @(negedge sha1_clk);
      if (b == 0) n_sha_first++; else n_sha_chain++;
      @(negedge sha1_clk);
      sha1_blk_valid = 0;
      while (!sha1_digest_valid) @(negedge sha1_clk);
    end
    d = sha1_digest;
  endtask

  task automatic sha1_test();
    logic [159:0] d;
    bq_t m;
    repeat (2) @(negedge sha1_clk);
    sha1_rst_n = 1;
    sha1_hash(str2q("abc"), d);
    check(d == 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d, "SHA-1 abc");
    sha1_hash(str2q("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"), d);
    check(d == 160'h84983e44_1c3bd26e_baae4aa1_f95129e5_e54670f1, "SHA-1 two blocks");
    for (int n = 0; n < 4; n++) begin
      m = {};
      repeat ($urandom_range(300)) m.push_back(8'($urandom()));
      sha1_hash(m, d);
      check(d == hash(m), "SHA-1 random message");
    end
  endtask

  task automatic seen(int n, string what);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: never exercised: %s", what);
    end
  endtask

  initial begin
    fork
      rc4_test();
      cast5_test();
      sha1_test();
    join
    seen(n_rc4_setup, "RC4 key setups");
    seen(n_rc4_bytes, "RC4 bytes");
    seen(n_rc4_stall, "RC4 input gaps");
    seen(n_enc16, "CAST5 encrypt 16 rounds");
    seen(n_dec16, "CAST5 decrypt 16 rounds");
    seen(n_enc12, "CAST5 encrypt 12 rounds");
    seen(n_dec12, "CAST5 decrypt 12 rounds");
    seen(n_b2b, "CAST5 back-to-back blocks");
    seen(n_wait, "CAST5 waits for in_ready");
    seen(n_sha_first, "SHA-1 new messages");
    seen(n_sha_chain, "SHA-1 chained blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

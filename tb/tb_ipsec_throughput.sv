// tb_ipsec_throughput: sustained-throughput workload for the three engines.
// Each engine is kept busy back to back: RC4 streams 2000 bytes, CAST5 200
// blocks, SHA-1 a 30-block message. The testbench counts the clocks per
// pass in steady state, checks them against the architecture (RC4 1 clock
// per byte, CAST5 8 clocks per 64-bit block, SHA-1 22 clocks per 512-bit
// block), checks a sample of results against the reference models and
// prints the throughput bits x f_clk / clocks at the clock rates reported
// for a Virtex-II realisation (19.4, 99.7 and 38.6 MHz), which must come to
// the reported 155.2, 797.7 and 899.8 Mbit/s within 0.25 % (the clock rates
// are rounded).
module tb_ipsec_throughput;
  import cast5_pkg::*;
  import cast5_ref_pkg::*;
  import sha1_ref_pkg::*;
  import rc4_ref_pkg::*;

  logic rc4_clk, cast5_clk, sha1_clk;

  initial begin
    rc4_clk = 0;
    cast5_clk = 0;
    sha1_clk = 0;
  end
  logic rc4_rst_n = 0, cast5_rst_n = 0, sha1_rst_n = 0;
  logic rc4_key_we = 0, rc4_start = 0, rc4_ready, rc4_in_valid = 0, rc4_out_valid;
  logic [3:0] rc4_key_waddr = 0;
  logic [7:0] rc4_key_wdata = 0, rc4_in_data = 0, rc4_out_data;
  logic [4:0] rc4_key_len = 16;
  logic cast5_sk_we = 0, cast5_sb_we = 0, cast5_in_valid = 0, cast5_in_decrypt = 0;
  logic cast5_in_short = 0, cast5_in_ready, cast5_out_valid;
  logic [3:0]  cast5_sk_waddr = 0;
  subkey_t     cast5_sk_wdata = '0;
  logic [1:0]  cast5_sb_sel = 0;
  logic [7:0]  cast5_sb_waddr = 0;
  logic [31:0] cast5_sb_wdata = 0;
  logic [63:0] cast5_in_block = 0, cast5_out_block;
  logic sha1_blk_valid = 0, sha1_blk_ready, sha1_blk_first = 0, sha1_digest_valid;
  logic [511:0] sha1_blk_data = '0;
  logic [159:0] sha1_digest;

  int checks = 0, failures = 0;

  always #5 rc4_clk = ~rc4_clk;
  always #5 cast5_clk = ~cast5_clk;
  always #5 sha1_clk = ~sha1_clk;

  ipsec_crypto_top dut (.*);

  initial begin
    #2000000;
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

  // Throughput in Mbit/s at f MHz, compared with the reported figure.
  task automatic report(string name, int bits, int clocks, int passes,
                        real f_mhz, real expect_mbps);
    real mbps = real'(bits) * real'(passes) * f_mhz / real'(clocks);
    $display("%-6s %0d passes in %0d clocks: %0.3f bits/clock, %0.1f Mbit/s at %0.1f MHz",
             name, passes, clocks, real'(bits) * passes / clocks, mbps, f_mhz);
    // The reported clock rates are rounded to 0.1 MHz, hence the 0.25 %.
    check(mbps > expect_mbps * 0.9975 && mbps < expect_mbps * 1.0025,
          $sformatf("%s throughput %0.1f, expected %0.1f", name, mbps, expect_mbps));
  endtask

  task automatic rc4_load();
    typedef logic [7:0] bq_t [$];
    bq_t key, ks;
    int first = -1, last = 0, cyc = 0, nout = 0, nin = 0;
    for (int n = 0; n < 16; n++) key.push_back(8'($urandom()));
    repeat (2) @(negedge rc4_clk);
    rc4_rst_n = 1;
    foreach (key[n]) begin
      rc4_key_we = 1; rc4_key_waddr = 4'(n); rc4_key_wdata = key[n];
      @(negedge rc4_clk);
    end
    rc4_key_we = 0;
    rc4_start = 1;
    @(negedge rc4_clk);
    rc4_start = 0;
    while (!rc4_ready) @(negedge rc4_clk);
    ks = keystream(key, 2000);
    rc4_in_data = 0;
    while (nout < 2000) begin
      rc4_in_valid = (nin < 2000);
      if (rc4_in_valid) nin++;
      @(negedge rc4_clk);
      cyc++;
      if (rc4_out_valid) begin
        if (first < 0) first = cyc;
        last = cyc;
        if (nout % 97 == 0) check(rc4_out_data == ks[nout], "RC4 keystream sample");
        nout++;
      end
    end
    rc4_in_valid = 0;
    // 2000 outputs span last - first + 1 clocks.
    check(last - first + 1 == 2000, "RC4 one byte per clock");
    report("RC4", 8, last - first + 1, 2000, 19.4, 155.2);
  endtask

  task automatic cast5_load();
    logic [63:0] blk [200];
    int first = -1, last = 0, cyc = 0, k = 0, nout = 0;
    randomize_tables();
    repeat (2) @(negedge cast5_clk);
    cast5_rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int n = 0; n < 256; n++) begin
        cast5_sb_we = 1; cast5_sb_sel = 2'(b); cast5_sb_waddr = 8'(n);
        cast5_sb_wdata = sbox[b][n];
        @(negedge cast5_clk);
      end
    cast5_sb_we = 0;
    for (int n = 0; n < 16; n++) begin
      cast5_sk_we = 1; cast5_sk_waddr = 4'(n); cast5_sk_wdata = '{km: km[n], kr: kr[n]};
      @(negedge cast5_clk);
    end
    cast5_sk_we = 0;
    foreach (blk[n]) blk[n] = {$urandom(), $urandom()};
    while (nout < 200) begin
      cast5_in_valid = (k < 200);
      if (k < 200) cast5_in_block = blk[k];
      if (cast5_in_valid && cast5_in_ready) k++;
      @(negedge cast5_clk);
      cyc++;
      if (cast5_out_valid) begin
        if (first < 0) first = cyc;
        last = cyc;
        if (nout % 13 == 0) check(cast5_out_block == cipher(blk[nout], 0, 16), "CAST5 sample");
        nout++;
      end
    end
    cast5_in_valid = 0;
    // 200 results, 8 clocks apart: 199 gaps.
    check(last - first == 8 * 199, "CAST5 eight clocks per block");
    report("CAST5", 64, last - first, 199, 99.7, 797.7);
  endtask

  task automatic sha1_load();
    byte_q_t m;
    blk_q_t  q;
    int first = -1, last = 0, cyc = 0, k = 0, nout = 0;
    repeat (30 * 64 - 9) m.push_back(8'($urandom()));
    q = pad(m);
    repeat (2) @(negedge sha1_clk);
    sha1_rst_n = 1;
    while (nout < q.size()) begin
      sha1_blk_valid = (k < q.size());
      if (k < q.size()) begin sha1_blk_data = q[k]; sha1_blk_first = (k == 0); end
      if (sha1_blk_valid && sha1_blk_ready) k++;
      @(negedge sha1_clk);
      cyc++;
      if (sha1_digest_valid) begin
        if (first < 0) first = cyc;
        last = cyc;
        nout++;
      end
    end
    sha1_blk_valid = 0;
    check(q.size() == 30, "SHA-1 message is 30 blocks");
    check(sha1_digest == hash(m), "SHA-1 digest of 30-block message");
    check(last - first == 22 * 29, "SHA-1 22 clocks per block");
    report("SHA-1", 512, last - first, 29, 38.6, 899.8);
  endtask

  initial begin
    fork
      rc4_load();
      cast5_load();
      sha1_load();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

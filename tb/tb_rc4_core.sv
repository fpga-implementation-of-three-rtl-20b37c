// tb_rc4_core: self-checking test of the RC4 core.
// Runs the published test vectors ("Key"/"Plaintext", "Wiki"/"pedia",
// "Secret"/"Attack at dawn"), then random keys of 5 (40-bit) and 16 (128-bit)
// bytes and other lengths with 300 bytes each, comparing against the
// reference model. Input is offered with random gaps; the bytes at full
// rate must come out one per clock. Key setup must take 258 clocks from the start pulse.
module tb_rc4_core;
  import rc4_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic key_we = 0, start = 0, ready, in_valid = 0, out_valid;
  logic [3:0] key_waddr = 0;
  logic [7:0] key_wdata = 0, in_data = 0, out_data;
  logic [4:0] key_len = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rc4_core dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
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

  // Load the key, run key setup, then push `pt` through with gaps when
  // `gaps` is set; return the output bytes.
  task automatic run(byte_q_t key, byte_q_t pt, bit gaps, output byte_q_t ct);
    int cyc = 0, k = 0, outs = 0, run_len = 0, run_ok = 1;
    ct = {};
    foreach (key[n]) begin
      key_we = 1; key_waddr = 4'(n); key_wdata = key[n];
      @(negedge clk);
    end
    key_we = 0;
    key_len = 5'(key.size());
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
    // The start clock, one clock of identity fill, 256 swap clocks.
    check(cyc == 258, $sformatf("key setup took %0d clocks, expected 258", cyc));
    while (outs < pt.size()) begin
      in_valid = (k < pt.size()) && (!gaps || $urandom_range(3) != 0);
      if (in_valid) begin in_data = pt[k]; k++; end
      @(negedge clk);
      if (out_valid) begin
        ct.push_back(out_data);
        outs++;
      end
      // With no gaps each accepted byte must appear on the next clock.
      if (!gaps && in_valid && !out_valid) run_ok = 0;
    end
    in_valid = 0;
    if (!gaps) check(run_ok == 1, "one byte per clock");
  endtask

  function automatic bit same(byte_q_t a, byte_q_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[n]) if (a[n] != b[n]) return 0;
    return 1;
  endfunction

  function automatic byte_q_t s2q(string s);
    byte_q_t q;
    for (int n = 0; n < s.len(); n++) q.push_back(s[n]);
    return q;
  endfunction

  initial begin
    byte_q_t key, pt, ct, ks, exp;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    run(s2q("Key"), s2q("Plaintext"), 0, ct);
    exp = '{8'hBB, 8'hF3, 8'h16, 8'hE8, 8'hD9, 8'h40, 8'hAF, 8'h0A, 8'hD3};
    check(same(ct, exp), "Key/Plaintext");
    run(s2q("Wiki"), s2q("pedia"), 1, ct);
    exp = '{8'h10, 8'h21, 8'hBF, 8'h04, 8'h20};
    check(same(ct, exp), "Wiki/pedia");
    run(s2q("Secret"), s2q("Attack at dawn"), 0, ct);
    exp = '{8'h45, 8'hA0, 8'h1F, 8'h64, 8'h5F, 8'hC3, 8'h5B, 8'h38,
            8'h35, 8'h52, 8'h54, 8'h4B, 8'h9B, 8'hF5};
    check(same(ct, exp), "Secret/Attack at dawn");

    for (int rep = 0; rep < 6; rep++) begin
      int len;
      len = (rep == 0) ? 5 : (rep == 1) ? 16 : 1 + $urandom_range(15);
      key = {};
      repeat (len) key.push_back(8'($urandom()));
      pt = {};
      repeat (300) pt.push_back(8'($urandom()));
      run(key, pt, rep[0], ct);
      ks = keystream(key, 300);
      for (int n = 0; n < 300; n++)
        check(ct[n] == (pt[n] ^ ks[n]), $sformatf("random key len %0d byte %0d", len, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

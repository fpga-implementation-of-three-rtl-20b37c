// tb_cast5_core: self-checking test of the CAST5 core.
// Loads random S-box tables and subkeys (the same values go to the
// reference model), then streams blocks back to back in all four modes
// (encrypt/decrypt, 16/12 rounds) and compares every output with the
// reference. Also checks that ciphertexts decrypt back to the plaintext,
// that a new block is accepted every 8 clocks when input is always offered,
// and that each result appears on the 16th clock edge after acceptance.
module tb_cast5_core;
  import cast5_pkg::*;
  import cast5_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sk_we = 0, sb_we = 0, in_valid = 0, in_decrypt = 0, in_short = 0;
  logic [3:0]  sk_waddr = 0;
  subkey_t     sk_wdata = '0;
  logic [1:0]  sb_sel = 0;
  logic [7:0]  sb_waddr = 0;
  logic [31:0] sb_wdata = 0;
  logic [63:0] in_block = 0, out_block;
  logic        in_ready, out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cast5_core dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
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

  typedef struct {
    logic [63:0] blk;
    bit          dec;
    bit          sh;
  } job_t;

  // Stream `jobs` continuously; return the outputs in order.
  task automatic stream(job_t jobs[$], output logic [63:0] res[$]);
    int cyc = 0, k = 0, last_acc = -1;
    int acc_q[$];
    res = {};
    while (res.size() < jobs.size()) begin
      in_valid = (k < jobs.size());
      if (in_valid) begin
        in_block = jobs[k].blk; in_decrypt = jobs[k].dec; in_short = jobs[k].sh;
      end
      if (in_valid && in_ready) begin
        if (last_acc >= 0) check(cyc - last_acc == 8, $sformatf("accept period %0d", cyc - last_acc));
        last_acc = cyc;
        acc_q.push_back(cyc);
        k++;
      end
      @(negedge clk);
      cyc++;
      if (out_valid) begin
        int a = acc_q.pop_front();
        // `a` is the clock whose edge accepts the block; out_valid is
        // registered by the 16th edge after that one.
        check(cyc - a == 17, $sformatf("latency %0d, expected 17", cyc - a));
        res.push_back(out_block);
      end
    end
    in_valid = 0;
  endtask

  initial begin
    job_t jobs[$];
    logic [63:0] res[$], back[$];
    randomize_tables();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 256; k++) begin
        sb_we = 1; sb_sel = 2'(b); sb_waddr = 8'(k); sb_wdata = sbox[b][k];
        @(negedge clk);
      end
    sb_we = 0;
    for (int k = 0; k < 16; k++) begin
      sk_we = 1; sk_waddr = 4'(k); sk_wdata = '{km: km[k], kr: kr[k]};
      @(negedge clk);
    end
    sk_we = 0;

    // Mixed modes, back to back.
    for (int n = 0; n < 40; n++)
      jobs.push_back('{blk: {$urandom(), $urandom()}, dec: n[0], sh: n[1]});
    stream(jobs, res);
    foreach (jobs[n])
      check(res[n] == cipher(jobs[n].blk, jobs[n].dec, jobs[n].sh ? 12 : 16),
            $sformatf("block %0d dec=%0d short=%0d", n, jobs[n].dec, jobs[n].sh));

    // Encrypt then decrypt must give the plaintext back.
    for (int n = 0; n < 40; n++) jobs[n].dec = 0;
    stream(jobs, res);
    begin
      job_t dj[$];
      foreach (jobs[n]) dj.push_back('{blk: res[n], dec: 1, sh: jobs[n].sh});
      stream(dj, back);
    end
    foreach (jobs[n]) check(back[n] == jobs[n].blk, $sformatf("round trip %0d", n));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sha1_core: self-checking test of the SHA-1 core.
// Hashes the standard vectors "abc", "" and the two-block 56-character
// vector, then random messages of 0..200 bytes, all padded here and fed
// block by block; every digest is compared with the reference model and
// published values. Checks the 22-clock period per block and that a
// back-to-back block is accepted the clock digest_valid rises.
module tb_sha1_core;
  import sha1_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic blk_valid = 0, blk_first = 0, blk_ready, digest_valid;
  logic [511:0] blk_data = '0;
  logic [159:0] digest;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha1_core dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
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

  // Feed all blocks back to back; return the final digest.
  task automatic run(byte_q_t msg, output logic [159:0] d);
    blk_q_t q = pad(msg);
    logic [159:0] h = IV;
    foreach (q[b]) begin
      int cyc = 0;
      // Drive and sample on the falling edge, away from the DUT's edge.
      blk_valid = 1; blk_data = q[b]; blk_first = (b == 0);
      while (!blk_ready) @(negedge clk);
      @(negedge clk);
      blk_valid = 0;
      cyc = 1;
      while (!digest_valid) begin @(negedge clk); cyc++; end
      h = compress(h, q[b]);
      check(cyc == 22, $sformatf("block period %0d, expected 22", cyc));
      check(digest == h, "intermediate digest");
      check(blk_ready, "ready when digest valid");
    end
    d = digest;
  endtask

  initial begin
    logic [159:0] d;
    byte_q_t m;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(str2q("abc"), d);
    check(d == 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d, "abc");
    run(str2q(""), d);
    check(d == 160'hda39a3ee_5e6b4b0d_3255bfef_95601890_afd80709, "empty");
    run(str2q("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"), d);
    check(d == 160'h84983e44_1c3bd26e_baae4aa1_f95129e5_e54670f1, "two-block vector");
    for (int n = 0; n < 12; n++) begin
      m = {};
      repeat ($urandom_range(200)) m.push_back(8'($urandom()));
      run(m, d);
      check(d == hash(m), "random message");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sha1_msg_schedule: loads random 512-bit blocks, advances the window
// 20 times and compares the four words shown each clock with W_t..W_t+3
// of the reference expansion (t = 0, 4, ..., 76).
module tb_sha1_msg_schedule;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  logic clk = 0, load = 0, advance = 0;
  logic [511:0] block = '0;
  word_t w [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha1_msg_schedule dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w32_t ref_w [80];
    for (int rep = 0; rep < 5; rep++) begin
      for (int k = 0; k < 16; k++) block[32*k +: 32] = $urandom();
      expand(block, ref_w);
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      advance = 1;
      for (int g = 0; g < 20; g++) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (w[k] !== ref_w[4*g + k]) begin
            failures++;
            $display("FAIL W%0d got %h exp %h", 4*g + k, w[k], ref_w[4*g + k]);
          end
        end
        @(negedge clk);
      end
      advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

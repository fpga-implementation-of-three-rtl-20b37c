// tb_rc4_sbox_array: checks the identity fill, the three combinational read
// ports and the two-entry swap write (including both ports on one address)
// against a shadow array, over random swaps.
module tb_rc4_sbox_array;
  logic clk = 0, init = 0, we = 0;
  logic [7:0] raddr0 = 0, raddr1 = 0, raddr2 = 0, rdata0, rdata1, rdata2;
  logic [7:0] waddr0 = 0, wdata0 = 0, waddr1 = 0, wdata1 = 0;
  logic [7:0] shadow [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rc4_sbox_array dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    raddr0 = 8'($urandom()); raddr1 = 8'($urandom()); raddr2 = 8'($urandom());
    #1;
    checks++;
    if (rdata0 != shadow[raddr0] || rdata1 != shadow[raddr1] || rdata2 != shadow[raddr2]) begin
      failures++;
      $display("FAIL read %0d %0d %0d", raddr0, raddr1, raddr2);
    end
  endtask

  initial begin
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    for (int k = 0; k < 256; k++) shadow[k] = 8'(k);
    for (int k = 0; k < 256; k++) begin
      raddr0 = 8'(k); raddr1 = 8'(255 - k); raddr2 = 8'(k ^ 8'h5A);
      #1;
      checks++;
      if (rdata0 != 8'(k) || rdata1 != 8'(255 - k) || rdata2 != 8'(k ^ 8'h5A)) failures++;
    end
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] a0, a1, v0, v1;
      a0 = 8'($urandom());
      a1 = ($urandom_range(7) == 0) ? a0 : 8'($urandom());
      v0 = 8'($urandom()); v1 = 8'($urandom());
      we = 1; waddr0 = a0; wdata0 = v0; waddr1 = a1; wdata1 = v1;
      @(negedge clk);
      we = 0;
      shadow[a0] = v0;
      shadow[a1] = v1;
      check_reads();
      @(negedge clk);
      checks++;
      raddr0 = a0; raddr1 = a1; #1;
      if (rdata0 != shadow[a0] || rdata1 != shadow[a1]) begin
        failures++;
        $display("FAIL write %0d %0d: %h %h exp %h %h at %0t", a0, a1, rdata0, rdata1, shadow[a0], shadow[a1], $time);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

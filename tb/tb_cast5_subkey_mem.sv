// tb_cast5_subkey_mem: loads 16 random subkey pairs and reads them back
// through both ports at independent random addresses.
module tb_cast5_subkey_mem;
  import cast5_pkg::*;
  logic clk = 0, we = 0;
  logic [3:0] waddr = 0;
  subkey_t    wdata = '0;
  logic [3:0] raddr [2];
  subkey_t    rdata [2];
  subkey_t    shadow [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cast5_subkey_mem dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        we = 1; waddr = 4'(k); wdata = '{km: $urandom(), kr: 5'($urandom())};
        shadow[k] = wdata;
      end
      @(negedge clk);
      we = 0;
      for (int n = 0; n < 100; n++) begin
        raddr[0] = 4'($urandom()); raddr[1] = 4'($urandom());
        #1;
        checks++;
        if (rdata[0] != shadow[raddr[0]] || rdata[1] != shadow[raddr[1]]) begin
          failures++;
          $display("FAIL %0d %0d", raddr[0], raddr[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

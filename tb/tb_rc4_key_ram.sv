// tb_rc4_key_ram: writes random key bytes and checks that each read returns
// the byte written, one clock after the address is presented.
module tb_rc4_key_ram;
  logic clk = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] shadow [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rc4_key_ram dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        we = 1; waddr = 4'(k); wdata = 8'($urandom()); shadow[k] = wdata;
      end
      @(negedge clk);
      we = 0;
      for (int k = 0; k < 16; k++) begin
        raddr = 4'($urandom());
        @(negedge clk);
        checks++;
        if (rdata != shadow[raddr]) begin
          failures++;
          $display("FAIL addr %0d got %h exp %h", raddr, rdata, shadow[raddr]);
        end
        // The output must follow the address only at the clock edge.
        raddr = raddr + 4'd1;
        #1;
        checks++;
        if (rdata != shadow[raddr - 4'd1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

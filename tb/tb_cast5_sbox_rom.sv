// tb_cast5_sbox_rom: loads a random table and reads it back through both
// ports at independent random addresses; a later overwrite must show.
module tb_cast5_sbox_rom;
  logic clk = 0, we = 0;
  logic [7:0]  waddr = 0;
  logic [31:0] wdata = 0;
  logic [7:0]  raddr [2];
  logic [31:0] rdata [2];
  logic [31:0] shadow [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cast5_sbox_rom dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int n = 0; n < 512; n++) begin
      raddr[0] = 8'($urandom()); raddr[1] = 8'($urandom());
      #1;
      checks++;
      if (rdata[0] != shadow[raddr[0]] || rdata[1] != shadow[raddr[1]]) begin
        failures++;
        $display("FAIL %0d %0d", raddr[0], raddr[1]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      we = 1; waddr = 8'(k); wdata = $urandom(); shadow[k] = wdata;
    end
    @(negedge clk);
    we = 0;
    read_all();
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      we = 1; waddr = 8'($urandom()); wdata = $urandom(); shadow[waddr] = wdata;
    end
    @(negedge clk);
    we = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

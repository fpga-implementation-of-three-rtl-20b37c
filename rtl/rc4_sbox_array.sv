// rc4_sbox_array: the 256-byte RC4 state S held in flip-flops.
//
// A register array rather than a block RAM, so that one clock can make the
// three dependent reads and the two writes of an RC4 step. The three read
// ports are combinational (each a 256-to-1 byte multiplexer); the two write
// ports are written at the clock edge, port 1 after port 0 when both address
// the same byte. `init` loads the identity S[k] = k and has priority over
// the write ports. Using a register array follows the document; the port
// arrangement is this design's choice.
module rc4_sbox_array (
  input  logic       clk,
  input  logic       init,
  input  logic [7:0] raddr0,
  output logic [7:0] rdata0,
  input  logic [7:0] raddr1,
  output logic [7:0] rdata1,
  input  logic [7:0] raddr2,
  output logic [7:0] rdata2,
  input  logic       we,
  input  logic [7:0] waddr0,
  input  logic [7:0] wdata0,
  input  logic [7:0] waddr1,
  input  logic [7:0] wdata1
);

  logic [7:0] s [256];

  always_ff @(posedge clk) begin
    if (init) begin
      for (int k = 0; k < 256; k++) s[k] <= 8'(k);
    end else if (we) begin
      s[waddr0] <= wdata0;
      s[waddr1] <= wdata1;
    end
  end

  assign rdata0 = s[raddr0];
  assign rdata1 = s[raddr1];
  assign rdata2 = s[raddr2];

endmodule

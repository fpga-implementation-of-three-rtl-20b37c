// rc4_key_ram: storage for the RC4 key, one byte per entry.
//
// A small single-port-write, single-port-read memory with a registered read
// (block RAM style): `rdata` shows the byte at `raddr` one clock after the
// address. The document keeps the key in a RAM block; depth (16 bytes, a
// 128-bit key) and the synchronous read are this design's choices.
module rc4_key_ram #(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

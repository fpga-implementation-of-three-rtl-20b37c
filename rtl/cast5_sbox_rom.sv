// cast5_sbox_rom: one CAST5 S-box, 256 words of 32 bits, PORTS read ports.
//
// One instance serves one S-box for all round units of cast5_core, one read
// port per unit. With the default sharing factor of 8 there are two units,
// so a single dual-ported memory per S-box is enough (four in all). The
// table holds the fixed S-box constants of the cipher; they are written once
// after power-up through the write port (the equivalent of initialising a
// block ROM) and only read afterwards. Reads are combinational so that a
// round fits in one clock; this and the load port are this design's choices.
module cast5_sbox_rom #(
  parameter int unsigned PORTS = 2
) (
  input  logic        clk,
  input  logic        we,
  input  logic [7:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [7:0]  raddr [PORTS],
  output logic [31:0] rdata [PORTS]
);

  logic [31:0] mem [256];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb
    for (int p = 0; p < int'(PORTS); p++) rdata[p] = mem[raddr[p]];

endmodule

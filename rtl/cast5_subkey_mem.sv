// cast5_subkey_mem: the 16 CAST5 subkey pairs {Km_i, Kr_i}, i = 1..16.
//
// Subkeys are computed outside and written through the write port (entry
// i-1 holds the pair of round i). PORTS combinational read ports serve the
// round units of cast5_core, one each. Keeping the subkeys preloaded in
// memory follows the document; the port arrangement is this design's choice.
module cast5_subkey_mem
  import cast5_pkg::*;
#(
  parameter int unsigned PORTS = 2
) (
  input  logic       clk,
  input  logic       we,
  input  logic [3:0] waddr,
  input  subkey_t    wdata,
  input  logic [3:0] raddr [PORTS],
  output subkey_t    rdata [PORTS]
);

  subkey_t mem [16];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb
    for (int p = 0; p < int'(PORTS); p++) rdata[p] = mem[raddr[p]];

endmodule

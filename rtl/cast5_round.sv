// cast5_round: one CAST5 Feistel round, combinational.
//
// From (L, R) the round forms I = (Km op1 R) <<< Kr, splits I into bytes
// Ia (most significant) .. Id, looks them up in S-boxes S1..S4 (through the
// sbox_addr / sbox_data ports, so the caller decides which ROM port serves
// the round) and combines the results:
//   type 1: I = (Km + R) <<< Kr,  f = ((S1 ^ S2) - S3) + S4
//   type 2: I = (Km ^ R) <<< Kr,  f = ((S1 - S2) + S3) ^ S4
//   type 3: I = (Km - R) <<< Kr,  f = ((S1 + S2) ^ S3) - S4
// and returns L' = R, R' = L ^ f. The Feistel step follows the document;
// the three f types are the standard CAST5 definitions, which the document
// names but does not print. l_out is r_in passed straight through: that
// wire is the Feistel swap of the halves, not an unused output.
module cast5_round
  import cast5_pkg::*;
(
  input  logic [31:0] l_in,
  input  logic [31:0] r_in,
  input  subkey_t     key,
  input  ftype_e      ftype,
  output logic [7:0]  sbox_addr [4],
  input  logic [31:0] sbox_data [4],
  output logic [31:0] l_out,
  output logic [31:0] r_out
);

  logic [31:0] pre, ival, f;

  always_comb begin
    unique case (ftype)
      F_TYPE1: pre = key.km + r_in;
      F_TYPE2: pre = key.km ^ r_in;
      default: pre = key.km - r_in;
    endcase
    ival = rotl32(pre, key.kr);
    for (int k = 0; k < 4; k++) sbox_addr[k] = ival[31-8*k -: 8];
    unique case (ftype)
      F_TYPE1: f = ((sbox_data[0] ^ sbox_data[1]) - sbox_data[2]) + sbox_data[3];
      F_TYPE2: f = ((sbox_data[0] - sbox_data[1]) + sbox_data[2]) ^ sbox_data[3];
      default: f = ((sbox_data[0] + sbox_data[1]) ^ sbox_data[2]) - sbox_data[3];
    endcase
  end

  assign l_out = r_in;
  assign r_out = l_in ^ f;

endmodule

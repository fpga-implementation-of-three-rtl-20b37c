// cast5_ref_pkg: plain CAST5 round-sequence reference used by the
// testbenches. The S-box tables and subkeys live in package variables that a
// testbench fills (with any values) and also loads into the hardware.
package cast5_ref_pkg;

  logic [31:0] sbox [4][256];
  logic [31:0] km   [16];
  logic [4:0]  kr   [16];

  function automatic logic [31:0] rol(logic [31:0] x, int n);
    if (n == 0) return x;
    return (x << n) | (x >> (32 - n));
  endfunction

  // f of round r (1-based) applied to d.
  function automatic logic [31:0] f(int r, logic [31:0] d);
    logic [31:0] i, s1, s2, s3, s4;
    int ty = (r - 1) % 3;
    if (ty == 0)      i = rol(km[r-1] + d, int'(kr[r-1]));
    else if (ty == 1) i = rol(km[r-1] ^ d, int'(kr[r-1]));
    else              i = rol(km[r-1] - d, int'(kr[r-1]));
    s1 = sbox[0][i[31:24]]; s2 = sbox[1][i[23:16]];
    s3 = sbox[2][i[15:8]];  s4 = sbox[3][i[7:0]];
    if (ty == 0)      return ((s1 ^ s2) - s3) + s4;
    else if (ty == 1) return ((s1 - s2) + s3) ^ s4;
    else              return ((s1 + s2) ^ s3) - s4;
  endfunction

  // Encrypt (dec = 0) or decrypt (dec = 1) one block with nr rounds.
  function automatic logic [63:0] cipher(logic [63:0] blk, bit dec, int nr);
    logic [31:0] l = blk[63:32], r = blk[31:0], t;
    for (int k = 0; k < nr; k++) begin
      int rn = dec ? nr - k : k + 1;
      t = r;
      r = l ^ f(rn, r);
      l = t;
    end
    return {r, l};
  endfunction

  function automatic void randomize_tables();
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 256; k++) sbox[b][k] = $urandom();
    for (int k = 0; k < 16; k++) begin
      km[k] = $urandom();
      kr[k] = 5'($urandom());
    end
  endfunction

endpackage

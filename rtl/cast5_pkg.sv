// cast5_pkg: types and helpers shared by the CAST5 blocks.
//
// CAST5 uses three round-function types. Rounds 1, 4, 7, 10, 13, 16 are
// type 1, rounds 2, 5, 8, 11, 14 type 2 and rounds 3, 6, 9, 12, 15 type 3;
// the type depends on the round number, so in decryption (rounds run from
// the last to the first) each round keeps its own type.
package cast5_pkg;

  typedef enum logic [1:0] {F_TYPE1 = 2'd0, F_TYPE2 = 2'd1, F_TYPE3 = 2'd2} ftype_e;

  // Masking subkey Km (32 bits) and rotation subkey Kr (5 bits) of a round.
  typedef struct packed {
    logic [31:0] km;
    logic [4:0]  kr;
  } subkey_t;

  // Type of round number r (1-based).
  function automatic ftype_e ftype_of(input logic [4:0] r);
    unique case ((r - 5'd1) % 5'd3)
      5'd0:    return F_TYPE1;
      5'd1:    return F_TYPE2;
      default: return F_TYPE3;
    endcase
  endfunction

  function automatic logic [31:0] rotl32(input logic [31:0] x, input logic [4:0] n);
    return 32'((({x, x}) << n) >> 32);
  endfunction

endpackage

// sha1_pkg: constants and small functions shared by the SHA-1 blocks.
// Holds the initial hash value H0..H4, the four round constants K_t, the
// round function f_t(B,C,D) selected by the round number t (0..79) and a
// 32-bit rotate-left. All of these are the standard SHA-1 definitions.
package sha1_pkg;

  typedef logic [31:0] word_t;

  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
    word_t e;
  } sha1_state_t;

  localparam word_t H_INIT [5] = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE,
                                  32'h10325476, 32'hC3D2E1F0};

  localparam int unsigned ROUNDS = 80;

  function automatic word_t rotl(input word_t x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Round constant for round t.
  function automatic word_t k_of(input logic [6:0] t);
    if (t < 7'd20)      return 32'h5A827999;
    else if (t < 7'd40) return 32'h6ED9EBA1;
    else if (t < 7'd60) return 32'h8F1BBCDC;
    else                return 32'hCA62C1D6;
  endfunction

  // Round function for round t: Ch, Parity, Maj, Parity.
  function automatic word_t f_of(input logic [6:0] t, input word_t b,
                                 input word_t c, input word_t d);
    if (t < 7'd20)      return (b & c) | (~b & d);
    else if (t < 7'd40) return b ^ c ^ d;
    else if (t < 7'd60) return (b & c) | (b & d) | (c & d);
    else                return b ^ c ^ d;
  endfunction

endpackage

// sha1_round4: UNROLL (default 4) SHA-1 rounds as one combinational block.
//
// Round t computes TEMP = ROTL5(A) + f_t(B,C,D) + E + W_t + K_t and shifts
// (A,B,C,D,E) <- (TEMP, A, ROTL30(B), C, D). Only ROTL5(A) and f_t depend on
// the previous round's TEMP; the E operand of the four rounds is E, D, C and
// ROTL30(B) of the incoming state, so the sums E + W_t + K_t of all four
// rounds are formed in parallel at the block's input and each further round
// adds roughly one adder to the critical path instead of four. This split of
// the additions follows the document; the operand order of the remaining
// additions is this design's choice.
//
// Interface: `t0` is the number of the first round in the group (a multiple
// of UNROLL), `w[k]` is W_{t0+k}. Purely combinational.
module sha1_round4
  import sha1_pkg::*;
#(
  parameter int unsigned UNROLL = 4
) (
  input  sha1_state_t st_in,
  input  logic [6:0]  t0,
  input  word_t       w [UNROLL],
  output sha1_state_t st_out
);

  // E operand of round k, all known at the block input for k < 4.
  word_t e_early [4];
  assign e_early[0] = st_in.e;
  assign e_early[1] = st_in.d;
  assign e_early[2] = st_in.c;
  assign e_early[3] = rotl(st_in.b, 30);

  // E + W + K, computed in parallel with the A chain.
  word_t pre [UNROLL];
  always_comb
    for (int k = 0; k < int'(UNROLL); k++)
      pre[k] = e_early[k % 4] + w[k] + k_of(t0 + 7'(k));

  sha1_state_t st [UNROLL+1];
  always_comb begin
    st[0] = st_in;
    for (int k = 0; k < int'(UNROLL); k++) begin
      logic [6:0] t;
      word_t      ewk;
      t = t0 + 7'(k);
      // For k >= 4 the E operand is only known from the chain.
      ewk = (k < 4) ? pre[k] : st[k].e + w[k] + k_of(t);
      st[k+1].a = rotl(st[k].a, 5) + f_of(t, st[k].b, st[k].c, st[k].d) + ewk;
      st[k+1].b = st[k].a;
      st[k+1].c = rotl(st[k].b, 30);
      st[k+1].d = st[k].c;
      st[k+1].e = st[k].d;
    end
  end

  assign st_out = st[UNROLL];

endmodule

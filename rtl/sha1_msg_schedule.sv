// sha1_msg_schedule: SHA-1 message expansion, UNROLL words per clock.
//
// A 16-word window holds W_t .. W_{t+15}. `load` fills it with the 16 words
// of a 512-bit block (W_0 is the most significant word of `block`). Each
// `advance` slides the window by UNROLL words and appends the UNROLL new
// words W_{t+16+k} = ROTL1(W_{t+13+k} ^ W_{t+8+k} ^ W_{t+2+k} ^ W_{t+k});
// a new word that needs one produced in the same clock takes it from the
// combinational chain. `w` shows W_t .. W_{t+UNROLL-1} of the current window,
// which is what the round block consumes in the same cycle.
// The recurrence is the standard one; computing UNROLL words per clock to
// keep pace with UNROLL rounds per clock is this design's choice.
module sha1_msg_schedule
  import sha1_pkg::*;
#(
  parameter int unsigned UNROLL = 4
) (
  input  logic         clk,
  input  logic         load,
  input  logic [511:0] block,
  input  logic         advance,
  output word_t        w [UNROLL]
);

  word_t win [16];
  // The window followed by the UNROLL words appended by one advance.
  word_t ext [16+UNROLL];

  always_comb begin
    for (int k = 0; k < 16; k++) ext[k] = win[k];
    for (int k = 16; k < 16 + int'(UNROLL); k++)
      ext[k] = rotl(ext[k-3] ^ ext[k-8] ^ ext[k-14] ^ ext[k-16], 1);
  end

  always_ff @(posedge clk) begin
    if (load) begin
      for (int k = 0; k < 16; k++) win[k] <= block[511-32*k -: 32];
    end else if (advance) begin
      for (int k = 0; k < 16; k++) begin
        win[k] <= ext[k+int'(UNROLL)];
      end
    end
  end

  always_comb
    for (int k = 0; k < int'(UNROLL); k++) w[k] = win[k];

endmodule

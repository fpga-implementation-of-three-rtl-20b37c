// sha1_core: iterative SHA-1 compression with partial loop unrolling.
//
// The 80 rounds of a 512-bit block are executed UNROLL (4) per clock by
// sha1_round4, fed by sha1_msg_schedule. A block takes 22 clocks: one to
// accept it (load W_0..W_15 and A..E), 80/UNROLL = 20 round clocks, and one
// to add A..E into H0..H4. SHA-1 chains blocks through H, so the rounds
// cannot be pipelined; unrolling is the only way to speed the loop up.
// The 4-round unrolling and the 22-clock block period follow the document;
// the handshake and the chaining control are this design's own.
//
// Interface (all synchronous to clk, active-low synchronous reset):
//   blk_valid/blk_ready  a 512-bit block, already padded by the host, is
//                        taken in a cycle where both are high; W_0 is bits
//                        511:480. blk_ready is high only in the idle state.
//   blk_first            with the block: start a new message (H = initial
//                        value) instead of continuing the previous one.
//   digest_valid         one-cycle pulse, 22 cycles after the block was
//                        accepted, when `digest` holds H0..H4 (H0 in the
//                        most significant bits) after that block.
module sha1_core
  import sha1_pkg::*;
#(
  parameter int unsigned UNROLL = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         blk_valid,
  output logic         blk_ready,
  input  logic [511:0] blk_data,
  input  logic         blk_first,
  output logic [159:0] digest,
  output logic         digest_valid
);

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} state_e;
  state_e state;

  logic [6:0]  t0;
  sha1_state_t st, st_next;
  word_t       h [5];
  word_t       w [UNROLL];

  wire accept = blk_valid && blk_ready;
  assign blk_ready = (state == S_IDLE);

  sha1_msg_schedule #(.UNROLL(UNROLL)) u_sched (
    .clk     (clk),
    .load    (accept),
    .block   (blk_data),
    .advance (state == S_ROUND),
    .w       (w)
  );

  sha1_round4 #(.UNROLL(UNROLL)) u_rounds (
    .st_in  (st),
    .t0     (t0),
    .w      (w),
    .st_out (st_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      t0           <= '0;
      digest_valid <= 1'b0;
      st           <= '0;
      for (int k = 0; k < 5; k++) h[k] <= H_INIT[k];
    end else begin
      digest_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          state <= S_ROUND;
          t0    <= '0;
          if (blk_first) begin
            for (int k = 0; k < 5; k++) h[k] <= H_INIT[k];
            st <= '{H_INIT[0], H_INIT[1], H_INIT[2], H_INIT[3], H_INIT[4]};
          end else begin
            st <= '{h[0], h[1], h[2], h[3], h[4]};
          end
        end
        S_ROUND: begin
          st <= st_next;
          t0 <= t0 + 7'(UNROLL);
          if (t0 == 7'(ROUNDS - UNROLL)) state <= S_FINAL;
        end
        S_FINAL: begin
          h[0] <= h[0] + st.a;
          h[1] <= h[1] + st.b;
          h[2] <= h[2] + st.c;
          h[3] <= h[3] + st.d;
          h[4] <= h[4] + st.e;
          digest_valid <= 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The digest is published as the core returns to idle.
  a_digest_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                  digest_valid |-> blk_ready)
    else $error("sha1_core: digest_valid outside idle");

  assign digest = {h[0], h[1], h[2], h[3], h[4]};

  initial assert (ROUNDS % UNROLL == 0 && UNROLL >= 1 && UNROLL <= 16)
    else $error("sha1_core: UNROLL must divide 80 and be at most 16");

endmodule

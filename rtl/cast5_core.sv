// cast5_core: CAST5 block cipher as a partially empty pipeline.
//
// A fully unrolled 16-round pipeline would need one set of S-box ROMs and
// adders per round. Here a new 64-bit block enters only every N_SHARE clocks
// (default 8), and each of the STAGES = 16 / N_SHARE round units (default 2)
// is reused for N_SHARE consecutive rounds of the block it holds: unit s
// applies rounds s*N_SHARE + phase, phase = 0..N_SHARE-1, then hands the
// block to unit s+1. All units run in lock step on one free-running phase
// counter, so each S-box is read by STAGES units per clock and one
// multi-ported memory per S-box suffices (4 in all, dual-ported by default).
// Throughput is 64 bits per N_SHARE clocks; the latency is 16 clocks from
// acceptance to out_valid. ECB-style use is assumed: blocks are independent.
//
// The reuse of a pipeline that is only 1/n full, n = 8, one ROM per S-box and
// the 8 clocks per block follow the document. The lock-step phase counter,
// the per-round unit and the handshake are this design's choices.
//
// Interface:
//   in_valid/in_ready  in_ready is high one clock in N_SHARE (phase =
//                      N_SHARE-1); a block is taken when both are high.
//   in_decrypt         run the rounds from last to first (decryption).
//   in_short           12-round mode for keys of 80 bits or less; the unused
//                      round slots leave the block unchanged.
//   out_valid          one-clock pulse with out_block = (R_N, L_N).
//   sk_*, sb_*         write ports of the subkey memory and the four S-box
//                      memories (sb_sel picks S1..S4), loaded before use.
module cast5_core
  import cast5_pkg::*;
#(
  parameter int unsigned ROUNDS  = 16,
  parameter int unsigned N_SHARE = 8,
  localparam int unsigned STAGES = ROUNDS / N_SHARE,
  localparam int unsigned PW     = (N_SHARE > 1) ? $clog2(N_SHARE) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sk_we,
  input  logic [3:0]  sk_waddr,
  input  subkey_t     sk_wdata,
  input  logic        sb_we,
  input  logic [1:0]  sb_sel,
  input  logic [7:0]  sb_waddr,
  input  logic [31:0] sb_wdata,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_block,
  input  logic        in_decrypt,
  input  logic        in_short,
  output logic        out_valid,
  output logic [63:0] out_block
);

  typedef struct packed {
    logic        valid;
    logic        dec;
    logic        short12;
    logic [31:0] l;
    logic [31:0] r;
  } slot_t;

  slot_t       slot [STAGES];
  logic [PW-1:0] phase;

  // Per-unit round signals.
  logic [3:0]  sk_raddr [STAGES];
  subkey_t     sk_rdata [STAGES];
  logic [7:0]  sb_raddr [4][STAGES];
  logic [31:0] sb_rdata [4][STAGES];
  logic [7:0]  u_addr   [STAGES][4];
  logic [31:0] u_data   [STAGES][4];
  ftype_e      u_type   [STAGES];
  logic        u_active [STAGES];
  logic [31:0] u_l [STAGES];
  logic [31:0] u_r [STAGES];
  slot_t       u_next [STAGES];

  cast5_subkey_mem #(.PORTS(STAGES)) u_subkeys (
    .clk   (clk),
    .we    (sk_we),
    .waddr (sk_waddr),
    .wdata (sk_wdata),
    .raddr (sk_raddr),
    .rdata (sk_rdata)
  );

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    cast5_sbox_rom #(.PORTS(STAGES)) u_sbox (
      .clk   (clk),
      .we    (sb_we && sb_sel == 2'(b)),
      .waddr (sb_waddr),
      .wdata (sb_wdata),
      .raddr (sb_raddr[b]),
      .rdata (sb_rdata[b])
    );
  end

  for (genvar s = 0; s < int'(STAGES); s++) begin : g_unit
    logic [4:0] seq, nr, rnum;

    // Position of this clock's round in the block's round sequence, and the
    // round number it stands for (rounds run backwards when decrypting).
    always_comb begin
      seq         = 5'(s * N_SHARE) + 5'(phase);
      nr          = slot[s].short12 ? 5'd12 : 5'(ROUNDS);
      u_active[s] = seq < nr;
      rnum        = slot[s].dec ? nr - seq : seq + 5'd1;
      sk_raddr[s] = 4'(rnum - 5'd1);
      u_type[s]   = ftype_of(rnum);
      for (int b = 0; b < 4; b++) begin
        sb_raddr[b][s] = u_addr[s][b];
        u_data[s][b]   = sb_rdata[b][s];
      end
    end

    cast5_round u_round (
      .l_in      (slot[s].l),
      .r_in      (slot[s].r),
      .key       (sk_rdata[s]),
      .ftype     (u_type[s]),
      .sbox_addr (u_addr[s]),
      .sbox_data (u_data[s]),
      .l_out     (u_l[s]),
      .r_out     (u_r[s])
    );

    always_comb begin
      u_next[s] = slot[s];
      if (u_active[s]) begin
        u_next[s].l = u_l[s];
        u_next[s].r = u_r[s];
      end
    end
  end

  wire last_phase = (phase == PW'(N_SHARE - 1));
  assign in_ready = last_phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_block <= '0;
      for (int s = 0; s < int'(STAGES); s++) slot[s] <= '0;
    end else begin
      out_valid <= 1'b0;
      phase     <= last_phase ? '0 : phase + 1'b1;
      if (last_phase) begin
        // Hand every block on to the next unit; the last one leaves.
        slot[0] <= '{valid: in_valid, dec: in_decrypt, short12: in_short,
                     l: in_block[63:32], r: in_block[31:0]};
        for (int s = 1; s < int'(STAGES); s++) slot[s] <= u_next[s-1];
        out_valid <= u_next[STAGES-1].valid;
        out_block <= {u_next[STAGES-1].r, u_next[STAGES-1].l};
      end else begin
        for (int s = 0; s < int'(STAGES); s++) slot[s] <= u_next[s];
      end
    end
  end

  // Results leave at most once per N_SHARE clocks.
  if (N_SHARE > 1) begin : g_out_rate
    a_out_rate: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid |=> !out_valid)
      else $error("cast5_core: results closer than N_SHARE clocks");
  end

  initial assert (ROUNDS == 16 && N_SHARE >= 1 && ROUNDS % N_SHARE == 0)
    else $error("cast5_core: N_SHARE must divide 16");

endmodule

// ipsec_crypto_top: three IPSec cipher cores side by side.
//
// The RC4 stream cipher, the CAST5 block cipher and the SHA-1 hash are three
// independent engines that share one device but no logic: each has its own
// clock (their critical paths differ widely), its own active-low synchronous
// reset and its own ports, which are those of the cores brought straight
// out. Each core is the looping part of its algorithm only: RC4 key setup
// and keystream generation, the 16 CAST5 rounds with subkeys loaded from
// outside, and the SHA-1 compression of already padded 512-bit blocks.
// Putting the three on one device follows the document; separate clocks and
// resets are this design's choice.
module ipsec_crypto_top
  import cast5_pkg::*;
#(
  parameter int unsigned RC4_KEY_BYTES  = 16,
  parameter int unsigned CAST5_N_SHARE  = 8,
  parameter int unsigned SHA1_UNROLL    = 4,
  localparam int unsigned RC4_KAW       = $clog2(RC4_KEY_BYTES)
) (
  // RC4
  input  logic               rc4_clk,
  input  logic               rc4_rst_n,
  input  logic               rc4_key_we,
  input  logic [RC4_KAW-1:0] rc4_key_waddr,
  input  logic [7:0]         rc4_key_wdata,
  input  logic [RC4_KAW:0]   rc4_key_len,
  input  logic               rc4_start,
  output logic               rc4_ready,
  input  logic               rc4_in_valid,
  input  logic [7:0]         rc4_in_data,
  output logic               rc4_out_valid,
  output logic [7:0]         rc4_out_data,
  // CAST5
  input  logic               cast5_clk,
  input  logic               cast5_rst_n,
  input  logic               cast5_sk_we,
  input  logic [3:0]         cast5_sk_waddr,
  input  subkey_t            cast5_sk_wdata,
  input  logic               cast5_sb_we,
  input  logic [1:0]         cast5_sb_sel,
  input  logic [7:0]         cast5_sb_waddr,
  input  logic [31:0]        cast5_sb_wdata,
  input  logic               cast5_in_valid,
  output logic               cast5_in_ready,
  input  logic [63:0]        cast5_in_block,
  input  logic               cast5_in_decrypt,
  input  logic               cast5_in_short,
  output logic               cast5_out_valid,
  output logic [63:0]        cast5_out_block,
  // SHA-1
  input  logic               sha1_clk,
  input  logic               sha1_rst_n,
  input  logic               sha1_blk_valid,
  output logic               sha1_blk_ready,
  input  logic [511:0]       sha1_blk_data,
  input  logic               sha1_blk_first,
  output logic [159:0]       sha1_digest,
  output logic               sha1_digest_valid
);

  rc4_core #(.KEY_BYTES(RC4_KEY_BYTES)) u_rc4 (
    .clk       (rc4_clk),
    .rst_n     (rc4_rst_n),
    .key_we    (rc4_key_we),
    .key_waddr (rc4_key_waddr),
    .key_wdata (rc4_key_wdata),
    .key_len   (rc4_key_len),
    .start     (rc4_start),
    .ready     (rc4_ready),
    .in_valid  (rc4_in_valid),
    .in_data   (rc4_in_data),
    .out_valid (rc4_out_valid),
    .out_data  (rc4_out_data)
  );

  cast5_core #(.N_SHARE(CAST5_N_SHARE)) u_cast5 (
    .clk        (cast5_clk),
    .rst_n      (cast5_rst_n),
    .sk_we      (cast5_sk_we),
    .sk_waddr   (cast5_sk_waddr),
    .sk_wdata   (cast5_sk_wdata),
    .sb_we      (cast5_sb_we),
    .sb_sel     (cast5_sb_sel),
    .sb_waddr   (cast5_sb_waddr),
    .sb_wdata   (cast5_sb_wdata),
    .in_valid   (cast5_in_valid),
    .in_ready   (cast5_in_ready),
    .in_block   (cast5_in_block),
    .in_decrypt (cast5_in_decrypt),
    .in_short   (cast5_in_short),
    .out_valid  (cast5_out_valid),
    .out_block  (cast5_out_block)
  );

  sha1_core #(.UNROLL(SHA1_UNROLL)) u_sha1 (
    .clk          (sha1_clk),
    .rst_n        (sha1_rst_n),
    .blk_valid    (sha1_blk_valid),
    .blk_ready    (sha1_blk_ready),
    .blk_data     (sha1_blk_data),
    .blk_first    (sha1_blk_first),
    .digest       (sha1_digest),
    .digest_valid (sha1_digest_valid)
  );

endmodule

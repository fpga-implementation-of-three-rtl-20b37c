// rc4_core: RC4 key setup and keystream generation, one byte per clock.
//
// Key setup (after `start`): one clock fills S with the identity and issues
// the first key-RAM read, then 256 clocks run j = j + S[i] + key[i mod len]
// and swap S[i], S[j] for i = 0..255; `ready` then rises with i = j = 0.
// The key byte for the next step is read from the key RAM one clock ahead.
//
// Encryption / decryption (ready high): each clock with `in_valid` makes one
// full RC4 step in a single cycle: i = i+1, a = S[i], j = j+a, b = S[j],
// swap, K = S[(a+b) mod 256]. The swap is written at the clock edge, so K is
// taken from the pre-swap values with the two swapped entries forwarded.
// `out_data` = in_data ^ K appears with `out_valid` on the next clock.
// Every read depends on the one before, so the whole step is one long
// combinational path through three 256-input multiplexers; no parallelism is
// possible. The one-cycle-per-byte register array follows the document; the
// start/ready handshake and the key-length input are this design's own.
//
// Key loading: write key bytes 0..len-1 through key_we/key_waddr/key_wdata,
// set key_len (1..KEY_BYTES, held stable during key setup), pulse `start`.
module rc4_core #(
  parameter int unsigned KEY_BYTES = 16,
  localparam int unsigned KAW      = $clog2(KEY_BYTES)
) (
  input  logic           clk,
  input  logic           rst_n,
  // key memory and key setup
  input  logic           key_we,
  input  logic [KAW-1:0] key_waddr,
  input  logic [7:0]     key_wdata,
  input  logic [KAW:0]   key_len,
  input  logic           start,
  output logic           ready,
  // data stream
  input  logic           in_valid,
  input  logic [7:0]     in_data,
  output logic           out_valid,
  output logic [7:0]     out_data
);

  typedef enum logic [1:0] {R_IDLE, R_INIT, R_KSA, R_READY} state_e;
  state_e state;

  logic [7:0] i, j;
  logic [KAW-1:0] kptr;
  logic [7:0] key_byte;

  logic [7:0] raddr0, raddr1, raddr2;
  logic [7:0] rdata0, rdata1, rdata2;
  logic       s_init, s_we;
  logic [7:0] waddr0, wdata0, waddr1, wdata1;

  rc4_key_ram #(.DEPTH(KEY_BYTES)) u_key (
    .clk   (clk),
    .we    (key_we),
    .waddr (key_waddr),
    .wdata (key_wdata),
    .raddr (kptr),
    .rdata (key_byte)
  );

  rc4_sbox_array u_sbox (
    .clk    (clk),
    .init   (s_init),
    .raddr0 (raddr0),
    .rdata0 (rdata0),
    .raddr1 (raddr1),
    .rdata1 (rdata1),
    .raddr2 (raddr2),
    .rdata2 (rdata2),
    .we     (s_we),
    .waddr0 (waddr0),
    .wdata0 (wdata0),
    .waddr1 (waddr1),
    .wdata1 (wdata1)
  );

  // Next key index, wrapping at the key length.
  logic [KAW-1:0] kptr_next;
  assign kptr_next = ({1'b0, kptr} + 1'b1 >= key_len) ? '0 : kptr + 1'b1;

  // One RC4 step, key setup or keystream, all combinational.
  logic [7:0] i_use, j_new, a, b, t, ks;
  always_comb begin
    i_use    = (state == R_KSA) ? i : i + 8'd1;
    raddr0 = i_use;
    a        = rdata0;
    j_new    = (state == R_KSA) ? j + a + key_byte : j + a;
    raddr1 = j_new;
    b        = rdata1;
    t        = a + b;
    raddr2 = t;
    // S after the swap: S[i] = b, S[j] = a.
    if (t == j_new)      ks = a;
    else if (t == i_use) ks = b;
    else                 ks = rdata2;
    waddr0 = i_use;
    wdata0 = b;
    waddr1 = j_new;
    wdata1 = a;
    s_init = (state == R_INIT);
    s_we   = (state == R_KSA) || (state == R_READY && in_valid);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= R_IDLE;
      i         <= '0;
      j         <= '0;
      kptr      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        state <= R_INIT;
        kptr  <= '0;
      end else begin
        unique case (state)
          R_IDLE: ;
          R_INIT: begin
            state <= R_KSA;
            i     <= '0;
            j     <= '0;
            kptr  <= kptr_next;
          end
          R_KSA: begin
            i    <= i + 8'd1;
            j    <= j_new;
            kptr <= kptr_next;
            if (i == 8'd255) begin
              state <= R_READY;
              j     <= '0;
            end
          end
          R_READY: if (in_valid) begin
            i         <= i_use;
            j         <= j_new;
            out_valid <= 1'b1;
            out_data  <= in_data ^ ks;
          end
          default: state <= R_IDLE;
        endcase
      end
    end
  end

  // A key setup needs a key length the key memory can hold.
  a_key_len: assert property (@(posedge clk) disable iff (!rst_n)
                              start |-> (key_len >= 1 && key_len <= (KAW+1)'(KEY_BYTES)))
    else $error("rc4_core: key_len out of range");

  assign ready = (state == R_READY);

endmodule

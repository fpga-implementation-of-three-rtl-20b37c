// sha1_ref_pkg: plain SHA-1 reference used by the testbenches.
// A straight software model: message padding, the 80-word schedule and the
// 80 sequential rounds, written without the unrolling of the hardware.
package sha1_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef logic [7:0]  byte_q_t [$];
  typedef logic [511:0] blk_q_t [$];

  function automatic w32_t rl(w32_t x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Pad a byte message into 512-bit blocks (first byte in the top bits).
  function automatic blk_q_t pad(byte_q_t msg);
    byte_q_t m = msg;
    blk_q_t  q;
    longint unsigned bits = 64'(msg.size()) * 8;
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    for (int k = 7; k >= 0; k--) m.push_back(bits[8*k +: 8]);
    for (int b = 0; b < m.size() / 64; b++) begin
      logic [511:0] blk;
      for (int k = 0; k < 64; k++) blk[511 - 8*k -: 8] = m[64*b + k];
      q.push_back(blk);
    end
    return q;
  endfunction

  // W_t for t = 0..79 of one block.
  function automatic void expand(logic [511:0] blk, output w32_t w [80]);
    for (int t = 0; t < 16; t++) w[t] = blk[511 - 32*t -: 32];
    for (int t = 16; t < 80; t++) w[t] = rl(w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16], 1);
  endfunction

  // One round on state {a,b,c,d,e}.
  function automatic logic [159:0] round(logic [159:0] s, int t, w32_t wt);
    w32_t a = s[159:128], b = s[127:96], c = s[95:64], d = s[63:32], e = s[31:0];
    w32_t f, k, tmp;
    if (t < 20)      begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
    else if (t < 40) begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
    else if (t < 60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
    else             begin f = b ^ c ^ d;                   k = 32'hCA62C1D6; end
    tmp = rl(a, 5) + f + e + wt + k;
    return {tmp, a, rl(b, 30), c, d};
  endfunction

  function automatic logic [159:0] compress(logic [159:0] h, logic [511:0] blk);
    w32_t w [80];
    logic [159:0] s = h;
    expand(blk, w);
    for (int t = 0; t < 80; t++) s = round(s, t, w[t]);
    for (int k = 0; k < 5; k++) s[32*k +: 32] = s[32*k +: 32] + h[32*k +: 32];
    return s;
  endfunction

  localparam logic [159:0] IV = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;

  function automatic logic [159:0] hash(byte_q_t msg);
    blk_q_t q = pad(msg);
    logic [159:0] h = IV;
    foreach (q[b]) h = compress(h, q[b]);
    return h;
  endfunction

  function automatic byte_q_t str2q(string s);
    byte_q_t q;
    for (int k = 0; k < s.len(); k++) q.push_back(s[k]);
    return q;
  endfunction

endpackage

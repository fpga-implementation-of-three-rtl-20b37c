// rc4_ref_pkg: plain RC4 reference used by the testbenches: the textbook
// key setup and keystream loops on a 256-entry array.
package rc4_ref_pkg;

  typedef logic [7:0] byte_q_t [$];

  function automatic byte_q_t keystream(byte_q_t key, int n);
    logic [7:0] s [256];
    logic [7:0] i, j, tmp;
    byte_q_t out;
    for (int k = 0; k < 256; k++) s[k] = 8'(k);
    j = 0;
    for (int k = 0; k < 256; k++) begin
      j = j + s[k] + key[k % key.size()];
      tmp = s[k]; s[k] = s[j]; s[j] = tmp;
    end
    i = 0; j = 0;
    for (int k = 0; k < n; k++) begin
      i = i + 1;
      j = j + s[i];
      tmp = s[i]; s[i] = s[j]; s[j] = tmp;
      out.push_back(s[8'(s[i] + s[j])]);
    end
    return out;
  endfunction

endpackage

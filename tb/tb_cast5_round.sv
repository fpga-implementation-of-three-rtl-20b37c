// tb_cast5_round: checks one CAST5 round of each type against the reference
// round function, with random S-box tables served by a model memory, random
// halves and random subkeys (rotation amounts 0..31 included).
module tb_cast5_round;
  import cast5_pkg::*;
  import cast5_ref_pkg::*;

  logic [31:0] l_in, r_in, l_out, r_out;
  subkey_t     key;
  ftype_e      ftype;
  logic [7:0]  sbox_addr [4];
  logic [31:0] sbox_data [4];
  int checks = 0, failures = 0;

  cast5_round dut (.*);

  always_comb
    for (int b = 0; b < 4; b++) sbox_data[b] = sbox[b][sbox_addr[b]];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    randomize_tables();
    for (int n = 0; n < 3000; n++) begin
      int rn;
      rn = 1 + $urandom_range(15);
      l_in = $urandom(); r_in = $urandom();
      key = '{km: km[rn-1], kr: kr[rn-1]};
      ftype = ftype_of(5'(rn));
      #1;
      checks++;
      if (l_out != r_in || r_out != (l_in ^ f(rn, r_in))) begin
        failures++;
        $display("FAIL round %0d type %0d", rn, ftype);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

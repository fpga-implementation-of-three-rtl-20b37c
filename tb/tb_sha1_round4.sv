// tb_sha1_round4: checks the four-round combinational block against four
// sequential reference rounds, for random states and message words and for
// every round group t0 = 0, 4, ..., 76 (so all four f/K phases are used).
module tb_sha1_round4;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  sha1_state_t st_in, st_out;
  logic [6:0]  t0;
  word_t       w [4];
  int checks = 0, failures = 0;

  sha1_round4 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 10; rep++) begin
      for (int g = 0; g < 20; g++) begin
        logic [159:0] s, exp;
        s = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
        for (int k = 0; k < 4; k++) w[k] = $urandom();
        st_in = s;
        t0 = 7'(4 * g);
        #1;
        exp = s;
        for (int k = 0; k < 4; k++) exp = round(exp, 4 * g + k, w[k]);
        checks++;
        if (st_out != exp) begin
          failures++;
          $display("FAIL t0=%0d got %h exp %h", t0, st_out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

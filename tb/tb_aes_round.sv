// tb_aes_round: checks the combinational AES round against the reference
// model for random states and keys, in both directions, with and without
// the final-round MixColumns skip, and checks the FIPS-197 appendix B
// round-1 value.
module tb_aes_round;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  block_t st, rk, out;
  dir_e   dir;
  logic   last;
  int     checks = 0, failures = 0;

  aes_round dut (.state_i(st), .round_key_i(rk), .dir_i(dir), .last_i(last), .state_o(out));

  task automatic check(bit [127:0] exp, string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 appendix B: input after initial AddRoundKey, round 1 key
    st = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk = 128'ha0fafe1788542cb123a339392a6c7605;
    dir = DIR_ENC; last = 0; #1;
    check(128'ha49c7ff2689f352b6b5bea43026a5049, "fips round1");
    for (int i = 0; i < 200; i++) begin
      st   = {$urandom, $urandom, $urandom, $urandom};
      rk   = {$urandom, $urandom, $urandom, $urandom};
      last = i[0];
      dir  = i[1] ? DIR_DEC : DIR_ENC;
      #1;
      if (dir == DIR_ENC) check(fwd_round(st, rk, last), "fwd");
      else                check(inv_round(st, rk, last), "inv");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_folded_aes_core: drives one folded AES core through
//   * the FIPS-197 appendix C.1 known answer (encrypt and decrypt),
//   * the SP 800-38A F.1.1/F.2.1 ECB and CBC encryption vectors and the
//     matching decryptions, four blocks back to back,
//   * random keys, IVs and data in all four mode/direction combinations,
//     checked against the reference model with CBC chaining kept in the
//     testbench.
// It also checks that every result appears exactly 10 cycles after its
// start and that back-to-back blocks start every 10 cycles.
module tb_folded_aes_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   key_start = 0, iv_load = 0, start = 0;
  block_t key, iv, din, dout;
  mode_e  mode;
  dir_e   dir;
  logic   key_ready, busy, done;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  folded_aes_core dut (.clk, .rst_n, .key_start_i(key_start), .key_i(key), .key_ready_o(key_ready),
                       .iv_load_i(iv_load), .iv_i(iv), .mode_i(mode), .dir_i(dir),
                       .start_i(start), .din_i(din), .busy_o(busy), .done_o(done), .dout_o(dout));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic setup(bit [127:0] k, bit [127:0] v, mode_e m, dir_e d);
    @(negedge clk);
    key = k; iv = v; mode = m; dir = d; key_start = 1; iv_load = 1;
    @(negedge clk);
    key_start = 0; iv_load = 0;
    while (!key_ready) @(negedge clk);
  endtask

  // Runs n blocks back to back and checks data and timing.
  task automatic run(int n, bit [127:0] k, bit [127:0] v, bit [127:0] ins[], bit [127:0] exps[]);
    int lat;
    for (int b = 0; b < n; b++) begin
      if (b == 0) @(negedge clk);
      chk(!busy, "core free again 10 cycles after the previous start");
      din = ins[b]; start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 30) begin @(negedge clk); lat++; end
      // done is seen one cycle after the result edge
      chk(lat == 10, $sformatf("latency %0d", lat));
      chk(dout == exps[b], $sformatf("block %0d got %h exp %h", b, dout, exps[b]));
    end
  endtask

  bit [127:0] p[4], c_ecb[4], c_cbc[4], ins[], exps[];
  bit [127:0] K, IV, prev;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = 0; iv = 0; din = 0; mode = MODE_ECB; dir = DIR_ENC;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // FIPS-197 C.1
    setup(128'h000102030405060708090a0b0c0d0e0f, 0, MODE_ECB, DIR_ENC);
    ins = '{128'h00112233445566778899aabbccddeeff};
    exps = '{128'h69c4e0d86a7b0430d8cdb78070b4c55a};
    run(1, 0, 0, ins, exps);
    setup(128'h000102030405060708090a0b0c0d0e0f, 0, MODE_ECB, DIR_DEC);
    run(1, 0, 0, exps, ins);
    // SP 800-38A
    K  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    IV = 128'h000102030405060708090a0b0c0d0e0f;
    p  = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
           128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
    c_ecb = '{128'h3ad77bb40d7a3660a89ecaf32466ef97, 128'hf5d3d58503b9699de785895a96fdbaaf,
              128'h43b1cd7f598ece23881b00e3ed030688, 128'h7b0c785e27e8ad3f8223207104725dd4};
    c_cbc = '{128'h7649abac8119b246cee98e9b12e9197d, 128'h5086cb9b507219ee95db113a917678b2,
              128'h73bed6b8e3c1743b7116e69e22229516, 128'h3ff1caa1681fac09120eca307586e1a7};
    setup(K, IV, MODE_ECB, DIR_ENC);  ins = p;     exps = c_ecb; run(4, K, IV, ins, exps);
    setup(K, IV, MODE_ECB, DIR_DEC);  ins = c_ecb; exps = p;     run(4, K, IV, ins, exps);
    setup(K, IV, MODE_CBC, DIR_ENC);  ins = p;     exps = c_cbc; run(4, K, IV, ins, exps);
    setup(K, IV, MODE_CBC, DIR_DEC);  ins = c_cbc; exps = p;     run(4, K, IV, ins, exps);
    // random streams
    for (int t = 0; t < 8; t++) begin
      automatic mode_e m = t[0] ? MODE_CBC : MODE_ECB;
      automatic dir_e  d = t[1] ? DIR_DEC : DIR_ENC;
      K  = {$urandom, $urandom, $urandom, $urandom};
      IV = {$urandom, $urandom, $urandom, $urandom};
      ins = new[5]; exps = new[5];
      prev = IV;
      for (int b = 0; b < 5; b++) begin
        ins[b] = {$urandom, $urandom, $urandom, $urandom};
        if (d == DIR_ENC) begin
          exps[b] = encrypt(K, m == MODE_CBC ? ins[b] ^ prev : ins[b]);
          prev = exps[b];
        end else begin
          exps[b] = decrypt(K, ins[b]) ^ (m == MODE_CBC ? prev : 128'h0);
          prev = ins[b];
        end
      end
      setup(K, IV, m, d);
      run(5, K, IV, ins, exps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

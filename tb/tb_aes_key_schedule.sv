// tb_aes_key_schedule: loads the FIPS-197 appendix A.1 key and random keys,
// checks that ready rises exactly 11 cycles after the start pulse, and
// reads all 11 round keys through both read ports against the reference
// expansion (round key 10 of the FIPS key is d014f9a8c9ee2589e13f0cc8b6630ca6).
module tb_aes_key_schedule;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ready;
  block_t key, ra, rb;
  logic [3:0] aa, ab;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_key_schedule dut (.clk, .rst_n, .key_start_i(start), .key_i(key), .ready_o(ready),
                        .raddr_a_i(aa), .rdata_a_o(ra), .raddr_b_i(ab), .rdata_b_o(rb));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(bit [127:0] k);
    rk_t exp = expand(k);
    int cyc = 0;
    @(negedge clk); key = k; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    chk(!ready, "ready low after start");
    while (!ready && cyc < 50) begin @(negedge clk); cyc++; end
    chk(cyc == 11, $sformatf("init phase length %0d", cyc));
    for (int r = 0; r <= 10; r++) begin
      aa = 4'(r); ab = 4'(10 - r); #1;
      chk(ra == exp[r], $sformatf("port a key %0d", r));
      chk(rb == exp[10-r], $sformatf("port b key %0d", 10 - r));
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aa = 0; ab = 0; key = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f);
    aa = 10; #1;
    chk(ra == 128'h13111d7fe3944a17f307a78b4d2b30c5, "fips A.1 last key");
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    aa = 10; #1;
    chk(ra == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "fips A.1 key 10");
    for (int i = 0; i < 5; i++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

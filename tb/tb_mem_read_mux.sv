// tb_mem_read_mux: writes random 64-bit words into random stream/word
// positions of the read multiplexor and checks, after every write, that
// each stream's 128-bit block equals a testbench copy assembled with word 0
// as the most significant half, and that strobe-less cycles change nothing.
module tb_mem_read_mux;
  import aes_pkg::*;

  localparam int N = 2;
  logic clk = 0, rst_n = 0, v = 0;
  logic [0:0] s = 0, w = 0;
  logic [63:0] d = 0;
  block_t blk [N];
  bit [127:0] exp_b [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mem_read_mux dut (.clk, .rst_n, .cap_valid_i(v), .cap_stream_i(s), .cap_word_i(w),
                    .bus_rdata_i(d), .block_o(blk));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_b[0] = 0; exp_b[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      v = ($urandom % 4) != 0; s = 1'($urandom); w = 1'($urandom); d = {$urandom, $urandom};
      @(posedge clk);
      if (v) begin
        if (w == 0) exp_b[s][127:64] = d; else exp_b[s][63:0] = d;
      end
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (blk[k] !== exp_b[k]) begin
          failures++;
          $display("FAIL stream %0d got %h exp %h", k, blk[k], exp_b[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

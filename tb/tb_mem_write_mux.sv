// tb_mem_write_mux: drives random 128-bit results for both streams and all
// selections and checks the bus write data: the selected 64-bit half (word
// 0 = bits 127:64) when the select is valid, zero otherwise.
module tb_mem_write_mux;
  import aes_pkg::*;

  localparam int N = 2;
  block_t blk [N];
  logic v;
  logic [0:0] s, w;
  logic [63:0] d;
  bit [63:0] e;
  int checks = 0, failures = 0;

  mem_write_mux dut (.block_i(blk), .sel_valid_i(v), .sel_stream_i(s), .sel_word_i(w),
                     .bus_wdata_o(d));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      for (int k = 0; k < N; k++) blk[k] = {$urandom, $urandom, $urandom, $urandom};
      v = 1'($urandom); s = 1'($urandom); w = 1'($urandom);
      #1;
      e = !v ? 64'h0 : (w == 0) ? blk[s][127:64] : blk[s][63:0];
      checks++;
      if (d !== e) begin
        failures++;
        $display("FAIL v=%0d s=%0d w=%0d got %h exp %h", v, s, w, d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

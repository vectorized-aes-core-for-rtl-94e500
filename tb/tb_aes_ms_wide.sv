// tb_aes_ms_wide: the unit with a 128-bit IO bus and the maximum of
// floor(5*128/128) = 5 streams, the configuration that fills a 12.8 Gbit/s
// link at 100 MHz. Each stream reads a block in one slot and writes a
// result in the next, so all 10 slots of the frame are used. All five
// streams run at once with their own keys, IVs, modes and directions; the
// outputs are checked against the reference model, and the test checks
// that frames with all 10 bus slots busy occur and none exceeds 10.
module tb_aes_ms_wide;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int N = 5, BW = 128, AW = 32, LW = 16, NB = 8;

  logic clk = 0, rst_n = 0;
  logic           cfg_start [N];
  block_t         cfg_key [N], cfg_iv [N];
  mode_e          cfg_mode [N];
  dir_e           cfg_dir [N];
  logic [AW-1:0]  cfg_src [N], cfg_dst [N];
  logic [LW-1:0]  cfg_nb [N];
  logic           busy [N], done [N];
  logic           req, we;
  logic [AW-1:0]  addr;
  logic [BW-1:0]  wdata, rdata;
  int checks = 0, failures = 0;
  int frame_req = 0, n_full = 0, max_frame = 0, n_done = 0;

  always #5 clk = ~clk;

  aes_ms_top #(.N_STREAMS(N), .BUS_W(BW)) dut (
    .clk, .rst_n, .cfg_start_i(cfg_start), .cfg_key_i(cfg_key), .cfg_iv_i(cfg_iv),
    .cfg_mode_i(cfg_mode), .cfg_dir_i(cfg_dir), .cfg_src_i(cfg_src), .cfg_dst_i(cfg_dst),
    .cfg_nblocks_i(cfg_nb), .stream_busy_o(busy), .stream_done_o(done),
    .bus_req_o(req), .bus_we_o(we), .bus_addr_o(addr), .bus_wdata_o(wdata), .bus_rdata_i(rdata)
  );

  bus_mem_model #(.BUS_W(BW), .ADDR_W(AW), .DEPTH(256)) mem (
    .clk, .req, .we, .addr, .wdata, .rdata
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.slot_q == 0) frame_req = 0;
    if (req) frame_req++;
    if (dut.u_ctrl.slot_q == 9) begin
      if (frame_req > max_frame) max_frame = frame_req;
      if (frame_req == 10) n_full++;
    end
    for (int s = 0; s < N; s++) if (done[s]) n_done++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [127:0] in_d [N][NB], exp_d [N][NB];

  initial begin
    for (int s = 0; s < N; s++) begin
      bit [127:0] prev;
      cfg_start[s] = 0;
      cfg_key[s]  = {$urandom, $urandom, $urandom, $urandom};
      cfg_iv[s]   = {$urandom, $urandom, $urandom, $urandom};
      cfg_mode[s] = (s % 2) ? MODE_CBC : MODE_ECB;
      cfg_dir[s]  = (s % 4 >= 2) ? DIR_DEC : DIR_ENC;
      cfg_src[s]  = AW'(16 * s);
      cfg_dst[s]  = AW'(128 + 16 * s);
      cfg_nb[s]   = LW'(NB);
      prev = cfg_iv[s];
      for (int b = 0; b < NB; b++) begin
        in_d[s][b] = {$urandom, $urandom, $urandom, $urandom};
        mem.poke(16 * s + b, in_d[s][b]);
        if (cfg_dir[s] == DIR_ENC) begin
          exp_d[s][b] = encrypt(cfg_key[s], cfg_mode[s] == MODE_CBC ? in_d[s][b] ^ prev : in_d[s][b]);
          prev = exp_d[s][b];
        end else begin
          exp_d[s][b] = decrypt(cfg_key[s], in_d[s][b]) ^ (cfg_mode[s] == MODE_CBC ? prev : 128'h0);
          prev = in_d[s][b];
        end
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < N; s++) cfg_start[s] = 1;
    @(negedge clk);
    for (int s = 0; s < N; s++) cfg_start[s] = 0;
    @(negedge clk);
    while (busy[0] || busy[1] || busy[2] || busy[3] || busy[4]) @(negedge clk);
    for (int s = 0; s < N; s++)
      for (int b = 0; b < NB; b++)
        chk(mem.peek(128 + 16 * s + b) == exp_d[s][b],
            $sformatf("stream %0d block %0d got %h exp %h", s, b, mem.peek(128 + 16 * s + b), exp_d[s][b]));
    chk(n_done == N, "one done pulse per stream");
    chk(max_frame == 10, $sformatf("max bus slots per frame %0d", max_frame));
    chk(n_full >= NB - 3, $sformatf("frames with all 10 slots busy: %0d", n_full));
    $display("frames with all 10 bus slots busy: %0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_ms_ctrl: checks the control unit's slot frame with behavioural
// stand-ins for the cores (key ready 11 cycles after key_start, busy for
// the 9 cycles after a start, done pulse 10 cycles after the start).
// Counting cycles from reset, it checks that stream s reads only in frame
// slots 4s and 4s+1 and writes only in 4s+2 and 4s+3, that read and write
// addresses run sequentially from the commanded source and destination,
// that every read is followed one cycle later by a capture strobe for the
// same stream and word, that cores start only in their first slot and
// never before their key is ready, that each stream writes exactly as many
// blocks as commanded, and that the done pulse comes with the last write.
module tb_aes_ms_ctrl;
  import aes_pkg::*;

  localparam int N = 2, AW = 32, LW = 16;
  logic clk = 0, rst_n = 0;
  logic          cfg_start [N];
  logic [AW-1:0] cfg_src [N], cfg_dst [N];
  logic [LW-1:0] cfg_nb [N];
  mode_e         cfg_mode [N], mode [N];
  dir_e          cfg_dir [N], dir [N];
  logic          sbusy [N], sdone [N], key_start [N], iv_load [N];
  logic          key_ready [N], core_busy [N], core_done [N], core_start [N];
  logic          cap_v, wr_v, req, we;
  logic [0:0]    cap_s, wr_s, cap_w, wr_w;
  logic [AW-1:0] addr;

  int checks = 0, failures = 0;
  int cyc = 0;                         // cycles since reset release = slot count

  always #5 clk = ~clk;

  aes_ms_ctrl dut (
    .clk, .rst_n, .cfg_start_i(cfg_start), .cfg_src_i(cfg_src), .cfg_dst_i(cfg_dst),
    .cfg_nblocks_i(cfg_nb), .cfg_mode_i(cfg_mode), .cfg_dir_i(cfg_dir),
    .stream_busy_o(sbusy), .stream_done_o(sdone), .key_start_o(key_start), .iv_load_o(iv_load),
    .mode_o(mode), .dir_o(dir), .key_ready_i(key_ready), .core_busy_i(core_busy),
    .core_done_i(core_done), .core_start_o(core_start),
    .rd_cap_valid_o(cap_v), .rd_cap_stream_o(cap_s), .rd_cap_word_o(cap_w),
    .wr_sel_valid_o(wr_v), .wr_sel_stream_o(wr_s), .wr_sel_word_o(wr_w),
    .bus_req_o(req), .bus_we_o(we), .bus_addr_o(addr)
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  // core stand-ins
  int key_cnt [N], run_cnt [N];
  always_ff @(posedge clk) begin
    for (int s = 0; s < N; s++) begin
      if (key_start[s]) key_cnt[s] <= 11;
      else if (key_cnt[s] > 0) key_cnt[s] <= key_cnt[s] - 1;
      if (core_start[s]) run_cnt[s] <= 10;
      else if (run_cnt[s] > 0) run_cnt[s] <= run_cnt[s] - 1;
    end
  end
  always_comb for (int s = 0; s < N; s++) begin
    key_ready[s] = key_cnt[s] == 0;
    core_busy[s] = run_cnt[s] > 1;
    core_done[s] = run_cnt[s] == 1;
  end

  // expectations
  int unsigned exp_rd [N], exp_wr [N], n_wr_blocks [N], n_starts [N], n_done [N];
  logic prev_req, prev_we;
  logic [0:0] prev_s, prev_w;
  int rd_issued [N];

  always @(posedge clk) if (rst_n) begin
    automatic int slot = cyc % 10;
    automatic int s    = slot / 4;
    automatic int rel  = slot % 4;
    // capture strobe follows each read
    chk(cap_v == (prev_req && !prev_we), "capture strobe one cycle after read");
    if (cap_v) chk(cap_s == prev_s && cap_w == prev_w, "capture stream/word");
    if (req) begin
      chk(slot < 8, $sformatf("request in idle slot %0d", slot));
      if (!we) begin
        chk(rel < 2, $sformatf("read in slot %0d", slot));
        chk(32'(wr_s) == s && 32'(wr_w) == rel, "read stream/word tag");
        chk(addr == exp_rd[s], $sformatf("read address %0d exp %0d", addr, exp_rd[s]));
        exp_rd[s]++;
        rd_issued[s]++;
      end else begin
        chk(rel >= 2, $sformatf("write in slot %0d", slot));
        chk(wr_v && 32'(wr_s) == s && 32'(wr_w) == rel - 2, "write mux select");
        chk(addr == exp_wr[s], $sformatf("write address %0d exp %0d", addr, exp_wr[s]));
        exp_wr[s]++;
        if (rel == 3) n_wr_blocks[s]++;
      end
    end else chk(!wr_v, "no write select without a request");
    for (int t = 0; t < N; t++) begin
      if (core_start[t]) begin
        chk(slot == 4 * t, $sformatf("stream %0d core start in slot %0d", t, slot));
        chk(key_ready[t], "core started before key ready");
        n_starts[t]++;
      end
      if (sdone[t]) begin
        n_done[t]++;
        chk(req && we && 32'(wr_s) == t && rel == 3, "done with last write");
      end
    end
    prev_req <= req; prev_we <= we; prev_s <= wr_v ? wr_s : 1'(s); prev_w <= wr_v ? wr_w : 1'(rel);
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic kick(int s, int unsigned src, int unsigned dst, int nb);
    @(negedge clk);
    cfg_src[s] = src; cfg_dst[s] = dst; cfg_nb[s] = LW'(nb);
    cfg_mode[s] = MODE_CBC; cfg_dir[s] = (s == 1) ? DIR_DEC : DIR_ENC; cfg_start[s] = 1;
    exp_rd[s] = src; exp_wr[s] = dst; n_wr_blocks[s] = 0; n_starts[s] = 0; n_done[s] = 0;
    @(negedge clk);
    cfg_start[s] = 0;
    chk(mode[s] == MODE_CBC && dir[s] == ((s == 1) ? DIR_DEC : DIR_ENC), "mode/dir held");
  endtask

  initial begin
    for (int s = 0; s < N; s++) begin
      cfg_start[s] = 0; cfg_src[s] = 0; cfg_dst[s] = 0; cfg_nb[s] = 0;
      cfg_mode[s] = MODE_ECB; cfg_dir[s] = DIR_ENC; key_cnt[s] = 0; run_cnt[s] = 0;
      exp_rd[s] = 0; exp_wr[s] = 0; rd_issued[s] = 0;
    end
    prev_req = 0; prev_we = 0; prev_s = 0; prev_w = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    kick(0, 100, 300, 7);
    repeat (6) @(negedge clk);
    kick(1, 500, 700, 5);
    while (sbusy[0] || sbusy[1]) @(negedge clk);
    repeat (12) @(negedge clk);
    for (int s = 0; s < N; s++) begin
      automatic int nb = (s == 0) ? 7 : 5;
      chk(n_wr_blocks[s] == nb, $sformatf("stream %0d wrote %0d blocks", s, n_wr_blocks[s]));
      chk(n_starts[s] == nb, $sformatf("stream %0d started %0d blocks", s, n_starts[s]));
      chk(n_done[s] == 1, "one done pulse");
      chk(rd_issued[s] == 2 * nb, "read word count");
    end
    // restart stream 1 with one block while stream 0 idles
    kick(1, 40, 60, 1);
    while (sbusy[1]) @(negedge clk);
    chk(n_wr_blocks[1] == 1 && n_done[1] == 1, "single-block command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

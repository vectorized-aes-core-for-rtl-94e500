// tb_aes_ms_top: end-to-end test of the two-stream AES unit at its default
// parameters (2 streams, 64-bit bus) with a behavioural memory on the bus.
//
// Three rounds run both streams at the same time with different keys:
//   A: stream 0 CBC encrypt, stream 1 ECB decrypt (stream 1 started later)
//   B: stream 0 ECB encrypt, stream 1 CBC decrypt
//   C: stream 0 CBC-decrypts round A's ciphertext back while stream 1
//      CBC-encrypts a new buffer.
// Each output buffer is compared with the reference model. The test also
// checks the schedule: in steady state each stream writes one block every
// 10 cycles, the bus is busy 8 of every 10 cycles, and a result appears
// 10 cycles after its core starts. It counts how often each mechanism
// occurred (each mode/direction, both streams active at once, a core held
// back by its key expansion, read-ahead of the next block while the core
// runs, idle bus slots) and fails any that never did.
module tb_aes_ms_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int N = 2, BW = 64, AW = 32, LW = 16;
  localparam int NB = 12;                       // blocks per stream and round

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
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  aes_ms_top dut (
    .clk, .rst_n, .cfg_start_i(cfg_start), .cfg_key_i(cfg_key), .cfg_iv_i(cfg_iv),
    .cfg_mode_i(cfg_mode), .cfg_dir_i(cfg_dir), .cfg_src_i(cfg_src), .cfg_dst_i(cfg_dst),
    .cfg_nblocks_i(cfg_nb), .stream_busy_o(busy), .stream_done_o(done),
    .bus_req_o(req), .bus_we_o(we), .bus_addr_o(addr), .bus_wdata_o(wdata), .bus_rdata_i(rdata)
  );

  bus_mem_model #(.BUS_W(BW), .ADDR_W(AW), .DEPTH(1024)) mem (
    .clk, .req, .we, .addr, .wdata, .rdata
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_mode [2][2];          // [mode][dir] streams run
  int n_both_active = 0, n_key_wait = 0, n_readahead = 0, n_idle_slot = 0;
  int n_write_gap10 = 0, n_latency10 = 0;
  longint last_wr0 [N];
  longint start_cyc [N];
  // bus occupation per 10-cycle slot frame
  int frame_req = 0, n_full_frames = 0, max_frame = 0;

  always @(posedge clk) if (rst_n) begin
    if (busy[0] && busy[1]) begin
      n_both_active++;
      if (!req) n_idle_slot++;
    end
    if (dut.u_ctrl.slot_q == 0) frame_req = 0;
    if (req) frame_req++;
    if (dut.u_ctrl.slot_q == 9) begin
      if (frame_req > max_frame) max_frame = frame_req;
      if (frame_req == 8) n_full_frames++;
    end
    for (int s = 0; s < N; s++) begin
      if (dut.u_ctrl.st_q[s].active && dut.u_ctrl.st_q[s].in_full && !dut.key_ready[s])
        n_key_wait++;
      if (dut.core_busy[s] && req && !we && dut.u_ctrl.cur_stream == 1'(s))
        n_readahead++;
      if (dut.core_done[s]) begin
        checks++;
        if (cyc - start_cyc[s] == 10) n_latency10++;
        else begin failures++; $display("FAIL latency %0d", cyc - start_cyc[s]); end
      end
      if (dut.core_start[s]) start_cyc[s] = cyc;
      // first word of a block write
      if (req && we && dut.u_ctrl.cur_stream == 1'(s) && dut.u_ctrl.cur_word == 0) begin
        if (last_wr0[s] != 0 && busy[0] && busy[1]) begin
          checks++;
          if (cyc - last_wr0[s] == 10) n_write_gap10++;
          else if (!(dut.u_ctrl.st_q[s].write_left == LW'(NB))) begin
            failures++; $display("FAIL stream %0d write spacing %0d", s, cyc - last_wr0[s]);
          end
        end
        last_wr0[s] = cyc;
      end
    end
  end

  // ---------------- stream helpers ----------------
  bit [127:0] src_data [N][NB];
  bit [127:0] exp_data [N][NB];

  function automatic void load_buf(int unsigned base, bit [127:0] d []);
    for (int b = 0; b < d.size(); b++) begin
      mem.poke(base + 2*b,     d[b][127:64]);
      mem.poke(base + 2*b + 1, d[b][63:0]);
    end
  endfunction

  function automatic bit [127:0] read_blk(int unsigned base, int b);
    return {mem.peek(base + 2*b), mem.peek(base + 2*b + 1)};
  endfunction

  function automatic void model(bit [127:0] k, bit [127:0] iv, mode_e m, dir_e d,
                                 bit [127:0] in [], ref bit [127:0] out []);
    bit [127:0] prev = iv;
    out = new[in.size()];
    for (int b = 0; b < in.size(); b++) begin
      if (d == DIR_ENC) begin
        out[b] = encrypt(k, m == MODE_CBC ? in[b] ^ prev : in[b]);
        prev = out[b];
      end else begin
        out[b] = decrypt(k, in[b]) ^ (m == MODE_CBC ? prev : 128'h0);
        prev = in[b];
      end
    end
  endfunction

  task automatic kick(int s, bit [127:0] k, bit [127:0] iv, mode_e m, dir_e d,
                      int unsigned src, int unsigned dst, int nb);
    @(negedge clk);
    cfg_key[s] = k; cfg_iv[s] = iv; cfg_mode[s] = m; cfg_dir[s] = d;
    cfg_src[s] = src; cfg_dst[s] = dst; cfg_nb[s] = LW'(nb); cfg_start[s] = 1;
    @(negedge clk);
    cfg_start[s] = 0;
    n_mode[m][d]++;
  endtask

  task automatic wait_idle();
    int guard = 0;
    @(negedge clk);
    while ((busy[0] || busy[1]) && guard < 2000) begin @(negedge clk); guard++; end
    chk(guard < 2000, "streams finish");
  endtask

  task automatic compare(int unsigned dst, bit [127:0] e [], string what);
    for (int b = 0; b < e.size(); b++)
      chk(read_blk(dst, b) == e[b], $sformatf("%s block %0d got %h exp %h", what, b, read_blk(dst, b), e[b]));
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [127:0] in0 [], in1 [], out0 [], out1 [], k0, k1, iv0, iv1, inA0 [], expA0 [];
  int done_seen [N];

  always @(posedge clk) for (int s = 0; s < N; s++) if (done[s]) done_seen[s]++;

  initial begin
    for (int s = 0; s < N; s++) begin
      cfg_start[s] = 0; cfg_key[s] = 0; cfg_iv[s] = 0; cfg_mode[s] = MODE_ECB;
      cfg_dir[s] = DIR_ENC; cfg_src[s] = 0; cfg_dst[s] = 0; cfg_nb[s] = 0;
      last_wr0[s] = 0; start_cyc[s] = 0; done_seen[s] = 0;
    end
    n_mode = '{default: 0};
    for (int i = 0; i < 1024; i++) mem.poke(i, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- round A ----
    in0 = new[NB]; in1 = new[NB];
    foreach (in0[b]) in0[b] = {$urandom, $urandom, $urandom, $urandom};
    foreach (in1[b]) in1[b] = {$urandom, $urandom, $urandom, $urandom};
    k0 = {$urandom, $urandom, $urandom, $urandom}; iv0 = {$urandom, $urandom, $urandom, $urandom};
    k1 = {$urandom, $urandom, $urandom, $urandom}; iv1 = {$urandom, $urandom, $urandom, $urandom};
    load_buf(0, in0); load_buf(256, in1);
    model(k0, iv0, MODE_CBC, DIR_ENC, in0, out0);
    model(k1, iv1, MODE_ECB, DIR_DEC, in1, out1);
    inA0 = in0; expA0 = out0;
    kick(0, k0, iv0, MODE_CBC, DIR_ENC, 0, 128, NB);
    repeat (3) @(negedge clk);
    kick(1, k1, iv1, MODE_ECB, DIR_DEC, 256, 384, NB);
    wait_idle();
    compare(128, out0, "A s0 CBC enc");
    compare(384, out1, "A s1 ECB dec");

    // ---- round B ----
    foreach (in0[b]) in0[b] = {$urandom, $urandom, $urandom, $urandom};
    foreach (in1[b]) in1[b] = {$urandom, $urandom, $urandom, $urandom};
    k1 = {$urandom, $urandom, $urandom, $urandom}; iv1 = {$urandom, $urandom, $urandom, $urandom};
    load_buf(512, in0); load_buf(640, in1);
    model(k0, iv0, MODE_ECB, DIR_ENC, in0, out0);
    model(k1, iv1, MODE_CBC, DIR_DEC, in1, out1);
    kick(1, k1, iv1, MODE_CBC, DIR_DEC, 640, 896, NB);
    kick(0, k0, iv0, MODE_ECB, DIR_ENC, 512, 768, NB);
    wait_idle();
    compare(768, out0, "B s0 ECB enc");
    compare(896, out1, "B s1 CBC dec");

    // ---- round C: decrypt round A's stream 0 ciphertext ----
    foreach (in1[b]) in1[b] = {$urandom, $urandom, $urandom, $urandom};
    load_buf(640, in1);
    model(k1, iv1, MODE_CBC, DIR_ENC, in1, out1);
    kick(0, k0, iv0, MODE_CBC, DIR_DEC, 128, 512, NB);
    kick(1, k1, iv1, MODE_CBC, DIR_ENC, 640, 256, NB);
    wait_idle();
    compare(512, inA0, "C s0 CBC dec of A");
    compare(256, out1, "C s1 CBC enc");

    // ---- schedule and mechanism checks ----
    chk(done_seen[0] == 3 && done_seen[1] == 3, "one done pulse per command");
    chk(max_frame == 8, $sformatf("at most 8 of 10 bus slots used per frame (max %0d)", max_frame));
    chk(n_full_frames >= 3 * (NB - 3), $sformatf("steady state at 8/10 bus slots for %0d frames", n_full_frames));
    $display("frames with 8 of 10 bus slots busy: %0d", n_full_frames);
    $display("mechanisms: ECBenc=%0d ECBdec=%0d CBCenc=%0d CBCdec=%0d both=%0d keywait=%0d readahead=%0d idle=%0d gap10=%0d lat10=%0d",
             n_mode[MODE_ECB][DIR_ENC], n_mode[MODE_ECB][DIR_DEC], n_mode[MODE_CBC][DIR_ENC],
             n_mode[MODE_CBC][DIR_DEC], n_both_active, n_key_wait, n_readahead, n_idle_slot,
             n_write_gap10, n_latency10);
    chk(n_mode[MODE_ECB][DIR_ENC] > 0, "ECB encrypt ran");
    chk(n_mode[MODE_ECB][DIR_DEC] > 0, "ECB decrypt ran");
    chk(n_mode[MODE_CBC][DIR_ENC] > 0, "CBC encrypt ran");
    chk(n_mode[MODE_CBC][DIR_DEC] > 0, "CBC decrypt ran");
    chk(n_both_active > 0, "both streams active together");
    chk(n_key_wait > 0, "core held back by key expansion");
    chk(n_readahead > 0, "next block read while the core runs");
    chk(n_idle_slot > 0, "idle bus slots");
    chk(n_write_gap10 > 0, "one block per 10 cycles per stream");
    chk(n_latency10 == 6 * NB, "every block took 10 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

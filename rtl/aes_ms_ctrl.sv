// aes_ms_ctrl: control unit of the multi-stream AES unit.
//
// The cores need 10 cycles per block, and moving one block in and one block
// out over a BUS_W-bit bus takes 2*WPB bus cycles (WPB = 128/BUS_W). The
// control unit therefore runs a fixed 10-cycle slot frame and gives stream
// s the slots base..base+2*WPB-1, base = 2*WPB*s: the first WPB slots read
// the stream's next input block, the next WPB write its last result. With
// the 64-bit bus this is reads in slots 0-1 and writes in 2-3 for stream 0,
// reads in 4-5 and writes in 6-7 for stream 1, and two idle slots: the bus
// is busy 8 cycles out of 10. Core s is started in slot base whenever its
// input buffer is full, so in steady state every core starts one block per
// frame and the unit moves N_STREAMS*128 bits in and out per 10 cycles.
//
// Per stream the host gives a start pulse with the source and destination
// word addresses, the length in blocks, mode and direction (the key and IV
// go straight to the core, which begins its key expansion on the same
// pulse). Reads go ahead while the key schedule is still being built;
// the core is only started once key_ready is high. The stream's done pulse
// comes with its last write. Read data is expected on the bus one cycle
// after the read request; the unit then tells the read multiplexor where it
// goes. Writes carry their data in the request cycle.
//
// The number of streams as a function of the bus width, the fixed 10-cycle
// core pipeline and a small control unit that drives the cores and the
// multiplexors follow the document. The slot frame, the command/address
// interface and the per-stream registers are this design's choices.
module aes_ms_ctrl
  import aes_pkg::*;
#(
  parameter int unsigned N_STREAMS = 2,
  parameter int unsigned BUS_W     = 64,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned LEN_W     = 16,
  localparam int unsigned PERIOD   = NROUNDS,
  localparam int unsigned WPB      = BLOCK_W / BUS_W,
  localparam int unsigned SW       = (N_STREAMS > 1) ? $clog2(N_STREAMS) : 1,
  localparam int unsigned WW       = (WPB > 1) ? $clog2(WPB) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // per-stream commands from the host
  input  logic              cfg_start_i   [N_STREAMS],
  input  logic [ADDR_W-1:0] cfg_src_i     [N_STREAMS],
  input  logic [ADDR_W-1:0] cfg_dst_i     [N_STREAMS],
  input  logic [LEN_W-1:0]  cfg_nblocks_i [N_STREAMS],
  input  mode_e             cfg_mode_i    [N_STREAMS],
  input  dir_e              cfg_dir_i     [N_STREAMS],
  output logic              stream_busy_o [N_STREAMS],
  output logic              stream_done_o [N_STREAMS],
  // core control
  output logic              key_start_o   [N_STREAMS],
  output logic              iv_load_o     [N_STREAMS],
  output mode_e             mode_o        [N_STREAMS],
  output dir_e              dir_o         [N_STREAMS],
  input  logic              key_ready_i   [N_STREAMS],
  input  logic              core_busy_i   [N_STREAMS],
  input  logic              core_done_i   [N_STREAMS],
  output logic              core_start_o  [N_STREAMS],
  // read multiplexor
  output logic              rd_cap_valid_o,
  output logic [SW-1:0]     rd_cap_stream_o,
  output logic [WW-1:0]     rd_cap_word_o,
  // write multiplexor
  output logic              wr_sel_valid_o,
  output logic [SW-1:0]     wr_sel_stream_o,
  output logic [WW-1:0]     wr_sel_word_o,
  // IO bus command
  output logic              bus_req_o,
  output logic              bus_we_o,
  output logic [ADDR_W-1:0] bus_addr_o
);

  if (N_STREAMS * 2 * WPB > PERIOD) begin : g_too_many_streams
    $error("aes_ms_ctrl: %0d streams need more than %0d bus slots per block time", N_STREAMS, PERIOD);
  end
  if (WPB * BUS_W != BLOCK_W) begin : g_bad_bus_width
    $error("aes_ms_ctrl: BUS_W must divide 128");
  end

  typedef struct packed {
    logic              active;     // stream running
    logic [LEN_W-1:0]  fetch_left; // blocks still to read
    logic [LEN_W-1:0]  write_left; // blocks still to write
    logic [ADDR_W-1:0] src;        // next read word address
    logic [ADDR_W-1:0] dst;        // next write word address
    logic              fetching;   // a block read is under way
    logic              writing;    // a block write is under way
    logic              in_full;    // input buffer holds a whole block
    logic              out_ready;  // core result waiting to be written
    mode_e             mode;
    dir_e              dir;
  } stream_t;

  stream_t            st_q [N_STREAMS], st_d [N_STREAMS];
  logic [3:0]         slot_q;
  logic               cap_valid_q;
  logic [SW-1:0]      cap_stream_q;
  logic [WW-1:0]      cap_word_q;
  logic               rd_issue, wr_issue;
  logic [SW-1:0]      cur_stream;
  logic [WW-1:0]      cur_word;
  logic               start_now [N_STREAMS];

  always_comb begin
    rd_issue   = 1'b0;
    wr_issue   = 1'b0;
    cur_stream = '0;
    cur_word   = '0;
    bus_addr_o = '0;
    for (int s = 0; s < N_STREAMS; s++) begin
      int unsigned base, rel;
      logic        rd_win, wr_win;
      base   = 2 * WPB * s;
      rel    = 32'(slot_q) - base;          // wraps to a large value below base
      rd_win = 32'(slot_q) >= base && rel < WPB;
      wr_win = 32'(slot_q) >= base && rel >= WPB && rel < 2 * WPB;
      st_d[s] = st_q[s];

      // core start in the stream's first slot
      start_now[s] = st_q[s].active && st_q[s].in_full && key_ready_i[s] && !core_busy_i[s] &&
                     32'(slot_q) == base;
      if (start_now[s]) st_d[s].in_full = 1'b0;

      // last word of a block read lands in the buffer this cycle
      if (cap_valid_q && cap_stream_q == SW'(s) && cap_word_q == WW'(WPB - 1))
        st_d[s].in_full = 1'b1;

      if (core_done_i[s]) st_d[s].out_ready = 1'b1;

      // read slots
      if (rd_win && st_q[s].active &&
          (st_q[s].fetching ||
           (rel == 0 && st_q[s].fetch_left != '0 && (!st_q[s].in_full || start_now[s])))) begin
        rd_issue     = 1'b1;
        cur_stream   = SW'(s);
        cur_word     = WW'(rel);
        bus_addr_o   = st_q[s].src;
        st_d[s].src  = st_q[s].src + ADDR_W'(1);
        st_d[s].fetching = (rel != WPB - 1);
        if (rel == WPB - 1) st_d[s].fetch_left = st_q[s].fetch_left - LEN_W'(1);
      end

      // write slots
      if (wr_win && st_q[s].active &&
          (st_q[s].writing || (rel == WPB && st_q[s].out_ready))) begin
        wr_issue     = 1'b1;
        cur_stream   = SW'(s);
        cur_word     = WW'(rel - WPB);
        bus_addr_o   = st_q[s].dst;
        st_d[s].dst  = st_q[s].dst + ADDR_W'(1);
        st_d[s].writing = (rel != 2 * WPB - 1);
        if (rel == 2 * WPB - 1) begin
          st_d[s].out_ready  = 1'b0;
          st_d[s].write_left = st_q[s].write_left - LEN_W'(1);
          if (st_q[s].write_left == LEN_W'(1)) st_d[s].active = 1'b0;
        end
      end

      // new command (ignored while the stream is running)
      if (cfg_start_i[s] && !st_q[s].active) begin
        st_d[s] = '0;
        st_d[s].active     = cfg_nblocks_i[s] != '0;
        st_d[s].fetch_left = cfg_nblocks_i[s];
        st_d[s].write_left = cfg_nblocks_i[s];
        st_d[s].src        = cfg_src_i[s];
        st_d[s].dst        = cfg_dst_i[s];
        st_d[s].mode       = cfg_mode_i[s];
        st_d[s].dir        = cfg_dir_i[s];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q       <= '0;
      cap_valid_q  <= 1'b0;
      cap_stream_q <= '0;
      cap_word_q   <= '0;
      for (int s = 0; s < N_STREAMS; s++) st_q[s] <= '0;
    end else begin
      slot_q       <= (slot_q == 4'(PERIOD - 1)) ? 4'd0 : slot_q + 4'd1;
      cap_valid_q  <= rd_issue;
      cap_stream_q <= cur_stream;
      cap_word_q   <= cur_word;
      for (int s = 0; s < N_STREAMS; s++) st_q[s] <= st_d[s];
    end
  end

  always_comb begin
    for (int s = 0; s < N_STREAMS; s++) begin
      key_start_o[s]   = cfg_start_i[s] && !st_q[s].active;
      iv_load_o[s]     = cfg_start_i[s] && !st_q[s].active;
      mode_o[s]        = (cfg_start_i[s] && !st_q[s].active) ? cfg_mode_i[s] : st_q[s].mode;
      dir_o[s]         = (cfg_start_i[s] && !st_q[s].active) ? cfg_dir_i[s]  : st_q[s].dir;
      core_start_o[s]  = start_now[s];
      stream_busy_o[s] = st_q[s].active;
      stream_done_o[s] = wr_issue && cur_stream == SW'(s) && st_q[s].active && !st_d[s].active;
    end
  end

  assign rd_cap_valid_o  = cap_valid_q;
  assign rd_cap_stream_o = cap_stream_q;
  assign rd_cap_word_o   = cap_word_q;
  assign wr_sel_valid_o  = wr_issue;
  assign wr_sel_stream_o = cur_stream;
  assign wr_sel_word_o   = cur_word;
  assign bus_req_o       = rd_issue || wr_issue;
  assign bus_we_o        = wr_issue;

  // A result must have been written out before the core overwrites it.
  for (genvar s = 0; s < N_STREAMS; s++) begin : g_chk
    a_no_result_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                          core_done_i[s] |-> !st_q[s].out_ready);
  end

endmodule

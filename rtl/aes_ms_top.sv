// aes_ms_top: multi-stream AES unit (AES-MS) on a shared IO bus.
//
// A single iterative AES-128 core needs 10 cycles per block but only 4 bus
// cycles of a 64-bit bus to read and write that block, so one CBC stream,
// which cannot overlap its own blocks, leaves the bus mostly idle. This
// unit puts N_STREAMS independent folded AES cores side by side, each with
// its own key, IV, mode (ECB/CBC) and direction, and lets a control unit
// interleave their bus traffic in a fixed 10-cycle slot frame. With the
// default 64-bit bus, two streams keep the bus busy 8 cycles out of 10 and
// the unit delivers 2 x 128 bits per 10 cycles (2.56 Gbit/s at 100 MHz).
// The largest stream count for a bus width is floor(5*BUS_W/128).
//
// Blocks: folded_aes_core (x N_STREAMS), mem_read_mux (IO bus -> core
// input buffers), mem_write_mux (core results -> IO bus) and aes_ms_ctrl.
//
// Interface: per-stream command ports (start pulse, key, IV, mode,
// direction, source and destination word address, length in blocks) with
// busy and done status; and the IO bus master port: bus_req_o/bus_we_o/
// bus_addr_o each cycle, write data on bus_wdata_o with the request, read
// data expected on bus_rdata_i one cycle after a read request. Addresses
// count BUS_W-bit words; block word 0 is its most significant part.
// The organisation (two cores, read and write multiplexors, small control
// unit, 64-bit bus, 10-cycle latency) follows the document; the command
// interface and bus protocol are this design's choices.
module aes_ms_top
  import aes_pkg::*;
#(
  parameter int unsigned N_STREAMS = 2,
  parameter int unsigned BUS_W     = 64,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned LEN_W     = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_start_i   [N_STREAMS],
  input  block_t            cfg_key_i     [N_STREAMS],
  input  block_t            cfg_iv_i      [N_STREAMS],
  input  mode_e             cfg_mode_i    [N_STREAMS],
  input  dir_e              cfg_dir_i     [N_STREAMS],
  input  logic [ADDR_W-1:0] cfg_src_i     [N_STREAMS],
  input  logic [ADDR_W-1:0] cfg_dst_i     [N_STREAMS],
  input  logic [LEN_W-1:0]  cfg_nblocks_i [N_STREAMS],
  output logic              stream_busy_o [N_STREAMS],
  output logic              stream_done_o [N_STREAMS],
  output logic              bus_req_o,
  output logic              bus_we_o,
  output logic [ADDR_W-1:0] bus_addr_o,
  output logic [BUS_W-1:0]  bus_wdata_o,
  input  logic [BUS_W-1:0]  bus_rdata_i
);

  localparam int unsigned WPB = BLOCK_W / BUS_W;
  localparam int unsigned SW  = (N_STREAMS > 1) ? $clog2(N_STREAMS) : 1;
  localparam int unsigned WW  = (WPB > 1) ? $clog2(WPB) : 1;

  logic          key_start [N_STREAMS], iv_load [N_STREAMS], key_ready [N_STREAMS];
  logic          core_start [N_STREAMS], core_busy [N_STREAMS], core_done [N_STREAMS];
  mode_e         mode [N_STREAMS];
  dir_e          dir [N_STREAMS];
  block_t        core_in [N_STREAMS], core_out [N_STREAMS];
  logic          rd_cap_valid, wr_sel_valid;
  logic [SW-1:0] rd_cap_stream, wr_sel_stream;
  logic [WW-1:0] rd_cap_word, wr_sel_word;

  aes_ms_ctrl #(.N_STREAMS(N_STREAMS), .BUS_W(BUS_W), .ADDR_W(ADDR_W), .LEN_W(LEN_W)) u_ctrl (
    .clk, .rst_n,
    .cfg_start_i, .cfg_src_i, .cfg_dst_i, .cfg_nblocks_i, .cfg_mode_i, .cfg_dir_i,
    .stream_busy_o, .stream_done_o,
    .key_start_o (key_start), .iv_load_o (iv_load), .mode_o (mode), .dir_o (dir),
    .key_ready_i (key_ready), .core_busy_i (core_busy), .core_done_i (core_done),
    .core_start_o (core_start),
    .rd_cap_valid_o (rd_cap_valid), .rd_cap_stream_o (rd_cap_stream), .rd_cap_word_o (rd_cap_word),
    .wr_sel_valid_o (wr_sel_valid), .wr_sel_stream_o (wr_sel_stream), .wr_sel_word_o (wr_sel_word),
    .bus_req_o, .bus_we_o, .bus_addr_o
  );

  mem_read_mux #(.N_STREAMS(N_STREAMS), .BUS_W(BUS_W)) u_rd_mux (
    .clk, .rst_n,
    .cap_valid_i (rd_cap_valid), .cap_stream_i (rd_cap_stream), .cap_word_i (rd_cap_word),
    .bus_rdata_i, .block_o (core_in)
  );

  for (genvar s = 0; s < N_STREAMS; s++) begin : g_core
    folded_aes_core u_core (
      .clk, .rst_n,
      .key_start_i (key_start[s]), .key_i (cfg_key_i[s]), .key_ready_o (key_ready[s]),
      .iv_load_i (iv_load[s]), .iv_i (cfg_iv_i[s]),
      .mode_i (mode[s]), .dir_i (dir[s]),
      .start_i (core_start[s]), .din_i (core_in[s]),
      .busy_o (core_busy[s]), .done_o (core_done[s]), .dout_o (core_out[s])
    );
  end

  mem_write_mux #(.N_STREAMS(N_STREAMS), .BUS_W(BUS_W)) u_wr_mux (
    .block_i (core_out), .sel_valid_i (wr_sel_valid), .sel_stream_i (wr_sel_stream),
    .sel_word_i (wr_sel_word), .bus_wdata_o
  );

endmodule

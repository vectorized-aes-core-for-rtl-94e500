// mem_read_mux: memory read multiplexor of the multi-stream AES unit.
//
// Words read from the IO bus arrive BUS_W bits at a time. The control unit
// tells, one cycle after it issued the read (the bus returns read data one
// cycle after the request), which stream and which word of the 128-bit
// block the data belongs to; the word is written into that stream's input
// buffer. Word 0 is the most significant part of the block (AES byte 0
// first). Each buffer feeds the din input of its core, which samples it in
// the cycle the core is started; the next block can already be fetched
// because its first word lands after that edge.
// The routing of the bus into the cores follows the document's block
// diagram; the buffers, word order and capture timing are this design's.
module mem_read_mux
  import aes_pkg::*;
#(
  parameter int unsigned N_STREAMS = 2,
  parameter int unsigned BUS_W     = 64,
  localparam int unsigned WPB      = BLOCK_W / BUS_W,
  localparam int unsigned SW       = (N_STREAMS > 1) ? $clog2(N_STREAMS) : 1,
  localparam int unsigned WW       = (WPB > 1) ? $clog2(WPB) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cap_valid_i,
  input  logic [SW-1:0]    cap_stream_i,
  input  logic [WW-1:0]    cap_word_i,
  input  logic [BUS_W-1:0] bus_rdata_i,
  output block_t           block_o [N_STREAMS]
);

  logic [BUS_W-1:0] buf_q [N_STREAMS][WPB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_STREAMS; s++)
        for (int w = 0; w < WPB; w++) buf_q[s][w] <= '0;
    end else if (cap_valid_i) begin
      buf_q[cap_stream_i][cap_word_i] <= bus_rdata_i;
    end
  end

  always_comb begin
    for (int s = 0; s < N_STREAMS; s++)
      for (int w = 0; w < WPB; w++)
        block_o[s][BLOCK_W-1-w*BUS_W -: BUS_W] = buf_q[s][w];
  end

endmodule

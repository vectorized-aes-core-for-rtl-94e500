// mem_write_mux: memory write multiplexor of the multi-stream AES unit.
//
// Each core keeps its last 128-bit result on its output register. In a
// write slot the control unit selects a stream and a word, and this
// multiplexor puts that BUS_W-bit part of the stream's result on the IO
// bus write data (word 0 = most significant part, AES byte 0 first). It is
// purely combinational; the write data is valid in the same cycle as the
// write request. Outside write slots the data lines are driven with zero.
// The multiplexor itself follows the document's block diagram; the word
// order and the zero idle value are this design's choices.
module mem_write_mux
  import aes_pkg::*;
#(
  parameter int unsigned N_STREAMS = 2,
  parameter int unsigned BUS_W     = 64,
  localparam int unsigned WPB      = BLOCK_W / BUS_W,
  localparam int unsigned SW       = (N_STREAMS > 1) ? $clog2(N_STREAMS) : 1,
  localparam int unsigned WW       = (WPB > 1) ? $clog2(WPB) : 1
) (
  input  block_t           block_i [N_STREAMS],
  input  logic             sel_valid_i,
  input  logic [SW-1:0]    sel_stream_i,
  input  logic [WW-1:0]    sel_word_i,
  output logic [BUS_W-1:0] bus_wdata_o
);

  block_t blk;

  always_comb begin
    blk         = block_i[sel_stream_i];
    bus_wdata_o = '0;
    if (sel_valid_i)
      bus_wdata_o = blk[BLOCK_W-1-32'(sel_word_i)*BUS_W -: BUS_W];
  end

endmodule

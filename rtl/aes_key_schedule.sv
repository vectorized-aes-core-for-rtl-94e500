// aes_key_schedule: AES-128 key expansion with an on-chip round-key memory.
//
// A pulse on key_start_i with the cipher key on key_i starts the core's
// initialization phase. Round key 0 (the key itself) is written at that
// clock edge and round keys 1..10 follow one per cycle, each computed from
// the previous one by next_round_key() with the round constant generated by
// repeated doubling in GF(2^8). ready_o rises 11 cycles after key_start_i
// and stays high until the next key_start_i. The 11 x 128-bit memory has two
// asynchronous read ports, so the round unit can fetch the two keys it needs
// in the first cycle of a block (the initial key and round key 1) at once.
// Storing the whole schedule in one memory read through both of its ports
// follows the document; the one-key-per-cycle expansion, the read timing and
// the reset behaviour are this design's choices.
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_start_i,
  input  block_t     key_i,
  output logic       ready_o,
  input  logic [3:0] raddr_a_i,
  output block_t     rdata_a_o,
  input  logic [3:0] raddr_b_i,
  output block_t     rdata_b_o
);

  block_t     mem [NROUNDS+1];
  block_t     work_q;
  byte_t      rcon_q;
  logic [3:0] idx_q;       // next round key to compute, NROUNDS+1 when done
  logic       busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      work_q <= '0;
      rcon_q <= 8'h01;
      idx_q  <= '0;
      busy_q <= 1'b0;
    end else if (key_start_i) begin
      work_q <= key_i;
      rcon_q <= 8'h01;
      idx_q  <= 4'd1;
      busy_q <= 1'b1;
    end else if (busy_q) begin
      work_q <= next_round_key(work_q, rcon_q);
      rcon_q <= xtime(rcon_q);
      idx_q  <= idx_q + 4'd1;
      if (idx_q == 4'(NROUNDS)) busy_q <= 1'b0;
    end
  end

  // memory write port
  always_ff @(posedge clk) begin
    if (key_start_i)  mem[0]     <= key_i;
    else if (busy_q)  mem[idx_q] <= next_round_key(work_q, rcon_q);
  end

  assign ready_o   = !busy_q && idx_q == 4'(NROUNDS + 1);
  assign rdata_a_o = (raddr_a_i <= 4'(NROUNDS)) ? mem[raddr_a_i] : '0;
  assign rdata_b_o = (raddr_b_i <= 4'(NROUNDS)) ? mem[raddr_b_i] : '0;

endmodule

// folded_aes_core: iterative ("folded") AES-128 engine, one round per clock.
//
// One instance serves one stream. It holds its own key schedule
// (aes_key_schedule) and its own chaining register, so the cores of a
// multi-stream unit know nothing of each other or of how many streams run.
//
// Interface and timing:
//   key_start_i/key_i  load a key; key_ready_o rises 11 cycles later.
//   iv_load_i/iv_i     load the CBC chaining register with the IV.
//   mode_i, dir_i      ECB or CBC, encrypt or decrypt; held stable per stream.
//   start_i/din_i      accepted when busy_o is low. In that same cycle the
//                      initial AddRoundKey and round 1 are computed; rounds
//                      2..10 take the next 9 cycles and the result is
//                      registered on dout_o with a one-cycle done_o pulse.
//                      The latency is therefore 10 cycles and a new block can
//                      start every 10 cycles, back to back.
//   dout_o             holds the last result until the next one is written.
// CBC encryption XORs the plaintext with the chaining register before the
// cipher and stores each ciphertext as the next chaining value. CBC
// decryption XORs the decipher output with the chaining register and keeps
// the ciphertext just consumed as the next chaining value.
// The 10-cycle latency, AES-128, ECB/CBC and encrypt/decrypt follow the
// document; the handshake, the CBC datapath placement and the reset values
// are this design's choices.
module folded_aes_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_start_i,
  input  block_t key_i,
  output logic   key_ready_o,
  input  logic   iv_load_i,
  input  block_t iv_i,
  input  mode_e  mode_i,
  input  dir_e   dir_i,
  input  logic   start_i,
  input  block_t din_i,
  output logic   busy_o,
  output logic   done_o,
  output block_t dout_o
);

  block_t     state_q, chain_q, cin_q, dout_q;
  logic [3:0] rnd_q;          // round computed in the current cycle (2..10)
  logic       busy_q, done_q;

  logic [3:0] ka, kb;
  block_t     rk_a, rk_b;
  block_t     rnd_in, rnd_out, cipher_in;
  logic       last;

  aes_key_schedule u_keys (
    .clk, .rst_n,
    .key_start_i, .key_i,
    .ready_o   (key_ready_o),
    .raddr_a_i (ka), .rdata_a_o (rk_a),
    .raddr_b_i (kb), .rdata_b_o (rk_b)
  );

  // Port a: initial whitening key (start cycle only). Port b: round key.
  always_comb begin
    if (dir_i == DIR_ENC) begin
      ka = 4'd0;
      kb = busy_q ? rnd_q : 4'd1;
    end else begin
      ka = 4'(NROUNDS);
      kb = busy_q ? 4'(NROUNDS) - rnd_q : 4'(NROUNDS - 1);
    end
  end

  always_comb begin
    cipher_in = (mode_i == MODE_CBC && dir_i == DIR_ENC) ? din_i ^ chain_q : din_i;
    rnd_in    = busy_q ? state_q : cipher_in ^ rk_a;
    last      = busy_q && rnd_q == 4'(NROUNDS);
  end

  aes_round u_round (
    .state_i     (rnd_in),
    .round_key_i (rk_b),
    .dir_i,
    .last_i      (last),
    .state_o     (rnd_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      chain_q <= '0;
      cin_q   <= '0;
      dout_q  <= '0;
      rnd_q   <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (iv_load_i) chain_q <= iv_i;
      if (busy_q) begin
        if (last) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
          if (dir_i == DIR_ENC) begin
            dout_q  <= rnd_out;
            chain_q <= rnd_out;
          end else begin
            dout_q  <= (mode_i == MODE_CBC) ? rnd_out ^ chain_q : rnd_out;
            chain_q <= cin_q;
          end
        end else begin
          state_q <= rnd_out;
          rnd_q   <= rnd_q + 4'd1;
        end
      end else if (start_i) begin
        state_q <= rnd_out;
        rnd_q   <= 4'd2;
        busy_q  <= 1'b1;
        cin_q   <= din_i;
      end
    end
  end

  assign busy_o = busy_q;
  assign done_o = done_q;
  assign dout_o = dout_q;

  // A block may only start once the key schedule is complete.
  a_start_needs_key: assert property (@(posedge clk) disable iff (!rst_n)
                                      (start_i && !busy_q) |-> key_ready_o);

endmodule

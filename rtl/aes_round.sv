// aes_round: one AES round, forward or inverse, as pure combinational logic.
//
// This is the datapath of the folded (iterative) AES core: the core feeds
// it the registered state and one round key per cycle.
//   dir = DIR_ENC: SubBytes, ShiftRows, MixColumns (left out when last=1),
//                  AddRoundKey.
//   dir = DIR_DEC: InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns
//                  (left out when last=1). This is the plain inverse cipher,
//                  so decryption uses the encryption round keys in reverse
//                  order and needs no separate decryption key schedule.
// The initial AddRoundKey of either direction is done by the caller.
// The document names AES-128 with encryption and decryption; the round
// structure itself is standard AES, and the choice of the plain inverse
// cipher (rather than the equivalent inverse cipher) is this design's own.
module aes_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t round_key_i,
  input  dir_e   dir_i,
  input  logic   last_i,
  output block_t state_o
);

  block_t fwd_sr, fwd_mc, inv_rk;

  always_comb begin
    fwd_sr  = shift_rows(sub_bytes(state_i));
    fwd_mc  = last_i ? fwd_sr : mix_columns(fwd_sr);
    inv_rk  = inv_sub_bytes(inv_shift_rows(state_i)) ^ round_key_i;
    if (dir_i == DIR_ENC) state_o = fwd_mc ^ round_key_i;
    else                  state_o = last_i ? inv_rk : inv_mix_columns(inv_rk);
  end

endmodule

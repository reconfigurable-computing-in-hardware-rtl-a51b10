// aes_subbytes: AES SubBytes step. Each of the 16 state bytes is replaced by
// its S-box image (multiplicative inverse in GF(2^8) followed by the affine
// transform, computed by aes_pkg::sbox). Purely combinational: the round
// register that feeds it lives in aes128_encrypt.
module aes_subbytes
  import aes_pkg::*;
(
  input  block_t subbytes_in,
  output block_t subbytes_out
);
  always_comb subbytes_out = sub_bytes(subbytes_in);
endmodule

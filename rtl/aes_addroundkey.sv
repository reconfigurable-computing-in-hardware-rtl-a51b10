// aes_addroundkey: AES AddRoundKey step, the bitwise XOR of the 128-bit state
// with the 128-bit round key. Combinational.
module aes_addroundkey
  import aes_pkg::*;
(
  input  block_t data_in,
  input  block_t key_in,
  output block_t data_out
);
  always_comb data_out = data_in ^ key_in;
endmodule

// aes_mixcolumns: AES MixColumns step. Each 4-byte column is multiplied in
// GF(2^8) by the fixed matrix [02 03 01 01; 01 02 03 01; 01 01 02 03;
// 03 01 01 02]. Combinational; multiplication by 02 is a shift with a
// conditional XOR of 0x1b.
module aes_mixcolumns
  import aes_pkg::*;
(
  input  block_t mixcolumns_in,
  output block_t mixcolumns_out
);
  always_comb mixcolumns_out = mix_columns(mixcolumns_in);
endmodule

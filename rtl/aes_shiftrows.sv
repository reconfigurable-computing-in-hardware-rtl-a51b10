// aes_shiftrows: AES ShiftRows step. Row r of the 4x4 byte state is rotated
// left by r byte positions (row 0 stays). Wiring only, combinational.
module aes_shiftrows
  import aes_pkg::*;
(
  input  block_t shiftrows_in,
  output block_t shiftrows_out
);
  always_comb shiftrows_out = shift_rows(shiftrows_in);
endmodule

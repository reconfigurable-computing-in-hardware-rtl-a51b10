// aes_expandkey: on-the-fly AES-128 key expansion.
//
// The block holds the current round key in a register. load_key stores the
// 128-bit cipher key (round key 0) and resets the round-constant counter.
// par_key is the NEXT round key, computed combinationally from the register
// (RotWord, SubWord, Rcon, then the XOR chain across the four words), so that
// the cipher can use it in the same cycle; next_key then moves the register
// forward by one round. After load_key, ten next_key pulses walk through round
// keys 1..10. Timing: par_key is valid one cycle after load_key and changes
// one cycle after each next_key.
module aes_expandkey
  import aes_pkg::*;
(
  input  logic   clock,
  input  logic   reset,
  input  block_t key_128,
  input  logic   load_key,
  input  logic   next_key,
  output block_t par_key,
  output logic [3:0] round     // index of par_key (1..10)
);
  block_t cur_key;
  byte_t  rc;

  always_ff @(posedge clock) begin
    if (reset) begin
      cur_key <= '0;
      rc      <= 8'h01;
      round   <= 4'd1;
    end else if (load_key) begin
      cur_key <= key_128;
      rc      <= 8'h01;
      round   <= 4'd1;
    end else if (next_key) begin
      cur_key <= par_key;
      rc      <= xtime(rc);
      round   <= round + 4'd1;
    end
  end

  always_comb par_key = next_round_key(cur_key, rc);
endmodule

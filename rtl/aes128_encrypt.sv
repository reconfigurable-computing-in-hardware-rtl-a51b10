// aes128_encrypt: iterative AES-128 encryption core, one round per clock.
//
// The data path is the loop of the round-step blocks: the state register
// feeds SubBytes, ShiftRows, MixColumns and AddRoundKey, whose output is
// written back into the state register; aes_expandkey supplies each round key
// as it is needed, so no key table is stored. The final (tenth) round takes
// the ShiftRows output past MixColumns, as the standard requires.
//
// Interface: key_load stores key_in (it may be given while idle; the key is
// kept for any number of blocks). start with plaintext_in begins a block;
// busy is high while rounds run; done pulses for one cycle with
// ciphertext_out valid, and ciphertext_out holds until the next start.
// Latency: done comes 11 cycles after start (1 initial AddRoundKey + 10
// rounds); a new start is accepted in the cycle after done.
module aes128_encrypt
  import aes_pkg::*;
(
  input  logic   clock,
  input  logic   reset,
  input  block_t key_in,
  input  logic   key_load,
  input  block_t plaintext_in,
  input  logic   start,
  output block_t ciphertext_out,
  output logic   busy,
  output logic   done
);
  block_t key_reg;
  block_t state;
  block_t sb_out, sr_out, mc_out, ark_in, ark_out, round_key;
  logic [3:0] round;
  logic       load_rk, next_rk;

  aes_subbytes    u_sub (.subbytes_in(state),   .subbytes_out(sb_out));
  aes_shiftrows   u_sr  (.shiftrows_in(sb_out), .shiftrows_out(sr_out));
  aes_mixcolumns  u_mc  (.mixcolumns_in(sr_out), .mixcolumns_out(mc_out));
  aes_addroundkey u_ark (.data_in(ark_in), .key_in(round_key), .data_out(ark_out));
  aes_expandkey   u_key (.clock, .reset, .key_128(key_reg), .load_key(load_rk),
                         .next_key(next_rk), .par_key(round_key), .round);

  always_comb ark_in = (round == 4'd10) ? sr_out : mc_out;

  assign load_rk = start && !busy;
  assign next_rk = busy;

  always_ff @(posedge clock) begin
    if (reset) begin
      key_reg        <= '0;
      state          <= '0;
      ciphertext_out <= '0;
      busy           <= 1'b0;
      done           <= 1'b0;
    end else begin
      done <= 1'b0;
      if (key_load && !busy) key_reg <= key_in;
      if (start && !busy) begin
        state <= plaintext_in ^ key_reg;      // round 0 AddRoundKey
        busy  <= 1'b1;
      end else if (busy) begin
        state <= ark_out;
        if (round == 4'd10) begin
          busy           <= 1'b0;
          done           <= 1'b1;
          ciphertext_out <= ark_out;
        end
      end
    end
  end
endmodule

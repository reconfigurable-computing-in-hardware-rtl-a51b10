// aes128_decrypt: iterative AES-128 decryption core, one inverse round per
// clock, the encryption process run backwards.
//
// Round keys are produced on the fly in reverse order. key_load starts a
// 10-cycle forward pass of the key schedule that leaves round key 10 in a
// register (busy is high meanwhile). Each block then begins with
// AddRoundKey(round key 10); every inverse round applies InvShiftRows,
// InvSubBytes, AddRoundKey with the previous round key (derived from the
// current one by running the key schedule backwards) and InvMixColumns,
// which the last round omits.
//
// Interface: key_load with key_in (only while idle); start with
// ciphertext_in; done pulses with plaintext_out valid, which holds until the
// next start. Latency: 10 cycles after key_load, 11 cycles from start to done.
module aes128_decrypt
  import aes_pkg::*;
(
  input  logic   clock,
  input  logic   reset,
  input  block_t key_in,
  input  logic   key_load,
  input  block_t ciphertext_in,
  input  logic   start,
  output block_t plaintext_out,
  output logic   busy,
  output logic   done
);
  typedef enum logic [1:0] {IDLE, EXPAND, ROUNDS} dstate_t;
  dstate_t st;

  block_t last_key;   // round key 10
  block_t cur_key;    // round key of the current step
  block_t state;
  byte_t  rc;         // round constant of the step between cur_key and its neighbour
  logic [3:0] round;
  block_t prev_key, after_ark;

  always_comb begin
    prev_key  = prev_round_key(cur_key, rc);
    after_ark = inv_sub_bytes(inv_shift_rows(state)) ^ prev_key;
  end

  assign busy = (st != IDLE);

  always_ff @(posedge clock) begin
    if (reset) begin
      st            <= IDLE;
      last_key      <= '0;
      cur_key       <= '0;
      state         <= '0;
      rc            <= 8'h01;
      round         <= '0;
      plaintext_out <= '0;
      done          <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: begin
          if (key_load) begin
            cur_key <= key_in;
            rc      <= 8'h01;
            round   <= 4'd1;
            st      <= EXPAND;
          end else if (start) begin
            state   <= ciphertext_in ^ last_key;
            cur_key <= last_key;
            rc      <= 8'h36;                 // Rcon of step 10
            round   <= 4'd1;
            st      <= ROUNDS;
          end
        end
        EXPAND: begin
          cur_key <= next_round_key(cur_key, rc);
          rc      <= xtime(rc);
          round   <= round + 4'd1;
          if (round == 4'd10) begin
            last_key <= next_round_key(cur_key, rc);
            st       <= IDLE;
          end
        end
        ROUNDS: begin
          cur_key <= prev_key;
          rc      <= {1'b0, rc[7:1]} ^ (rc[0] ? 8'h8d : 8'h00);  // divide by x
          round   <= round + 4'd1;
          if (round == 4'd10) begin
            state         <= after_ark;
            plaintext_out <= after_ark;
            done          <= 1'b1;
            st            <= IDLE;
          end else begin
            state <= inv_mix_columns(after_ark);
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

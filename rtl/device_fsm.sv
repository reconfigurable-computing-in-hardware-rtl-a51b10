// device_fsm: the device control FSM of the secure SD storage device.
//
// It runs the main flow: after power-up and a 200 ms wait it shows the device
// name, asks for ENTER, then for the access PIN (up to 16 characters, each
// echoed as '*', padded with '*' to 16). The PIN is compared byte by byte
// with the one kept in the external SRAM (addresses 0..15). After 3 wrong
// PINs the device is blocked for 30 s, then asks again. With the right PIN
// it offers the operation menu:
//   '2' store (PC to SD card): ask for the encrypt PIN, which becomes the
//       AES-128 key (its 16 characters, never stored); then receive the block
//       count N (one byte) and N x 512 bytes; each 16 bytes are encrypted and
//       written to the card, data block k going to card block k (1..N).
//       After the data, card block 0 receives a header: AES_key(FILE_MAGIC)
//       in bytes 0..15 and N in byte 16.
//   '1' read (SD card to PC): ask for the decrypt PIN, load it as the key,
//       read the header and decrypt its first 16 bytes. If they are not
//       FILE_MAGIC the PIN is wrong; after 3 wrong decrypt PINs the device is
//       blocked for 60 s. Otherwise it sends N (one byte), then blocks 1..N
//       decrypted, 16 bytes at a time.
//   '3' exit, back to the device name. Other keys give an error message.
// Each step shows its status on the LCD (a screen number for the LCD RAM)
// and sends its terminal message through uart_msg_sender (start/ready).
//
// The received bytes of a store are collected by a separate capture
// register, so bytes keep arriving while the previous 16 are encrypted and
// written to the card. The header check of the decrypt PIN, the block count
// byte and the card layout are choices of this design: the PIN may not be
// stored, so a known block encrypted with it is what can verify it.
//
// Timing parameters are in milliseconds of a CLK_HZ clock.
module device_fsm
  import device_pkg::*;
  import aes_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned INIT_MS    = 200,
  parameter int unsigned TITLE_MS   = 2_000,
  parameter int unsigned BLOCK1_MS  = 30_000,
  parameter int unsigned BLOCK2_MS  = 60_000,
  parameter int unsigned MAX_FAILS  = 3
) (
  input  logic        clock,
  input  logic        reset,
  // UART controller
  output logic [7:0]  tx_data,
  output logic        tx_data_enable,
  input  logic        tx_chn_ready,
  input  logic [7:0]  rx_data,
  input  logic        rx_data_enable,
  // LCD: screen number in the LCD RAM
  output lcd_msg_t    lcd_msg,
  // SRAM controller
  output logic [9:0]  sram_addr,
  output logic        sram_rd,
  input  logic        sram_busy,
  input  logic [7:0]  sram_data,
  // AES-128 encryption core
  output block_t      enc_key,
  output logic        enc_key_load,
  output block_t      enc_data,
  output logic        enc_start,
  input  logic        enc_done,
  input  block_t      enc_result,
  // AES-128 decryption core
  output block_t      dec_key,
  output logic        dec_key_load,
  input  logic        dec_busy,
  output block_t      dec_data,
  output logic        dec_start,
  input  logic        dec_done,
  input  block_t      dec_result,
  // SD card controller
  output logic [7:0]  sd_data_in,
  output logic        sd_data_mode,
  output logic        sd_wr,
  output logic        sd_rd,
  output logic [31:0] sd_block_addr,
  input  logic [7:0]  sd_data_out,
  input  logic        sd_data_out_valid,
  input  logic        sd_ready,
  input  logic        sd_init_done,
  input  logic        sd_error,
  // status
  output logic        blocked,
  output logic        authenticated
);
  function automatic longint unsigned ms2cyc(longint unsigned ms);
    return (ms * longint'(CLK_HZ)) / 64'd1000;
  endfunction
  localparam longint unsigned T_INIT  = ms2cyc(64'(INIT_MS));
  localparam longint unsigned T_TITLE = ms2cyc(64'(TITLE_MS));
  localparam longint unsigned T_BLK1  = ms2cyc(64'(BLOCK1_MS));
  localparam longint unsigned T_BLK2  = ms2cyc(64'(BLOCK2_MS));
  localparam int unsigned TW = $clog2(T_BLK2 + 2);

  typedef enum logic [1:0] {PIN_AUTH, PIN_ENC, PIN_DEC} pin_kind_t;

  typedef enum logic [5:0] {
    P_INIT, P_TITLE, P_TITLE_WAIT, P_PRESS, P_WAIT_ENTER,
    P_PIN_PROMPT, P_PIN_COLLECT, P_PIN_ECHO, P_PIN_DONE,
    P_SRAM_REQ, P_SRAM_WAIT, P_AUTH_RESULT, P_BLOCK_WAIT,
    P_MENU, P_MENU_KEY,
    P_ENC_KEY, P_ENC_HDR, P_ENC_MSG, P_ENC_COUNT,
    P_SD_CMD, P_SD_OPEN, P_WR_HDR, P_WR_WAIT_RX, P_WR_ENC, P_WR_BYTES, P_SD_CLOSE,
    P_DEC_KEY, P_RD_HDR, P_RD_HDR_DEC, P_RD_HDR_CHK, P_RD_COUNT,
    P_RD_PULL, P_RD_DEC, P_RD_OUT,
    P_DONE, P_OP_ERROR, P_MSG, P_RAW
  } pstate_t;

  pstate_t    st, after;          // after: where P_MSG / P_RAW / P_SD_* continue
  pin_kind_t  pin_kind;
  logic [TW-1:0] timer;
  logic [127:0]  pin;             // entered PIN, first character in [127:120]
  logic [4:0]    pin_len;
  logic [4:0]    idx;
  logic          mismatch;
  logic [1:0]    fails1, fails2;
  logic [7:0]    n_blocks, blk;
  logic [5:0]    chunk;           // 16-byte chunk within a 512-byte block
  logic [9:0]    sd_cnt;          // bytes moved in the current card block
  logic          sd_write_op;     // current card command is a write
  logic [127:0]  hdr_ct;          // encrypted FILE_MAGIC
  logic [127:0]  buf16;           // 16 bytes on their way through AES
  logic [7:0]    raw_byte;
  // message sender
  logic          msg_start, msg_ready, snd_tx_en;
  logic [3:0]    msg_id;
  logic [7:0]    snd_tx_data;
  // capture of received data bytes during a store
  logic          capture;
  logic [127:0]  rx_buf;
  logic [4:0]    rx_cnt;
  logic          rx_take;         // main FSM takes the 16 captured bytes

  uart_msg_sender u_msg (
    .clock, .reset, .start(msg_start), .msg_id, .ready(msg_ready), .busy(),
    .tx_data(snd_tx_data), .tx_data_enable(snd_tx_en), .tx_chn_ready);

  // UART transmit: message sender or a single raw byte
  assign tx_data_enable = snd_tx_en || (st == P_RAW && tx_chn_ready);
  assign tx_data        = snd_tx_en ? snd_tx_data : raw_byte;

  assign blocked       = (st == P_BLOCK_WAIT);
  assign enc_data      = buf16;
  assign dec_data      = buf16;
  assign enc_key       = pin;
  assign dec_key       = pin;

  // capture register: 16 received bytes at a time
  always_ff @(posedge clock) begin
    if (reset || !capture) begin
      rx_cnt <= '0;
      rx_buf <= '0;
    end else begin
      if (rx_take) rx_cnt <= '0;
      if (rx_data_enable && rx_cnt != 5'd16) begin
        rx_buf <= {rx_buf[119:0], rx_data};
        rx_cnt <= (rx_take ? 5'd0 : rx_cnt) + 5'd1;
      end
    end
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      st            <= P_INIT;
      after         <= P_INIT;
      pin_kind      <= PIN_AUTH;
      timer         <= TW'(T_INIT);
      pin           <= '0;
      pin_len       <= '0;
      idx           <= '0;
      mismatch      <= 1'b0;
      fails1        <= '0;
      fails2        <= '0;
      n_blocks      <= '0;
      blk           <= '0;
      chunk         <= '0;
      sd_cnt        <= '0;
      sd_write_op   <= 1'b0;
      hdr_ct        <= '0;
      buf16         <= '0;
      raw_byte      <= '0;
      msg_start     <= 1'b0;
      msg_id        <= '0;
      lcd_msg       <= LCD_NAME;
      sram_addr     <= '0;
      sram_rd       <= 1'b0;
      enc_key_load  <= 1'b0;
      enc_start     <= 1'b0;
      dec_key_load  <= 1'b0;
      dec_start     <= 1'b0;
      sd_data_in    <= '0;
      sd_data_mode  <= 1'b0;
      sd_wr         <= 1'b0;
      sd_rd         <= 1'b0;
      sd_block_addr <= '0;
      capture       <= 1'b0;
      rx_take       <= 1'b0;
      authenticated <= 1'b0;
    end else begin
      msg_start    <= 1'b0;
      sram_rd      <= 1'b0;
      enc_key_load <= 1'b0;
      enc_start    <= 1'b0;
      dec_key_load <= 1'b0;
      dec_start    <= 1'b0;
      sd_wr        <= 1'b0;
      sd_rd        <= 1'b0;
      rx_take      <= 1'b0;

      unique case (st)
        // ---------------- power-up, title ----------------
        P_INIT: begin
          lcd_msg <= LCD_NAME;
          if (timer == '0) begin
            msg_id <= MSG_TITLE; msg_start <= 1'b1; after <= P_TITLE_WAIT;
            timer  <= TW'(T_TITLE);
            st     <= P_MSG;
          end else timer <= timer - 1'b1;
        end
        P_TITLE: begin                               // title again after exit
          lcd_msg <= LCD_NAME;
          authenticated <= 1'b0;
          msg_id <= MSG_TITLE; msg_start <= 1'b1; after <= P_TITLE_WAIT;
          timer  <= TW'(T_TITLE);
          st     <= P_MSG;
        end
        P_TITLE_WAIT: begin
          if (timer == '0) st <= P_PRESS;
          else timer <= timer - 1'b1;
        end
        P_PRESS: begin
          lcd_msg <= LCD_CONNECTED;
          msg_id <= MSG_PRESS_ENTER; msg_start <= 1'b1; after <= P_WAIT_ENTER;
          st     <= P_MSG;
        end
        P_WAIT_ENTER: begin
          if (rx_data_enable && rx_data == KEY_CR) begin
            pin_kind <= PIN_AUTH;
            st       <= P_PIN_PROMPT;
          end
        end

        // ---------------- PIN entry (access, encrypt or decrypt PIN) ----------------
        P_PIN_PROMPT: begin
          pin     <= {16{PIN_PAD}};
          pin_len <= '0;
          unique case (pin_kind)
            PIN_AUTH: begin msg_id <= MSG_ENTER_PIN; lcd_msg <= LCD_ENTER_PIN; end
            PIN_ENC:  msg_id <= MSG_ENTER_ENC;
            default:  msg_id <= MSG_ENTER_DEC;
          endcase
          msg_start <= 1'b1; after <= P_PIN_COLLECT;
          st        <= P_MSG;
        end
        P_PIN_COLLECT: begin
          if (rx_data_enable) begin
            if (rx_data == KEY_CR) st <= P_PIN_DONE;
            else if (pin_len != 5'd16) begin
              pin[127 - 8*pin_len -: 8] <= rx_data;
              pin_len  <= pin_len + 5'd1;
              raw_byte <= PIN_PAD;                   // echo '*'
              after    <= P_PIN_COLLECT;
              st       <= P_RAW;
            end
          end
        end
        P_PIN_DONE: begin
          unique case (pin_kind)
            PIN_AUTH: begin idx <= '0; mismatch <= 1'b0; st <= P_SRAM_REQ; end
            PIN_ENC:  begin enc_key_load <= 1'b1; st <= P_ENC_KEY; end
            default:  begin dec_key_load <= 1'b1; st <= P_DEC_KEY; end
          endcase
        end

        // ---------------- access PIN check against the SRAM ----------------
        P_SRAM_REQ: begin
          if (!sram_busy) begin
            sram_addr <= {5'd0, idx};
            sram_rd   <= 1'b1;
            st        <= P_SRAM_WAIT;
          end
        end
        P_SRAM_WAIT: begin
          if (!sram_busy && !sram_rd) begin
            if (sram_data != pin[127 - 8*idx[3:0] -: 8]) mismatch <= 1'b1;
            if (idx == 5'd15) st <= P_AUTH_RESULT;
            else begin idx <= idx + 5'd1; st <= P_SRAM_REQ; end
          end
        end
        P_AUTH_RESULT: begin
          if (!mismatch) begin
            fails1        <= '0;
            authenticated <= 1'b1;
            lcd_msg       <= LCD_CORRECT;
            msg_id <= MSG_CORRECT; msg_start <= 1'b1; after <= P_MENU;
          end else if (fails1 == 2'(MAX_FAILS - 1)) begin
            fails1  <= '0;
            lcd_msg <= LCD_BLOCKED;
            timer   <= TW'(T_BLK1);
            msg_id <= MSG_WAIT_30; msg_start <= 1'b1; after <= P_BLOCK_WAIT;
          end else begin
            fails1  <= fails1 + 2'd1;
            lcd_msg <= LCD_INCORRECT;
            msg_id <= MSG_INCORRECT; msg_start <= 1'b1; after <= P_PIN_PROMPT;
          end
          st <= P_MSG;
        end
        P_BLOCK_WAIT: begin
          if (timer == '0) st <= P_PIN_PROMPT;       // same PIN kind again
          else timer <= timer - 1'b1;
        end

        // ---------------- operation menu ----------------
        P_MENU: begin
          capture <= 1'b0;
          msg_id <= MSG_MENU; msg_start <= 1'b1; after <= P_MENU_KEY;
          st     <= P_MSG;
        end
        P_MENU_KEY: begin
          if (rx_data_enable) begin
            if (rx_data == "1") begin
              lcd_msg <= LCD_READ; pin_kind <= PIN_DEC; st <= P_PIN_PROMPT;
            end else if (rx_data == "2") begin
              lcd_msg <= LCD_STORE; pin_kind <= PIN_ENC; st <= P_PIN_PROMPT;
            end else if (rx_data == "3") begin
              msg_id <= MSG_BYE; msg_start <= 1'b1; after <= P_TITLE; st <= P_MSG;
            end else begin
              msg_id <= MSG_OP_ERROR; msg_start <= 1'b1; after <= P_MENU; st <= P_MSG;
            end
          end
        end

        // ---------------- store: PC -> AES -> SD card ----------------
        P_ENC_KEY: begin                             // key loaded, encrypt the magic
          if (!sd_init_done) st <= P_OP_ERROR;
          else begin
            buf16     <= FILE_MAGIC;
            enc_start <= 1'b1;
            st        <= P_ENC_HDR;
          end
        end
        P_ENC_HDR: if (enc_done) begin
          hdr_ct  <= enc_result;
          lcd_msg <= LCD_ENCRYPTING;
          msg_id <= MSG_ENCRYPTING; msg_start <= 1'b1; after <= P_ENC_COUNT;
          st     <= P_MSG;
        end
        P_ENC_COUNT: begin
          if (rx_data_enable) begin
            n_blocks      <= rx_data;
            capture       <= 1'b1;
            sd_write_op   <= 1'b1;
            blk           <= '0;
            chunk         <= '0;
            sd_cnt        <= '0;
            st            <= P_WR_WAIT_RX;
          end
        end
        P_WR_HDR: begin                              // header block bytes
          if (sd_ready && !sd_wr) begin
            sd_wr      <= 1'b1;
            sd_data_in <= (sd_cnt < 10'd16) ? hdr_ct[127 - 8*sd_cnt[3:0] -: 8] :
                          (sd_cnt == 10'd16) ? n_blocks : 8'h00;
            sd_cnt     <= sd_cnt + 10'd1;
            if (sd_cnt == 10'd511) begin after <= P_DONE; st <= P_SD_CLOSE; end
          end
        end
        P_WR_WAIT_RX: begin
          if (sd_error) st <= P_OP_ERROR;
          else if (sd_cnt == 10'd0 && chunk == 6'd0 && blk == n_blocks) begin
            capture       <= 1'b0;                   // all data in: write the header
            sd_block_addr <= '0;
            after         <= P_WR_HDR;
            st            <= P_SD_CMD;
          end
          else if (sd_cnt == 10'd0 && chunk == 6'd0) begin
            blk           <= blk + 8'd1;             // open the next card block
            sd_block_addr <= {24'd0, blk + 8'd1};
            after         <= P_WR_WAIT_RX;
            chunk         <= 6'd32;                  // marks "block open"
            st            <= P_SD_CMD;
          end else if (rx_cnt == 5'd16 && !rx_take) begin
            buf16     <= rx_buf;
            rx_take   <= 1'b1;
            enc_start <= 1'b1;
            st        <= P_WR_ENC;
          end
        end
        P_WR_ENC: if (enc_done) begin
          buf16 <= enc_result;
          idx   <= '0;
          st    <= P_WR_BYTES;
        end
        P_WR_BYTES: begin
          if (sd_ready && !sd_wr) begin
            sd_wr      <= 1'b1;
            sd_data_in <= buf16[127 - 8*idx[3:0] -: 8];
            sd_cnt     <= sd_cnt + 10'd1;
            idx        <= idx + 5'd1;
            if (idx == 5'd15) begin
              chunk <= chunk - 6'd1;
              if (sd_cnt == 10'd511) begin after <= P_WR_WAIT_RX; st <= P_SD_CLOSE; end
              else st <= P_WR_WAIT_RX;
            end
          end
        end

        // ---------------- card command helpers ----------------
        P_SD_CMD: begin                              // start CMD17 / CMD24
          if (sd_ready && !sd_data_mode) begin
            if (sd_write_op) sd_wr <= 1'b1; else sd_rd <= 1'b1;
            sd_cnt <= '0;
            st     <= P_SD_OPEN;
          end
        end
        P_SD_OPEN: begin
          sd_data_mode <= 1'b1;
          st           <= after;
        end
        P_SD_CLOSE: begin                            // last byte given: finish block
          if (!sd_wr && !sd_rd) begin
            sd_data_mode <= 1'b0;
            sd_cnt       <= '0;
          end
          if (!sd_data_mode && sd_ready) st <= after;
          else if (!sd_data_mode && sd_error) st <= P_OP_ERROR;
        end

        // ---------------- read: SD card -> AES -> PC ----------------
        P_DEC_KEY: begin
          if (!sd_init_done) st <= P_OP_ERROR;
          else if (!dec_busy && !dec_key_load) begin
            sd_write_op   <= 1'b0;
            sd_block_addr <= '0;
            after         <= P_RD_HDR;
            st            <= P_SD_CMD;
          end
        end
        P_RD_HDR: begin                              // read all of block 0
          if (sd_data_out_valid) begin
            if (sd_cnt < 10'd16) buf16 <= {buf16[119:0], sd_data_out};
            if (sd_cnt == 10'd16) n_blocks <= sd_data_out;
            sd_cnt <= sd_cnt + 10'd1;
            if (sd_cnt == 10'd511) begin after <= P_RD_HDR_DEC; st <= P_SD_CLOSE; end
          end else if (sd_ready && !sd_rd) sd_rd <= 1'b1;
          if (sd_error) st <= P_OP_ERROR;
        end
        P_RD_HDR_DEC: begin
          dec_start <= 1'b1;
          st        <= P_RD_HDR_CHK;
        end
        P_RD_HDR_CHK: if (dec_done) begin
          if (dec_result == FILE_MAGIC) begin
            fails2   <= '0;
            lcd_msg  <= LCD_DECRYPTING;
            msg_id <= MSG_DECRYPTING; msg_start <= 1'b1; after <= P_RD_COUNT;
          end else if (fails2 == 2'(MAX_FAILS - 1)) begin
            fails2  <= '0;
            lcd_msg <= LCD_BLOCKED;
            timer   <= TW'(T_BLK2);
            msg_id <= MSG_WAIT_60; msg_start <= 1'b1; after <= P_BLOCK_WAIT;
          end else begin
            fails2  <= fails2 + 2'd1;
            lcd_msg <= LCD_INCORRECT;
            msg_id <= MSG_INCORRECT; msg_start <= 1'b1; after <= P_PIN_PROMPT;
          end
          st <= P_MSG;
        end
        P_RD_COUNT: begin                            // tell the PC how many blocks
          raw_byte <= n_blocks;
          blk      <= '0;
          chunk    <= '0;
          after    <= P_RD_PULL;
          st       <= P_RAW;
        end
        P_RD_PULL: begin
          if (chunk == 6'd0) begin                   // no block open
            if (blk == n_blocks) st <= P_DONE;
            else begin
              blk           <= blk + 8'd1;
              sd_block_addr <= {24'd0, blk + 8'd1};
              sd_write_op   <= 1'b0;
              chunk         <= 6'd32;
              idx           <= '0;
              after         <= P_RD_PULL;
              st            <= P_SD_CMD;
            end
          end else if (sd_data_out_valid) begin
            buf16  <= {buf16[119:0], sd_data_out};
            sd_cnt <= sd_cnt + 10'd1;
            idx    <= idx + 5'd1;
            if (idx == 5'd15) begin
              chunk     <= chunk - 6'd1;
              st        <= P_RD_DEC;
            end
          end else if (sd_ready && !sd_rd) sd_rd <= 1'b1;
          if (sd_error) st <= P_OP_ERROR;
        end
        P_RD_DEC: begin
          dec_start <= 1'b1;
          idx       <= '0;
          st        <= P_RD_OUT;
        end
        P_RD_OUT: begin
          if (dec_done) buf16 <= dec_result;
          else if (!dec_busy && !dec_start) begin
            raw_byte <= buf16[127 - 8*idx[3:0] -: 8];
            idx      <= (idx == 5'd15) ? 5'd0 : idx + 5'd1;
            if (idx == 5'd15) begin
              if (chunk == 6'd0) after <= P_SD_CLOSE;  // 512 bytes read: close, go on
              else after <= P_RD_PULL;
            end else after <= P_RD_OUT;
            st <= P_RAW;
          end
        end

        // ---------------- end of an operation ----------------
        P_DONE: begin
          capture <= 1'b0;
          lcd_msg <= LCD_DONE;
          msg_id <= MSG_SUCCEEDED; msg_start <= 1'b1; after <= P_MENU;
          st     <= P_MSG;
        end
        P_OP_ERROR: begin
          capture      <= 1'b0;
          sd_data_mode <= 1'b0;
          lcd_msg      <= LCD_ERROR;
          msg_id <= MSG_OP_ERROR; msg_start <= 1'b1; after <= P_MENU;
          st     <= P_MSG;
        end

        // ---------------- output helpers ----------------
        P_MSG: if (msg_ready) st <= after;
        P_RAW: if (tx_chn_ready) begin
          // a finished read block is closed before pulling the next one
          if (after == P_SD_CLOSE) after <= P_RD_PULL;
          st <= after;
        end
        default: st <= P_INIT;
      endcase
    end
  end
endmodule

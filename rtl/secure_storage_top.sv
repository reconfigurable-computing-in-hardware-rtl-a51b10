// secure_storage_top: the secure SD card storage device.
//
// A PC terminal talks to the device over a UART. The user unlocks the device
// with an access PIN that is compared with the one held in an external
// battery-backed SRAM; files sent from the PC are encrypted with AES-128
// under a key made from a second, never stored PIN and written to an SD card
// in SPI mode; reading decrypts them back to the PC. A 16x2 character LCD
// shows the device status.
//
// Structure: device_fsm (the device control FSM and its message sender)
// drives uart_controller, the LCD path (lcd_ram -> send_to_lcd ->
// lcd_controller), sram_controller, aes128_encrypt, aes128_decrypt and
// sd_card_controller. The top only wires them together and brings the pins of
// the UART, the LCD, the SRAM and the SD card out.
//
// The LCD RAM's write port and the SRAM controller's write request are not
// used by the device flow (the screens are preset; the PIN is programmed into
// the SRAM beforehand), so they are tied inactive here.
module secure_storage_top
  import aes_pkg::*;
  import device_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned BAUD         = 115_200,
  parameter int unsigned INIT_MS      = 200,
  parameter int unsigned TITLE_MS     = 2_000,
  parameter int unsigned BLOCK1_MS    = 30_000,
  parameter int unsigned BLOCK2_MS    = 60_000,
  parameter int unsigned LCD_CLK_HZ   = CLK_HZ,
  parameter int unsigned SD_INIT_SCLK = 400_000,
  parameter int unsigned SD_FAST_SCLK = 25_000_000
) (
  input  logic       clock,
  input  logic       reset,
  // UART (USB bridge to the PC)
  input  logic       UART_RX,
  output logic       UART_TX,
  // character LCD, 4-bit bus
  output logic       LCD_RS,
  output logic       LCD_RW,
  output logic       LCD_E,
  output logic [3:0] LCD_DATA,
  // external SRAM 1k x 8
  output logic [9:0] SRAM_ADDR,
  output logic       SRAM_CE,
  output logic       SRAM_WE,
  output logic       SRAM_OE,
  inout  wire  [7:0] SRAM_DATA,
  input  logic       LOW_BATT,
  output logic       LOW_BATT_STATUS,
  // SD card, SPI mode
  output logic       SD_CS,
  output logic       SD_MOSI,
  output logic       SD_SCLK,
  input  logic       SD_MISO,
  // status
  output logic       DEVICE_BLOCKED,
  output logic       AUTHENTICATED,
  output logic       SD_READY
);
  // UART
  logic [7:0] tx_data, rx_data;
  logic       tx_data_enable, tx_chn_ready, rx_data_enable, frame_error;
  // LCD
  lcd_msg_t     lcd_msg;
  logic [255:0] lcd_screen;
  logic [3:0]   lcd_nibble;
  logic         lcd_rs, lcd_rw, lcd_start, lcd_busy, lcd_idle;
  // SRAM
  logic [9:0] sram_addr;
  logic       sram_rd, sram_busy;
  logic [7:0] sram_data;
  // AES
  block_t enc_key, enc_data, enc_result, dec_key, dec_data, dec_result;
  logic   enc_key_load, enc_start, enc_done, enc_busy;
  logic   dec_key_load, dec_start, dec_done, dec_busy;
  // SD card
  logic [7:0]  sd_data_in, sd_data_out;
  logic        sd_data_mode, sd_wr, sd_rd, sd_data_out_valid, sd_ready, sd_in_block;
  logic        sd_init_done, sd_error;
  logic [31:0] sd_block_addr;

  device_fsm #(
    .CLK_HZ(CLK_HZ), .INIT_MS(INIT_MS), .TITLE_MS(TITLE_MS),
    .BLOCK1_MS(BLOCK1_MS), .BLOCK2_MS(BLOCK2_MS)
  ) u_fsm (
    .clock, .reset,
    .tx_data, .tx_data_enable, .tx_chn_ready, .rx_data, .rx_data_enable,
    .lcd_msg,
    .sram_addr, .sram_rd, .sram_busy, .sram_data,
    .enc_key, .enc_key_load, .enc_data, .enc_start, .enc_done, .enc_result,
    .dec_key, .dec_key_load, .dec_busy, .dec_data, .dec_start, .dec_done, .dec_result,
    .sd_data_in, .sd_data_mode, .sd_wr, .sd_rd, .sd_block_addr, .sd_data_out,
    .sd_data_out_valid, .sd_ready, .sd_init_done, .sd_error,
    .blocked(DEVICE_BLOCKED), .authenticated(AUTHENTICATED));

  uart_controller #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clock, .reset, .tx_data, .tx_data_enable, .tx_chn_ready,
    .rx_data, .rx_data_enable, .frame_error, .rx(UART_RX), .tx(UART_TX));

  lcd_ram u_lcd_ram (
    .clock, .wr_data('0), .wr_addr('0), .wr_en(1'b0),
    .rd_addr(lcd_msg), .rd_data(lcd_screen));

  send_to_lcd #(.CLK_HZ(LCD_CLK_HZ)) u_send_lcd (
    .clock, .reset, .data_in(lcd_screen), .data_out(lcd_nibble), .rs(lcd_rs),
    .rw(lcd_rw), .start(lcd_start), .busy(lcd_busy), .idle(lcd_idle));

  lcd_controller #(.CLK_HZ(LCD_CLK_HZ)) u_lcd_ctrl (
    .clock, .reset, .data_in(lcd_nibble), .rs(lcd_rs), .rw(lcd_rw), .start(lcd_start),
    .busy(lcd_busy), .LCD_RS, .LCD_RW, .LCD_E, .LCD_DATA);

  sram_controller #(.CLK_HZ(CLK_HZ)) u_sram (
    .clock, .reset, .data_in(8'h00), .addr(sram_addr), .we(1'b0), .rd(sram_rd),
    .LOW_BATT, .data_out(sram_data), .busy(sram_busy),
    .SRAM_ADDR, .SRAM_CE, .SRAM_WE, .SRAM_OE, .SRAM_DATA, .LOW_BATT_STATUS);

  aes128_encrypt u_enc (
    .clock, .reset, .key_in(enc_key), .key_load(enc_key_load),
    .plaintext_in(enc_data), .start(enc_start), .ciphertext_out(enc_result),
    .busy(enc_busy), .done(enc_done));

  aes128_decrypt u_dec (
    .clock, .reset, .key_in(dec_key), .key_load(dec_key_load),
    .ciphertext_in(dec_data), .start(dec_start), .plaintext_out(dec_result),
    .busy(dec_busy), .done(dec_done));

  sd_card_controller #(
    .CLK_HZ(CLK_HZ), .INIT_SCLK_HZ(SD_INIT_SCLK), .FAST_SCLK_HZ(SD_FAST_SCLK)
  ) u_sd (
    .clock, .reset, .data_in(sd_data_in), .data_mode_in(sd_data_mode), .wr(sd_wr),
    .rd(sd_rd), .block_addr(sd_block_addr), .miso(SD_MISO), .data_out(sd_data_out),
    .data_out_valid(sd_data_out_valid), .ready(sd_ready), .in_block(sd_in_block),
    .init_done(sd_init_done), .error(sd_error), .cs(SD_CS), .mosi(SD_MOSI), .sclk(SD_SCLK));

  assign SD_READY = sd_init_done;
endmodule

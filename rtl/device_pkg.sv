// device_pkg: message numbering and texts shared by the device controller,
// the LCD message RAM and the UART message memory.
//
// LCD screens are 32 characters (line 1 then line 2), stored as 256-bit words
// with the first character in bits [255:248]. UART messages are byte strings
// sent to the terminal; "\r\n" ends a line. The wording of the terminal texts
// follows the device's terminal session (title, "Press "ENTER" to
// continue...", "ENTER PIN CODE : ", the operation menu); the LCD texts are
// the status messages the device shows.
package device_pkg;

  // ---------------- LCD screens (RAM 32x256 word addresses) ----------------
  typedef enum logic [4:0] {
    LCD_NAME        = 5'd0,
    LCD_CONNECTED   = 5'd1,
    LCD_ENTER_PIN   = 5'd2,
    LCD_CORRECT     = 5'd3,
    LCD_INCORRECT   = 5'd4,
    LCD_STORE       = 5'd5,
    LCD_READ        = 5'd6,
    LCD_ENCRYPTING  = 5'd7,
    LCD_DECRYPTING  = 5'd8,
    LCD_BLOCKED     = 5'd9,
    LCD_DONE        = 5'd10,
    LCD_ERROR       = 5'd11
  } lcd_msg_t;

  localparam int unsigned LCD_WORDS = 32;

  function automatic logic [255:0] lcd_text(int unsigned id);
    case (id)
      0:  return {"SD SECURE DATA  ", "STORAGE DEVICE  "};
      1:  return {"DEVICE CONNECTED", "                "};
      2:  return {"ENTER PIN CODE  ", "                "};
      3:  return {"CORRECT PIN     ", "                "};
      4:  return {"INCORRECT PIN   ", "                "};
      5:  return {"STORE FILES     ", "                "};
      6:  return {"READ FILES      ", "                "};
      7:  return {"ENCRYPTING FILES", "                "};
      8:  return {"DECRYPTING FILES", "                "};
      9:  return {"DEVICE BLOCKED  ", "PLEASE WAIT     "};
      10: return {"OPERATION       ", "SUCCEEDED       "};
      11: return {"OPERATION ERROR ", "                "};
      default: return {32{8'h20}};           // unused, all spaces
    endcase
  endfunction

  // ---------------- UART terminal messages ----------------
  typedef enum logic [3:0] {
    MSG_TITLE       = 4'd0,
    MSG_PRESS_ENTER = 4'd1,
    MSG_ENTER_PIN   = 4'd2,
    MSG_CORRECT     = 4'd3,
    MSG_INCORRECT   = 4'd4,
    MSG_MENU        = 4'd5,
    MSG_ENTER_ENC   = 4'd6,
    MSG_ENTER_DEC   = 4'd7,
    MSG_ENCRYPTING  = 4'd8,
    MSG_DECRYPTING  = 4'd9,
    MSG_SUCCEEDED   = 4'd10,
    MSG_OP_ERROR    = 4'd11,
    MSG_WAIT_30     = 4'd12,
    MSG_WAIT_60     = 4'd13,
    MSG_BYE         = 4'd14
  } uart_msg_t;

  localparam int unsigned UART_MSGS = 16;

  function automatic string uart_text(int unsigned id);
    case (id)
      0:  return "\r\n      UPB - ETTI - ETC - CSIC\r\n\r\n\"SD CARD SECURE DATA STORAGE DEVICE\"\r\n\r\n";
      1:  return "Press \"ENTER\" to continue...\r\n\r\n";
      2:  return "\r\nENTER PIN CODE : ";
      3:  return "\r\n\r\nCORRECT PIN CODE!\r\n";
      4:  return "\r\n\r\nINCORRECT PIN CODE!\r\n";
      5:  return "\r\nChoose operation mode:\r\n\r\n1. Transfer files - SD card to PC\r\n2. Transfer files - PC to SD card\r\n3. Exit\r\nPress \"1\", \"2\" or \"3\"!\r\n";
      6:  return "\r\nENTER ENCRYPT PIN CODE : ";
      7:  return "\r\nENTER DECRYPT PIN CODE : ";
      8:  return "\r\nENCRYPTING FILES...\r\n";
      9:  return "\r\nDECRYPTING FILES...\r\n";
      10: return "\r\nOPERATION SUCCEEDED!\r\n";
      11: return "\r\nOPERATION ERROR!\r\n";
      12: return "\r\nDEVICE BLOCKED. WAIT 30 SECONDS...\r\n";
      13: return "\r\nDEVICE BLOCKED. WAIT 60 SECONDS...\r\n";
      14: return "\r\nBYE!\r\n";
      default: return "";
    endcase
  endfunction

  // ---------------- PIN codes ----------------
  localparam int unsigned PIN_LEN  = 16;     // characters, padded with '*'
  localparam logic [7:0]  PIN_PAD  = 8'h2A;  // '*'
  localparam logic [7:0]  KEY_CR   = 8'h0D;  // ENTER

  // Block 0 of the card holds AES_key(FILE_MAGIC) so that a decrypt PIN can be
  // checked without storing it, followed by the number of data blocks.
  localparam logic [127:0] FILE_MAGIC = {"SDSECURE", "STORAGE1"};

endpackage

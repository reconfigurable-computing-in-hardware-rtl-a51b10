// tb_secure_storage_top: end-to-end session with the whole device, the way a
// user at a PC terminal would drive it, against models of the SD card and of
// the PIN SRAM. The testbench is the PC: it decodes UART_TX into a terminal
// text, types on UART_RX (waiting for each '*' echo), and follows the flow:
//   ENTER, three wrong access PINs -> 30 s block (scaled), right PIN, an
//   invalid menu key, store 2 blocks under an encrypt PIN, read with a wrong
//   decrypt PIN three times -> 60 s block (scaled), read with the right PIN,
//   exit.
// Checks: every expected message appears; DEVICE_BLOCKED lasts the blocking
// time; the card holds the header (AES of the file mark under the encrypt
// PIN, block count) and the first data block starts with the ciphertext of
// "Hello, secure SD" under key "secret**********" (both values computed
// outside the design with a standard AES implementation); no data block on
// the card equals its plaintext; the data read back equal the data sent; the
// LCD shows the expected screen at chosen points. Each mechanism (wrong PIN,
// block, right PIN, menu error, store, read, wrong decrypt PIN, long block,
// exit) is counted and must happen at least once.
//
// Run time is kept short with a 1 Mbaud UART, millisecond-scale waits and a
// slow LCD timing clock; the clock itself stays at 100 MHz.
module tb_secure_storage_top;
  localparam int unsigned CLK_HZ = 100_000_000;
  localparam int unsigned BAUD   = 1_562_500;
  localparam int unsigned BIT    = CLK_HZ / BAUD;
  localparam int unsigned BLOCK1_MS = 2, BLOCK2_MS = 3;
  localparam int unsigned NBLK = 2;

  logic clock = 0, reset = 1;
  logic UART_RX = 1, UART_TX;
  logic LCD_RS, LCD_RW, LCD_E;
  logic [3:0] LCD_DATA;
  logic [9:0] SRAM_ADDR;
  logic SRAM_CE, SRAM_WE, SRAM_OE, LOW_BATT = 0, LOW_BATT_STATUS;
  wire  [7:0] SRAM_DATA;
  logic SD_CS, SD_MOSI, SD_SCLK, SD_MISO, DEVICE_BLOCKED, AUTHENTICATED, SD_READY;

  secure_storage_top #(
    .CLK_HZ(CLK_HZ), .BAUD(BAUD), .INIT_MS(1), .TITLE_MS(1),
    .BLOCK1_MS(BLOCK1_MS), .BLOCK2_MS(BLOCK2_MS), .LCD_CLK_HZ(5_000_000)
  ) dut (.*);
  sd_card_model #(.ACMD41_BUSY(2)) card (.cs(SD_CS), .sclk(SD_SCLK), .mosi(SD_MOSI), .miso(SD_MISO));
  sram_model #(.PIN({"1234************"})) sram (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- PC side of the UART ----------------
  logic [7:0] term [$];        // everything the device sent
  int         cursor = 0;      // how far the script has read

  initial begin : uart_rx_monitor
    logic [7:0] b;
    forever begin
      @(negedge UART_TX);
      if (reset) continue;
      #(BIT * 10 / 2);                           // middle of start bit
      for (int i = 0; i < 8; i++) begin #(BIT * 10); b[i] = UART_TX; end
      #(BIT * 10);
      term.push_back(b);
    end
  end

  task automatic send_byte(logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin UART_RX = f[i]; #(BIT * 10); end
  endtask

  function automatic string text_from(int from);
    string s = "";
    for (int i = from; i < term.size(); i++) s = {s, string'(term[i])};
    return s;
  endfunction

  function automatic int find(string hay, string needle);
    for (int i = 0; i + needle.len() <= hay.len(); i++)
      if (hay.substr(i, i + needle.len() - 1) == needle) return i;
    return -1;
  endfunction

  // wait until `s` has been printed after the cursor, then move past it
  task automatic expect_text(string s, bit quiet = 1'b1);
    int p;
    for (int t = 0; t < 20000; t++) begin
      p = find(text_from(cursor), s);
      if (p >= 0) begin
        int n;
        cursor = cursor + p + s.len();
        checks++;
        // let the device finish the message before answering
        if (quiet)
          do begin n = term.size(); #(BIT * 10 * 10 * 3); end while (term.size() != n);
        return;
      end
      #(BIT * 10 * 5);
    end
    failures++;
    $display("FAIL waiting for '%s', got '%s'", s, text_from(cursor));
  endtask

  // type a PIN, waiting for the '*' echo of each character, then ENTER
  task automatic type_pin(string pin);
    for (int i = 0; i < pin.len(); i++) begin
      int n = term.size();
      send_byte(pin[i]);
      while (term.size() == n) #(BIT * 10);
      chk(term[term.size() - 1] == "*", "echo '*'");
    end
    send_byte(8'h0D);
  endtask

  // ---------------- LCD observer ----------------
  logic [7:0] ddram [128];
  logic [6:0] ac;
  int         n_pulse = 0;
  logic [3:0] hi;
  logic       have_hi = 0;
  always @(negedge LCD_E) if (!reset) begin
    n_pulse++;
    if (n_pulse > 4) begin
      if (!have_hi) begin hi = LCD_DATA; have_hi = 1; end
      else begin
        have_hi = 0;
        if (!LCD_RS) begin if (hi[3]) ac = {hi[2:0], LCD_DATA}; end
        else begin ddram[ac] = {hi, LCD_DATA}; ac = ac + 1; end
      end
    end
  end
  function automatic string lcd_line1();
    string s = "";
    for (int i = 0; i < 16; i++) s = {s, string'(ddram[i])};
    return s;
  endfunction
  task automatic expect_lcd(string line1);
    for (int t = 0; t < 2000; t++) begin
      if (lcd_line1() == line1) begin checks++; return; end
      #10000;
    end
    failures++;
    $display("FAIL LCD shows '%s', expected '%s'", lcd_line1(), line1);
  endtask

  // ---------------- mechanism counters ----------------
  longint t_blk_rise = 0, t_blk_fall = 0;
  always @(posedge DEVICE_BLOCKED) if (!reset) t_blk_rise = $time;
  always @(negedge DEVICE_BLOCKED) if (!reset) t_blk_fall = $time;

  int n_wrong_pin = 0, n_block30 = 0, n_right_pin = 0, n_menu_err = 0, n_store = 0;
  int n_read = 0, n_wrong_dec = 0, n_block60 = 0, n_exit = 0;

  initial begin
    #(64'd60_000_000);                            // 60 ms, twice the run
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [7:0] data [NBLK * 512];
    logic [7:0] back [$];
    string hello = "Hello, secure SD";
    longint t0, t1;
    int same;

    for (int i = 0; i < NBLK * 512; i++) data[i] = 8'($urandom);
    for (int i = 0; i < 16; i++) data[i] = hello[i];

    repeat (5) @(posedge clock);
    reset = 0;

    expect_text("\"SD CARD SECURE DATA STORAGE DEVICE\"");
    expect_text("Press \"ENTER\" to continue...");
    send_byte(8'h0D);
    expect_text("ENTER PIN CODE : ");
    expect_lcd("ENTER PIN CODE  ");

    // three wrong access PINs, then the device blocks
    for (int k = 0; k < 3; k++) begin
      type_pin((k == 1) ? "1234567" : "4321");
      if (k < 2) begin
        expect_text("INCORRECT PIN CODE!");
        n_wrong_pin++;
        expect_text("ENTER PIN CODE : ");
      end
    end
    expect_text("WAIT 30 SECONDS");
    wait (DEVICE_BLOCKED);
    expect_lcd("DEVICE BLOCKED  ");
    wait (!DEVICE_BLOCKED); #1;
    t0 = t_blk_rise; t1 = t_blk_fall;
    chk((t1 - t0) >= longint'(BLOCK1_MS) * 1_000_000 - 1000 &&
        (t1 - t0) <= longint'(BLOCK1_MS) * 1_000_000 + 1000,
        $sformatf("30 s block scaled, lasted %0d ns", t1 - t0));
    n_block30++;

    // right PIN
    expect_text("ENTER PIN CODE : ");
    type_pin("1234");
    expect_text("CORRECT PIN CODE!");
    chk(AUTHENTICATED, "authenticated");
    n_right_pin++;
    expect_text("Press \"1\", \"2\" or \"3\"!");
    send_byte("x");
    expect_text("OPERATION ERROR!");
    n_menu_err++;
    expect_text("Press \"1\", \"2\" or \"3\"!");

    // store: PC -> SD card
    send_byte("2");
    expect_text("ENTER ENCRYPT PIN CODE : ");
    expect_lcd("STORE FILES     ");
    type_pin("secret");
    expect_text("ENCRYPTING FILES...");
    send_byte(8'(NBLK));
    for (int i = 0; i < NBLK * 512; i++) send_byte(data[i]);
    expect_text("OPERATION SUCCEEDED!");
    n_store++;
    expect_lcd("OPERATION       ");
    chk(card.blocks_written == NBLK + 1, $sformatf("blocks written %0d", card.blocks_written));
    begin
      logic [127:0] hdr = '0, c1 = '0;
      for (int i = 0; i < 16; i++) hdr = {hdr[119:0], card.mem[i]};
      for (int i = 0; i < 16; i++) c1  = {c1[119:0], card.mem[512 + i]};
      chk(hdr == 128'h8379d04568a1568f66414f311d98c2a9, $sformatf("header %h", hdr));
      chk(card.mem[16] == 8'(NBLK), "block count in header");
      chk(c1 == 128'hd0e0b7824de4693128b155c52bb3a2ad, $sformatf("first ciphertext %h", c1));
      same = 0;
      for (int i = 0; i < NBLK * 512; i++) if (card.mem[512 + i] == data[i]) same++;
      chk(same < 40, $sformatf("card data encrypted (%0d bytes equal)", same));
    end
    expect_text("Press \"1\", \"2\" or \"3\"!");

    // read with wrong decrypt PINs until blocked
    send_byte("1");
    expect_text("ENTER DECRYPT PIN CODE : ");
    for (int k = 0; k < 3; k++) begin
      type_pin("secreT");
      if (k < 2) begin
        expect_text("INCORRECT PIN CODE!");
        n_wrong_dec++;
        expect_text("ENTER DECRYPT PIN CODE : ");
      end
    end
    expect_text("WAIT 60 SECONDS");
    wait (DEVICE_BLOCKED);
    wait (!DEVICE_BLOCKED); #1;
    t0 = t_blk_rise; t1 = t_blk_fall;
    chk((t1 - t0) >= longint'(BLOCK2_MS) * 1_000_000 - 1000 &&
        (t1 - t0) <= longint'(BLOCK2_MS) * 1_000_000 + 1000,
        $sformatf("60 s block scaled, lasted %0d ns", t1 - t0));
    n_block60++;
    expect_text("ENTER DECRYPT PIN CODE : ");
    type_pin("secret");
    expect_text("DECRYPTING FILES...\r\n", 1'b0);
    expect_lcd("DECRYPTING FILES");
    // then: one count byte and the data
    begin
      automatic int start = cursor;
      while (term.size() < start + 1 + NBLK * 512) #(BIT * 10 * 10);
      chk(term[start] == 8'(NBLK), "block count sent");
      same = 0;
      for (int i = 0; i < NBLK * 512; i++) if (term[start + 1 + i] == data[i]) same++;
      chk(same == NBLK * 512, $sformatf("read back %0d of %0d bytes", same, NBLK * 512));
      cursor = start + 1 + NBLK * 512;
    end
    expect_text("OPERATION SUCCEEDED!");
    n_read++;
    expect_text("Press \"1\", \"2\" or \"3\"!");
    send_byte("3");
    expect_text("BYE!");
    expect_text("\"SD CARD SECURE DATA STORAGE DEVICE\"");
    n_exit++;

    chk(n_wrong_pin > 0, "mechanism: wrong PIN");
    chk(n_block30 > 0,   "mechanism: 30 s block");
    chk(n_right_pin > 0, "mechanism: right PIN");
    chk(n_menu_err > 0,  "mechanism: menu error");
    chk(n_store > 0,     "mechanism: store");
    chk(n_wrong_dec > 0, "mechanism: wrong decrypt PIN");
    chk(n_block60 > 0,   "mechanism: 60 s block");
    chk(n_read > 0,      "mechanism: read");
    chk(n_exit > 0,      "mechanism: exit");
    $display("mechanisms: wrong_pin=%0d block30=%0d right_pin=%0d menu_err=%0d store=%0d wrong_dec=%0d block60=%0d read=%0d exit=%0d",
             n_wrong_pin, n_block30, n_right_pin, n_menu_err, n_store, n_wrong_dec, n_block60, n_read, n_exit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

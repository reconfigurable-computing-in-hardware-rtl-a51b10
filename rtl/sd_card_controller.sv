// sd_card_controller: SD card in SPI mode, byte-wide block read and write.
//
// Initialisation (after reset, SCLK at most INIT_SCLK_HZ): 80 clocks with CS
// high, then with CS low CMD0 (GO_IDLE_STATE, expects R1 = 0x01), CMD8
// (SEND_IF_COND, argument 0x1AA, R7 echo checked; an "illegal command" R1
// marks a version 1 card), CMD55 + ACMD41 (APP_SEND_OP_COND, HCS set for
// version 2 cards) repeated until R1 = 0x00, CMD58 (READ_OCR, the CCS bit
// selects block or byte addressing) and CMD16 (SET_BLOCKLEN 512). SCLK then
// switches to FAST_SCLK_HZ and init_done rises. A failing step sets error and
// stops.
//
// Every command is the 48-bit frame 0 1 index[5:0] argument[31:0] CRC7 1,
// preceded by one 0xFF byte; its R1 is the first byte read back with bit 7
// clear (at most 8 tries), and R3/R7 add four more bytes.
//
// Transfers, one 512-byte block at block number block_addr:
//   command mode (data_mode_in = 0), ready high: rd starts CMD17
//   (READ_SINGLE_BLOCK), wr starts CMD24 (WRITE_BLOCK).
//   data mode (data_mode_in = 1), ready high: in a read, each rd clocks in
//   the next data byte, returned on data_out with a data_out_valid pulse; in
//   a write, each wr sends data_in. After the 512th byte the controller
//   handles the CRC bytes (sent as 0xFFFF, not checked: CRC is off in SPI mode
//   by default), the data response token (must be "data accepted") and the
//   card's busy time, then returns to command mode (ready high, in_block low).
// A rejected command or data token sets error, which stays high until the
// next command is started.
module sd_card_controller #(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned INIT_SCLK_HZ = 400_000,
  parameter int unsigned FAST_SCLK_HZ = 25_000_000
) (
  input  logic        clock,
  input  logic        reset,
  input  logic [7:0]  data_in,
  input  logic        data_mode_in,
  input  logic        wr,
  input  logic        rd,
  input  logic [31:0] block_addr,
  input  logic        miso,
  output logic [7:0]  data_out,
  output logic        data_out_valid,
  output logic        ready,
  output logic        in_block,
  output logic        init_done,
  output logic        error,
  output logic        cs,
  output logic        mosi,
  output logic        sclk
);
  localparam int unsigned DIV_SLOW = (CLK_HZ + 2 * INIT_SCLK_HZ - 1) / (2 * INIT_SCLK_HZ);
  localparam int unsigned DIV_FAST = (CLK_HZ + 2 * FAST_SCLK_HZ - 1) / (2 * FAST_SCLK_HZ);
  localparam int unsigned DW = $clog2(DIV_SLOW + 1) + 1;

  // CRC7 (x^7 + x^3 + 1) over the first 40 bits of a command frame.
  function automatic logic [6:0] crc7(logic [39:0] d);
    logic [6:0] c;
    logic       fb;
    c = '0;
    for (int i = 39; i >= 0; i--) begin
      fb = d[i] ^ c[6];
      c  = {c[5:0], 1'b0};
      if (fb) c = c ^ 7'h09;
    end
    return c;
  endfunction

  function automatic logic [47:0] frame(logic [5:0] idx, logic [31:0] arg);
    return {2'b01, idx, arg, crc7({2'b01, idx, arg}), 1'b1};
  endfunction

  typedef enum logic [4:0] {
    S_DUMMY, S_CMD0, S_CMD8, S_CMD8_CHK, S_CMD55, S_ACMD41, S_ACMD41_CHK,
    S_CMD58, S_CMD58_CHK, S_CMD16, S_CMD16_CHK,
    S_IDLE, S_FAIL,
    S_CMD_BYTE, S_CMD_RESP, S_CMD_EXTRA,
    S_RD_CMD_CHK, S_RD_TOKEN, S_RD_DATA, S_RD_CRC,
    S_WR_CMD_CHK, S_WR_TOKEN, S_WR_DATA, S_WR_CRC, S_WR_RESP, S_WR_BUSY,
    S_GAP
  } sd_state_t;

  sd_state_t   st, ret;
  logic [47:0] cmd_sh;
  logic [2:0]  cmd_cnt;       // bytes of the frame still to send (incl. leading 0xFF)
  logic        cmd_long;      // response has 4 more bytes (R3/R7)
  logic [3:0]  poll;
  logic [7:0]  r1;
  logic [31:0] r_extra;
  logic [2:0]  extra_cnt;
  logic [9:0]  byte_cnt;
  logic [15:0] tries;
  logic        v2, ccs, fast, cmd_fail;
  logic        wait_byte;     // a byte transfer is in flight

  // SPI byte engine
  logic [7:0]  tx_byte, rx_byte;
  logic        x_start, x_busy, x_done;
  sd_spi_byte #(.DW(DW)) u_spi (
    .clock, .reset,
    .half_div(fast ? DW'(DIV_FAST) : DW'(DIV_SLOW)),
    .tx_byte, .start(x_start), .rx_byte, .busy(x_busy), .done(x_done),
    .sclk, .mosi, .miso);

  assign init_done = fast;
  assign in_block  = (st == S_RD_DATA) || (st == S_WR_DATA);
  assign ready     = !wait_byte && !x_busy &&
                     ((st == S_IDLE && !data_mode_in) ||
                      (in_block && data_mode_in));

  // Start a byte transfer: registered request into the engine.
  task automatic xfer(input logic [7:0] b);
    tx_byte   <= b;
    x_start   <= 1'b1;
    wait_byte <= 1'b1;
  endtask

  // Start a command: the frame goes out, then the response is polled, then
  // the FSM continues in state r (R1 in r1, R3/R7 payload in r_extra).
  task automatic command(input logic [5:0] idx, input logic [31:0] arg,
                         input logic long_resp, input sd_state_t r);
    cmd_sh   <= frame(idx, arg);
    cmd_cnt  <= 3'd6;
    cmd_long <= long_resp;
    ret      <= r;
    xfer(8'hFF);
    st       <= S_CMD_BYTE;
  endtask

  always_ff @(posedge clock) begin
    if (reset) begin
      st             <= S_DUMMY;
      ret            <= S_IDLE;
      cs             <= 1'b1;
      cmd_sh         <= '0;
      cmd_cnt        <= '0;
      cmd_long       <= 1'b0;
      poll           <= '0;
      r1             <= 8'hFF;
      r_extra        <= '0;
      extra_cnt      <= '0;
      byte_cnt       <= '0;
      tries          <= '0;
      v2             <= 1'b0;
      ccs            <= 1'b0;
      fast           <= 1'b0;
      error          <= 1'b0;
      cmd_fail       <= 1'b0;
      wait_byte      <= 1'b0;
      tx_byte        <= 8'hFF;
      x_start        <= 1'b0;
      data_out       <= '0;
      data_out_valid <= 1'b0;
    end else begin
      x_start        <= 1'b0;
      data_out_valid <= 1'b0;
      if (x_done) wait_byte <= 1'b0;

      if (!wait_byte && !x_busy && !x_start) begin
        unique case (st)
          // ---------------- initialisation ----------------
          S_DUMMY: begin                              // 10 x 0xFF, CS high
            if (byte_cnt == 10'd10) begin
              cs       <= 1'b0;
              byte_cnt <= '0;
              st       <= S_CMD0;
            end else begin
              byte_cnt <= byte_cnt + 10'd1;
              xfer(8'hFF);
            end
          end
          S_CMD0:  command(6'd0, 32'h0, 1'b0, S_CMD8);
          S_CMD8: begin
            if (cmd_fail || r1 != 8'h01) begin
              tries <= tries + 16'd1;
              if (tries == 16'd15) st <= S_FAIL;
              else                 st <= S_CMD0;   // retry GO_IDLE
            end else begin
              tries <= '0;
              command(6'd8, 32'h0000_01AA, 1'b1, S_CMD8_CHK);
            end
          end
          S_CMD8_CHK: begin
            if (!cmd_fail && r1 == 8'h01 && r_extra[11:0] == 12'h1AA) begin
              v2 <= 1'b1; st <= S_CMD55;
            end else if (!cmd_fail && r1[2]) begin  // illegal command: version 1
              v2 <= 1'b0; st <= S_CMD55;
            end else st <= S_FAIL;
          end
          S_CMD55:  command(6'd55, 32'h0, 1'b0, S_ACMD41);
          S_ACMD41: begin
            if (cmd_fail || r1[7:1] != 7'd0) st <= S_FAIL;
            else command(6'd41, v2 ? 32'h4000_0000 : 32'h0, 1'b0, S_ACMD41_CHK);
          end
          S_ACMD41_CHK: begin
            if (cmd_fail || r1[7:1] != 7'd0) st <= S_FAIL;
            else if (r1[0] == 1'b0) st <= S_CMD58;           // left idle state
            else if (tries == 16'hFFFF) st <= S_FAIL;
            else begin tries <= tries + 16'd1; st <= S_CMD55; end
          end
          S_CMD58: begin
            if (v2) command(6'd58, 32'h0, 1'b1, S_CMD58_CHK);
            else    st <= S_CMD16;
          end
          S_CMD58_CHK: begin
            if (cmd_fail || r1 != 8'h00) st <= S_FAIL;
            else begin ccs <= r_extra[30]; st <= S_CMD16; end
          end
          S_CMD16:     command(6'd16, 32'd512, 1'b0, S_CMD16_CHK);
          S_CMD16_CHK: begin
            if (cmd_fail || r1 != 8'h00) st <= S_FAIL;
            else begin fast <= 1'b1; st <= S_IDLE; end
          end
          S_FAIL: begin
            error <= 1'b1;
            cs    <= 1'b1;
          end

          // ---------------- command mode ----------------
          S_IDLE: begin
            if (!data_mode_in && (rd || wr)) begin
              error <= 1'b0;
              command(rd ? 6'd17 : 6'd24, ccs ? block_addr : {block_addr[22:0], 9'd0},
                      1'b0, rd ? S_RD_CMD_CHK : S_WR_CMD_CHK);
            end
          end

          // ---------------- command frame and response ----------------
          S_CMD_BYTE: begin
            if (cmd_cnt == 3'd0) begin
              poll <= '0;
              xfer(8'hFF);
              st   <= S_CMD_RESP;
            end else begin
              xfer(cmd_sh[47:40]);
              cmd_sh  <= {cmd_sh[39:0], 8'hFF};
              cmd_cnt <= cmd_cnt - 3'd1;
            end
          end
          S_CMD_RESP: begin
            if (!rx_byte[7]) begin
              r1        <= rx_byte;
              cmd_fail  <= 1'b0;
              extra_cnt <= 3'd4;
              if (cmd_long) begin xfer(8'hFF); st <= S_CMD_EXTRA; end
              else st <= ret;
            end else if (poll == 4'd8) begin
              r1       <= 8'hFF;
              cmd_fail <= 1'b1;
              st       <= ret;
            end else begin
              poll <= poll + 4'd1;
              xfer(8'hFF);
            end
          end
          S_CMD_EXTRA: begin
            r_extra   <= {r_extra[23:0], rx_byte};
            extra_cnt <= extra_cnt - 3'd1;
            if (extra_cnt == 3'd1) st <= ret;
            else xfer(8'hFF);
          end

          // ---------------- single block read ----------------
          S_RD_CMD_CHK: begin
            if (cmd_fail || r1 != 8'h00) begin error <= 1'b1; st <= S_IDLE; end
            else begin tries <= '0; xfer(8'hFF); st <= S_RD_TOKEN; end
          end
          S_RD_TOKEN: begin
            if (rx_byte == 8'hFE) begin
              byte_cnt <= '0;
              st       <= S_RD_DATA;
            end else if (rx_byte != 8'hFF || tries == 16'hFFFF) begin
              error <= 1'b1;                        // error token or timeout
              st    <= S_GAP;
              xfer(8'hFF);
            end else begin
              tries <= tries + 16'd1;
              xfer(8'hFF);
            end
          end
          S_RD_DATA: begin
            if (data_mode_in && rd) xfer(8'hFF);
          end
          S_RD_CRC: begin
            byte_cnt <= byte_cnt + 10'd1;
            xfer(8'hFF);
            if (byte_cnt == 10'd1) st <= S_GAP;
          end

          // ---------------- single block write ----------------
          S_WR_CMD_CHK: begin
            if (cmd_fail || r1 != 8'h00) begin error <= 1'b1; st <= S_IDLE; end
            else begin xfer(8'hFF); st <= S_WR_TOKEN; end   // one byte gap
          end
          S_WR_TOKEN: begin
            xfer(8'hFE);
            byte_cnt <= '0;
            st       <= S_WR_DATA;
          end
          S_WR_DATA: begin
            if (data_mode_in && wr) begin
              xfer(data_in);
              byte_cnt <= byte_cnt + 10'd1;
              if (byte_cnt == 10'd511) begin
                byte_cnt <= '0;
                st       <= S_WR_CRC;
              end
            end
          end
          S_WR_CRC: begin
            byte_cnt <= byte_cnt + 10'd1;
            xfer(8'hFF);
            if (byte_cnt == 10'd1) begin
              tries <= '0;
              st    <= S_WR_RESP;
            end
          end
          S_WR_RESP: begin
            if (ret == S_WR_RESP) begin               // a response byte was read
              if (rx_byte != 8'hFF) begin
                if (rx_byte[4:0] != 5'b00101) error <= 1'b1;
                ret <= S_IDLE;
                xfer(8'hFF);
                st  <= S_WR_BUSY;
              end else if (tries == 16'd16) begin
                error <= 1'b1;
                ret   <= S_IDLE;
                st    <= S_GAP;
                xfer(8'hFF);
              end else begin
                tries <= tries + 16'd1;
                xfer(8'hFF);
              end
            end else begin
              ret <= S_WR_RESP;
              xfer(8'hFF);
            end
          end
          S_WR_BUSY: begin                            // card holds MISO low
            if (rx_byte != 8'h00) st <= S_IDLE;
            else xfer(8'hFF);
          end
          S_GAP: st <= S_IDLE;                        // 8 clocks already sent
          default: st <= S_FAIL;
        endcase
      end

      // data bytes of a read block are returned as they arrive
      if (x_done && st == S_RD_DATA) begin
        data_out       <= rx_byte;
        data_out_valid <= 1'b1;
        byte_cnt       <= byte_cnt + 10'd1;
        if (byte_cnt == 10'd511) begin
          byte_cnt <= '0;
          st       <= S_RD_CRC;
        end
      end
    end
  end
endmodule

// sd_card_model: behavioural model of an SD card (SDHC, block addressed) in
// SPI mode 0 for simulation. Bits are taken from MOSI on the rising edge of
// SCLK while CS is low; MISO changes after the rising edge, so it is stable
// at the next one. Commands (6 bytes starting 01xxxxxx) are answered after
// one 0xFF byte: CMD0 -> 0x01; CMD8 -> R7 echoing the check pattern;
// CMD55/ACMD41 -> 0x01 for the first ACMD41_BUSY tries, then 0x00; CMD58 ->
// R3 with CCS set; CMD16 -> 0x00 for 512; CMD17 -> 0x00, two 0xFF, token 0xFE,
// 512 bytes, 2 CRC bytes; CMD24 -> 0x00, then the block after a 0xFE token is
// stored and answered with data response 0x05 and three busy bytes 0x00.
// CMD0 and CMD8 frames with a wrong CRC7 are counted in crc_errors and
// answered with the CRC-error bit. The SCLK period seen before and after the
// card leaves its idle state is recorded for speed checks.
module sd_card_model #(
  parameter int unsigned ACMD41_BUSY = 2
) (
  input  logic cs,
  input  logic sclk,
  input  logic mosi,
  output logic miso
);
  logic [7:0] mem [longint];             // byte address -> data
  logic [7:0] q [$];                     // bytes to send
  logic [7:0] in_sh = 8'hFF, out_byte = 8'hFF;
  int         nbit = 0, bit_idx = 0;
  logic [7:0] cmd [6];
  int         cmd_n = 0;
  logic       idle = 1'b1, app = 1'b0;
  int         acmd41_tries = 0;
  // write reception
  int         wr_phase = 0;              // 0 none, 1 waiting token, 2 data
  longint     wr_addr;
  int         wr_n = 0;
  // statistics
  int         n_cmd [64];
  int         crc_errors = 0;
  int         blocks_written = 0, blocks_read = 0;
  realtime    t_last_rise = 0, min_period_init = 1e18, min_period_run = 1e18;

  initial for (int i = 0; i < 64; i++) n_cmd[i] = 0;

  assign miso = cs ? 1'b1 : out_byte[7 - bit_idx];

  function automatic logic [6:0] crc7_ref(logic [7:0] b [6]);
    logic [6:0] c = 0;
    for (int i = 0; i < 5; i++)
      for (int k = 7; k >= 0; k--) begin
        logic fb = b[i][k] ^ c[6];
        c = {c[5:0], 1'b0} ^ (fb ? 7'b000_1001 : 7'b0);
      end
    return c;
  endfunction

  function automatic logic [7:0] peek(longint a);
    return mem.exists(a) ? mem[a] : 8'(a * 7 + 3);   // unwritten bytes: a fixed pattern
  endfunction

  task automatic handle_cmd();
    logic [5:0]  idx = cmd[0][5:0];
    logic [31:0] arg = {cmd[1], cmd[2], cmd[3], cmd[4]};
    logic [7:0]  r1;
    n_cmd[idx]++;
    r1 = {7'b0, idle};
    if ((idx == 0 || idx == 8) && cmd[5][7:1] != crc7_ref(cmd)) begin
      crc_errors++;
      q.push_back(8'hFF); q.push_back(r1 | 8'h08);
      return;
    end
    q.push_back(8'hFF);                   // N_CR = 1 byte
    if (app && idx == 41) begin
      acmd41_tries++;
      if (acmd41_tries > ACMD41_BUSY) idle = 1'b0;
      q.push_back({7'b0, idle});
      app = 1'b0;
      return;
    end
    app = 1'b0;
    case (idx)
      0:  begin idle = 1'b1; q.push_back(8'h01); end
      8:  begin q.push_back(r1); q.push_back(8'h00); q.push_back(8'h00);
                q.push_back({4'h0, arg[11:8]}); q.push_back(arg[7:0]); end
      55: begin app = 1'b1; q.push_back(r1); end
      58: begin q.push_back(r1); q.push_back(8'hC0); q.push_back(8'hFF);
                q.push_back(8'h80); q.push_back(8'h00); end
      16: q.push_back((arg == 512) ? r1 : (r1 | 8'h40));
      17: begin
        q.push_back(r1);
        q.push_back(8'hFF); q.push_back(8'hFF); q.push_back(8'hFE);
        for (int i = 0; i < 512; i++) q.push_back(peek(longint'(arg) * 512 + i));
        q.push_back(8'h12); q.push_back(8'h34);
        blocks_read++;
      end
      24: begin
        q.push_back(r1);
        wr_phase = 1;
        wr_addr  = longint'(arg) * 512;
      end
      default: q.push_back(r1 | 8'h04);   // illegal command
    endcase
  endtask

  always @(posedge sclk) if (!cs) begin
    automatic realtime p = $realtime - t_last_rise;
    t_last_rise = $realtime;
    if (idle) begin if (p < min_period_init) min_period_init = p; end
    else if (p < min_period_run) min_period_run = p;
    in_sh = {in_sh[6:0], mosi};
    nbit++;
    if (nbit == 8) begin
      nbit = 0;
      // byte complete
      if (wr_phase == 1) begin
        if (in_sh == 8'hFE) begin wr_phase = 2; wr_n = 0; end
      end else if (wr_phase == 2) begin
        if (wr_n < 512) mem[wr_addr + wr_n] = in_sh;
        wr_n++;
        if (wr_n == 514) begin
          wr_phase = 0;
          blocks_written++;
          q.push_back(8'h05); q.push_back(8'h00); q.push_back(8'h00); q.push_back(8'h00);
        end
      end else if (cmd_n == 0) begin
        if (in_sh[7:6] == 2'b01) begin cmd[0] = in_sh; cmd_n = 1; end
      end else begin
        cmd[cmd_n] = in_sh;
        cmd_n++;
        if (cmd_n == 6) begin cmd_n = 0; handle_cmd(); end
      end
      out_byte = (q.size() > 0) ? q.pop_front() : 8'hFF;
      bit_idx  = 0;
    end else begin
      bit_idx = nbit;
    end
  end
endmodule

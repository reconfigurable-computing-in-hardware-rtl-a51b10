// tb_sd_card_controller: the controller against the SD card model. Checks
// the initialisation (each command issued, no CRC7 error, SCLK at most
// 400 kHz before the card is ready and faster afterwards, init_done), then
// writes random 512-byte blocks to several block numbers and reads them back
// and compares; reads an unwritten block and compares with the model's fill
// pattern; checks ready, in_block and the 512 data_out_valid pulses.
module tb_sd_card_controller;
  localparam int unsigned CLK_HZ = 100_000_000;
  logic clock = 0, reset = 1;
  logic [7:0] data_in, data_out;
  logic data_mode_in = 0, wr = 0, rd = 0;
  logic [31:0] block_addr;
  logic miso, data_out_valid, ready, in_block, init_done, error, cs, mosi, sclk;
  logic [7:0] blk [3][512];
  int checks = 0, failures = 0;

  sd_card_controller #(.CLK_HZ(CLK_HZ), .INIT_SCLK_HZ(400_000), .FAST_SCLK_HZ(25_000_000)) dut (.*);
  sd_card_model #(.ACMD41_BUSY(3)) card (.cs, .sclk, .mosi, .miso);
  always #5 clock = ~clock;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_block(logic [31:0] a, int which);
    wait (ready); @(posedge clock);
    block_addr <= a; data_mode_in <= 0; wr <= 1; @(posedge clock); wr <= 0;
    data_mode_in <= 1;
    @(posedge clock);
    for (int i = 0; i < 512; i++) begin
      while (!ready) @(posedge clock);
      data_in <= blk[which][i]; wr <= 1; @(posedge clock); wr <= 0; @(posedge clock);
    end
    data_mode_in <= 0;
    @(posedge clock);
    while (!ready) @(posedge clock);
    chk(!error && !in_block, "write completed without error");
  endtask

  task automatic read_block(logic [31:0] a, output logic [7:0] d [512]);
    int n = 0;
    wait (ready); @(posedge clock);
    block_addr <= a; data_mode_in <= 0; rd <= 1; @(posedge clock); rd <= 0;
    data_mode_in <= 1;
    @(posedge clock);
    while (n < 512) begin
      while (!ready) @(posedge clock);
      rd <= 1; @(posedge clock); rd <= 0;
      while (!data_out_valid) @(posedge clock);
      d[n] = data_out; n++;
      @(posedge clock);
    end
    data_mode_in <= 0;
    @(posedge clock);
    while (!ready) @(posedge clock);
    chk(!error, "read completed without error");
  endtask

  initial begin
    repeat (3_000_000) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [7:0] d [512];
    int bad;
    logic [31:0] addrs [3] = '{32'd0, 32'd7, 32'd1000};
    repeat (3) @(posedge clock);
    reset <= 0;
    wait (init_done || error);
    chk(init_done && !error, "initialised");
    chk(card.n_cmd[0] >= 1 && card.n_cmd[8] == 1 && card.n_cmd[55] == 4 &&
        card.n_cmd[41] == 4 && card.n_cmd[58] == 1 && card.n_cmd[16] == 1,
        $sformatf("init commands 0:%0d 8:%0d 55:%0d 41:%0d 58:%0d 16:%0d", card.n_cmd[0],
                  card.n_cmd[8], card.n_cmd[55], card.n_cmd[41], card.n_cmd[58], card.n_cmd[16]));
    chk(card.crc_errors == 0, "CRC7 of CMD0/CMD8");
    chk(card.min_period_init >= 2500.0, $sformatf("init SCLK period %f", card.min_period_init));
    for (int k = 0; k < 3; k++)
      for (int i = 0; i < 512; i++) blk[k][i] = 8'($urandom);
    for (int k = 0; k < 3; k++) write_block(addrs[k], k);
    chk(card.blocks_written == 3, "3 blocks written");
    chk(card.min_period_run <= 100.0 && card.min_period_run >= 40.0,
        $sformatf("fast SCLK period %f", card.min_period_run));
    for (int k = 2; k >= 0; k--) begin
      read_block(addrs[k], d);
      bad = 0;
      for (int i = 0; i < 512; i++) if (d[i] != blk[k][i]) bad++;
      chk(bad == 0, $sformatf("block %0d read back, %0d bytes differ", addrs[k], bad));
    end
    read_block(32'd55, d);
    bad = 0;
    for (int i = 0; i < 512; i++) if (d[i] != 8'((longint'(55) * 512 + i) * 7 + 3)) bad++;
    chk(bad == 0, "unwritten block pattern");
    chk(card.blocks_read == 4, "4 blocks read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_uart_controller: drives serial frames into rx with the testbench's own
// bit timing and checks rx_data; samples the tx line at bit centres to
// decode what the transmitter sends; checks that a frame lasts 10 bit times
// and that a frame whose stop bit is 0 gives frame_error and no data.
module tb_uart_controller;
  localparam int unsigned CLK_HZ = 1_600_000, BAUD = 50_000;
  localparam int unsigned BIT = CLK_HZ / BAUD;   // clocks per bit
  logic clock = 0, reset = 1;
  logic [7:0] tx_data, rx_data;
  logic tx_data_enable = 0, tx_chn_ready, rx_data_enable, frame_error;
  logic rx = 1, tx;
  int checks = 0, failures = 0;
  int n_rx = 0, n_ferr = 0;
  logic [7:0] last_rx;

  uart_controller #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);
  always #5 clock = ~clock;

  always @(posedge clock) begin
    if (!reset && rx_data_enable) begin n_rx++; last_rx = rx_data; end
    if (!reset && frame_error) n_ferr++;
  end

  initial begin
    repeat (200000) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic send_frame(logic [7:0] b, logic stop);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx <= f[i];
      repeat (BIT) @(posedge clock);
    end
    rx <= 1;
    repeat (BIT) @(posedge clock);
  endtask

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] b, got;
    longint t0, t1;
    repeat (5) @(posedge clock);
    reset <= 0;
    repeat (5) @(posedge clock);
    // receiver
    for (int k = 0; k < 12; k++) begin
      automatic int n_before = n_rx;
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hff : (k == 2) ? 8'h55 : 8'($urandom);
      send_frame(b, 1'b1);
      chk(n_rx == n_before + 1 && last_rx == b, $sformatf("rx byte %h got %h", b, last_rx));
    end
    begin
      automatic int n_before = n_rx;
      send_frame(8'ha5, 1'b0);
      rx <= 1; repeat (2 * BIT) @(posedge clock);
      chk(n_ferr == 1 && (n_rx == n_before || last_rx != 8'ha5), $sformatf("frame error on bad stop bit ferr=%0d rx=%0d last=%h", n_ferr, n_rx - n_before, last_rx));
    end
    // transmitter
    for (int k = 0; k < 8; k++) begin
      b = 8'($urandom);
      wait (tx_chn_ready);
      @(posedge clock);
      tx_data <= b; tx_data_enable <= 1;
      @(posedge clock); tx_data_enable <= 0;
      t0 = $time;
      wait (tx == 0);                     // start bit
      repeat (BIT / 2) @(posedge clock);
      chk(tx == 0, "tx start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clock);
        got[i] = tx;
      end
      repeat (BIT) @(posedge clock);
      chk(tx == 1, "tx stop bit");
      chk(got == b, $sformatf("tx byte %h got %h", b, got));
      wait (tx_chn_ready);
      t1 = $time;
      chk((t1 - t0) / 10 >= 10 * BIT - 2 && (t1 - t0) / 10 <= 10 * BIT + 3,
          $sformatf("frame time %0d clocks", (t1 - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

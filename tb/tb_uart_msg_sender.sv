// tb_uart_msg_sender: the sender with a stand-in UART whose tx_chn_ready is
// low for a random few clocks after each byte. Collects the transmitted bytes
// of several messages and compares them with the expected texts; checks
// that ready pulses once per message and only after the last byte.
module tb_uart_msg_sender;
  logic clock = 0, reset = 1, start = 0, ready, busy, tx_data_enable, tx_chn_ready;
  logic [3:0] msg_id;
  logic [7:0] tx_data;
  string got;
  int checks = 0, failures = 0, n_ready = 0, hold = 0;

  uart_msg_sender dut (.*);
  always #5 clock = ~clock;

  // stand-in transmitter
  always @(posedge clock) begin
    if (reset) hold <= 0;
    else if (tx_data_enable) begin
      got = {got, string'(tx_data)};
      hold <= 1 + $urandom_range(0, 5);
    end else if (hold > 0) hold <= hold - 1;
    if (!reset && ready) n_ready++;
  end
  assign tx_chn_ready = (hold == 0);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(int id, string exp);
    int r0 = n_ready;
    got = "";
    msg_id <= 4'(id); start <= 1; @(posedge clock); start <= 0;
    @(posedge clock);
    while (!ready) @(posedge clock);
    @(posedge clock);
    chk(got == exp, $sformatf("message %0d: '%s'", id, got));
    chk(n_ready == r0 + 1, "one ready pulse");
  endtask

  initial begin
    repeat (20000) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clock);
    reset <= 0;
    @(posedge clock);
    send(2, "\r\nENTER PIN CODE : ");
    send(4, "\r\n\r\nINCORRECT PIN CODE!\r\n");
    send(14, "\r\nBYE!\r\n");
    send(1, "Press \"ENTER\" to continue...\r\n\r\n");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

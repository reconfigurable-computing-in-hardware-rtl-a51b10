// tb_lcd_controller: issues bus cycles with random rs/rw/data and measures,
// at 100 MHz, the address set-up time before E rises, the E pulse width, the
// hold time after E falls and the whole enable cycle against the display's
// write timing (40 ns, 230 ns, 10 ns, 500 ns minimum); checks that the
// nibble and RS/RW seen at the falling edge of E are those given.
module tb_lcd_controller;
  logic clock = 0, reset = 1;
  logic [3:0] data_in, LCD_DATA;
  logic rs, rw, start = 0, busy, LCD_RS, LCD_RW, LCD_E;
  int checks = 0, failures = 0;

  lcd_controller #(.CLK_HZ(100_000_000)) dut (.*);
  always #5 clock = ~clock;    // 10 ns

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint t_start, t_rise, t_fall, t_end;
    logic [3:0] d;
    logic r, w;
    repeat (3) @(posedge clock);
    reset <= 0;
    @(posedge clock);
    for (int k = 0; k < 10; k++) begin
      d = 4'($urandom); r = 1'($urandom); w = 1'($urandom);
      data_in <= d; rs <= r; rw <= w; start <= 1;
      @(posedge clock); start <= 0;
      t_start = $time;
      @(posedge LCD_E); t_rise = $time;
      @(negedge LCD_E); t_fall = $time;
      chk(LCD_DATA == d && LCD_RS == r && LCD_RW == w, "bus values at E fall");
      fork
        begin
          // bus must not change for 10 ns after E falls
          #10;
          chk(LCD_DATA == d && LCD_RS == r, "hold after E");
        end
      join
      #1;
      while (busy) begin @(posedge clock); #1; end
      t_end = $time;
      chk(t_rise - t_start >= 40, $sformatf("t_AS %0d ns", t_rise - t_start));
      chk(t_fall - t_rise >= 230, $sformatf("PW_EH %0d ns", t_fall - t_rise));
      chk(t_end - t_start >= 500, $sformatf("cycle %0d ns", t_end - t_start));
      chk(t_end - t_start <= 600, $sformatf("cycle too long %0d ns", t_end - t_start));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

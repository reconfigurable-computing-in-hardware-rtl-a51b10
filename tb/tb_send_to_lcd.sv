// tb_send_to_lcd: send_to_lcd driving lcd_controller, observed at the LCD
// pins. The testbench decodes the bus like the display would (the first four
// enable pulses are single nibbles of the 8-bit-mode reset, then nibbles are
// paired high-then-low), checks the initialisation sequence 3,3,3,2, 28, 0C,
// 06, 01, the 15 ms power-on wait and the 37 us gap after each byte, keeps a
// model of DDRAM, and compares the two display lines with data_in, both for
// the first screen and after data_in changes.
module tb_send_to_lcd;
  localparam int unsigned CLK_HZ = 2_000_000;   // 500 ns per clock
  logic clock = 0, reset = 1;
  logic [255:0] data_in;
  logic [3:0] data_out, LCD_DATA;
  logic rs, rw, start, busy, idle, LCD_RS, LCD_RW, LCD_E;
  int checks = 0, failures = 0;

  send_to_lcd    #(.CLK_HZ(CLK_HZ)) u_send (.clock, .reset, .data_in, .data_out, .rs, .rw,
                                            .start, .busy, .idle);
  lcd_controller #(.CLK_HZ(CLK_HZ)) u_ctrl (.clock, .reset, .data_in(data_out), .rs, .rw,
                                            .start, .busy, .LCD_RS, .LCD_RW, .LCD_E, .LCD_DATA);
  always #250 clock = ~clock;

  // display model
  logic [7:0] ddram [128];
  logic [6:0] ac;
  int         n_pulse = 0;
  logic [3:0] hi;
  logic       have_hi = 0;
  logic [7:0] cmds [$];
  longint     t_last = 0, min_gap = 64'h7fff_ffff, t_first = 0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge LCD_E) if (!reset) begin
    n_pulse++;
    if (n_pulse == 1) t_first = $time;
    if (n_pulse <= 4) begin
      cmds.push_back({LCD_DATA, 4'h0});
    end else if (!have_hi) begin
      hi = LCD_DATA; have_hi = 1;
      if (n_pulse > 5 && $time - t_last < min_gap) min_gap = $time - t_last;
    end else begin
      have_hi = 0;
      t_last = $time;
      if (!LCD_RS) begin
        cmds.push_back({hi, LCD_DATA});
        if ({hi, LCD_DATA} & 8'h80) ac = {hi[2:0], LCD_DATA};
      end else begin
        ddram[ac] = {hi, LCD_DATA};
        ac = ac + 1;
      end
    end
  end

  function automatic logic [255:0] screen();
    logic [255:0] s;
    for (int i = 0; i < 16; i++) begin
      s[255 - 8*i -: 8]      = ddram[i];
      s[127 - 8*i -: 8]      = ddram[64 + i];
    end
    return s;
  endfunction

  initial begin
    repeat (400_000) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    static logic [7:0] exp_init [8] = '{8'h30, 8'h30, 8'h30, 8'h20, 8'h28, 8'h0C, 8'h06, 8'h01};
    data_in = {"HELLO SECURE SD ", "LINE TWO TEXT ok"};
    repeat (3) @(posedge clock);
    reset <= 0;
    wait (n_pulse > 0);
    chk(t_first >= 15_000_000, $sformatf("power-on wait %0d ns", t_first));
    @(posedge clock);
    wait (idle);
    chk(cmds.size() >= 10, "command count");
    for (int i = 0; i < 8; i++)
      chk(cmds[i] == exp_init[i], $sformatf("init cmd %0d = %h", i, cmds[i]));
    chk(cmds[8] == 8'h80 && cmds[9] == 8'hC0, "DDRAM address commands");
    chk(screen() == data_in, $sformatf("screen 1 '%s'", screen()));
    chk(min_gap >= 37_000, $sformatf("byte spacing %0d ns", min_gap));
    data_in = {"INCORRECT PIN   ", "                "};
    repeat (3) @(posedge clock);
    chk(!idle, "idle drops on new data");
    wait (idle);
    chk(screen() == data_in, $sformatf("screen 2 '%s'", screen()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

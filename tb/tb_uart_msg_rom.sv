// tb_uart_msg_rom: reads every message through the start table and compares
// it, byte by byte up to the 0x00 end mark, with the expected text written
// out in the testbench; checks that messages do not overlap and that the
// read has one clock of latency.
module tb_uart_msg_rom;
  logic clock = 0;
  logic [3:0] msg_id;
  logic [9:0] msg_start, rd_addr;
  logic [7:0] rd_data;
  int checks = 0, failures = 0;

  uart_msg_rom dut (.*);
  always #5 clock = ~clock;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic string expected(int id);
    case (id)
      1: return "Press \"ENTER\" to continue...\r\n\r\n";
      2: return "\r\nENTER PIN CODE : ";
      3: return "\r\n\r\nCORRECT PIN CODE!\r\n";
      4: return "\r\n\r\nINCORRECT PIN CODE!\r\n";
      6: return "\r\nENTER ENCRYPT PIN CODE : ";
      7: return "\r\nENTER DECRYPT PIN CODE : ";
      10: return "\r\nOPERATION SUCCEEDED!\r\n";
      14: return "\r\nBYE!\r\n";
      default: return "";
    endcase
  endfunction

  task automatic read_msg(int id, output string s, output int start);
    s = "";
    msg_id <= 4'(id); @(posedge clock); #1;
    start = msg_start;
    rd_addr <= msg_start;
    forever begin
      @(posedge clock); #1;
      if (rd_data == 8'h00) break;
      s = {s, string'(rd_data)};
      rd_addr <= rd_addr + 1;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    string s;
    int st, prev_end;
    prev_end = -1;
    for (int id = 0; id < 15; id++) begin
      read_msg(id, s, st);
      chk(st > prev_end, $sformatf("message %0d start %0d after %0d", id, st, prev_end));
      prev_end = st + s.len();
      if (expected(id) != "") chk(s == expected(id), $sformatf("message %0d text '%s'", id, s));
      chk(s.len() > 0, $sformatf("message %0d not empty", id));
    end
    read_msg(0, s, st);
    chk(st == 0 && s.substr(0, 1) == "\r\n", "title at address 0");
    chk(s.len() > 30, "title length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

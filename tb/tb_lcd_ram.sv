// tb_lcd_ram: checks the initial screens of the 32x256 LCD RAM (device name
// at word 0, "INCORRECT PIN" at word 4, spaces in unused words), the
// one-clock read latency, and write-then-read of random words at every
// address against a shadow copy kept by the testbench.
module tb_lcd_ram;
  logic clock = 0, wr_en = 0;
  logic [255:0] wr_data, rd_data;
  logic [4:0] wr_addr, rd_addr;
  logic [255:0] shadow [32];
  int checks = 0, failures = 0;

  lcd_ram dut (.*);
  always #5 clock = ~clock;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rd_addr <= 5'd0; @(posedge clock); #1;
    chk(rd_data == {"SD SECURE DATA  ", "STORAGE DEVICE  "}, "word 0");
    rd_addr <= 5'd4; @(posedge clock); #1;
    chk(rd_data == {"INCORRECT PIN   ", "                "}, "word 4");
    rd_addr <= 5'd31; @(posedge clock); #1;
    chk(rd_data == {32{8'h20}}, "word 31 spaces");
    for (int a = 0; a < 32; a++) begin
      shadow[a] = {8{$urandom}};
      wr_addr <= 5'(a); wr_data <= shadow[a]; wr_en <= 1;
      @(posedge clock);
    end
    wr_en <= 0;
    for (int a = 31; a >= 0; a--) begin
      rd_addr <= 5'(a); @(posedge clock); #1;
      chk(rd_data == shadow[a], $sformatf("word %0d", a));
    end
    // read latency: address changes, data follows one clock later
    rd_addr <= 5'd3; @(posedge clock); #1;
    rd_addr <= 5'd9; #1;
    chk(rd_data == shadow[3], "registered read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

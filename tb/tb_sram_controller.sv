// tb_sram_controller: the controller against the SRAM chip model. Reads the
// preloaded PIN bytes, writes random bytes at random addresses and reads
// them back against a shadow copy, checks that CE/OE/WE are low for at least
// the access time, that the data bus is released outside writes, and that
// LOW_BATT reaches LOW_BATT_STATUS two clocks later.
module tb_sram_controller;
  logic clock = 0, reset = 1;
  logic [7:0] data_in, data_out;
  logic [9:0] addr, SRAM_ADDR;
  logic we = 0, rd = 0, LOW_BATT = 0, busy, SRAM_CE, SRAM_WE, SRAM_OE, LOW_BATT_STATUS;
  wire  [7:0] SRAM_DATA;
  logic [7:0] shadow [1024];
  int checks = 0, failures = 0;
  longint t_fall_we = 0, min_we = 1000000, t_fall_oe = 0, min_oe = 1000000;
  localparam logic [127:0] PIN = {"9876543210AB****"};

  sram_controller #(.CLK_HZ(100_000_000), .ACCESS_NS(70)) dut (.*);
  sram_model #(.T_AA(55), .PIN(PIN)) chip (.*);
  always #5 clock = ~clock;

  always @(negedge SRAM_WE) t_fall_we = $time;
  always @(posedge SRAM_WE) if (!reset && $time - t_fall_we < min_we) min_we = $time - t_fall_we;
  always @(negedge SRAM_OE) t_fall_oe = $time;
  always @(posedge SRAM_OE) if (!reset && $time - t_fall_oe < min_oe) min_oe = $time - t_fall_oe;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_read(logic [9:0] a, output logic [7:0] d);
    addr <= a; rd <= 1; @(posedge clock); rd <= 0;
    @(posedge clock); while (busy) @(posedge clock);
    d = data_out;
  endtask

  task automatic do_write(logic [9:0] a, logic [7:0] d);
    addr <= a; data_in <= d; we <= 1; @(posedge clock); we <= 0;
    @(posedge clock); while (busy) @(posedge clock);
  endtask

  initial begin
    repeat (20000) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [7:0] d;
    logic [9:0] a;
    repeat (3) @(posedge clock);
    reset <= 0;
    repeat (2) @(posedge clock);
    for (int i = 0; i < 16; i++) begin
      do_read(10'(i), d);
      chk(d == PIN[127 - 8*i -: 8], $sformatf("PIN byte %0d = %h", i, d));
    end
    for (int i = 0; i < 1024; i++) shadow[i] = (i < 16) ? PIN[127 - 8*i -: 8] : 8'hFF;
    for (int k = 0; k < 40; k++) begin
      a = 10'($urandom); d = 8'($urandom);
      do_write(a, d); shadow[a] = d;
    end
    for (int k = 0; k < 1024; k += 37) begin
      do_read(10'(k), d);
      chk(d == shadow[k], $sformatf("addr %0d got %h exp %h", k, d, shadow[k]));
    end
    chk(min_we >= 70, $sformatf("WE pulse %0d ns", min_we));
    chk(min_oe >= 70, $sformatf("OE pulse %0d ns", min_oe));
    chk(SRAM_CE && SRAM_OE && SRAM_WE, "idle strobes high");
    LOW_BATT <= 1; @(posedge clock); @(posedge clock); #1;
    chk(LOW_BATT_STATUS, "low battery reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

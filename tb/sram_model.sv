// sram_model: behavioural model of an asynchronous 1k x 8 SRAM chip with
// active-low chip enable, write enable and output enable. A write stores the
// data bus into the addressed byte while CE and WE are both low; the data
// bus is driven with the addressed byte, after T_AA ns, while CE and OE are
// low and WE is high. The PIN parameter preloads bytes 0..15 (first
// character in the top byte); the other bytes start at 0xFF.
module sram_model #(
  parameter int unsigned T_AA = 55,
  parameter logic [127:0] PIN = {"1234************"}
) (
  input  logic [9:0] SRAM_ADDR,
  input  logic       SRAM_CE,
  input  logic       SRAM_WE,
  input  logic       SRAM_OE,
  inout  wire  [7:0] SRAM_DATA
);
  logic [7:0] mem [1024];
  logic       out_en;
  logic [7:0] out_q;

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = 8'hFF;
    for (int i = 0; i < 16; i++)   mem[i] = PIN[127 - 8*i -: 8];
  end

  assign SRAM_DATA = out_en ? out_q : 8'bz;

  always @* begin
    if (!SRAM_CE && !SRAM_WE) mem[SRAM_ADDR] = SRAM_DATA;
  end

  always @(SRAM_ADDR, SRAM_CE, SRAM_OE, SRAM_WE) begin
    out_en = 1'b0;
    if (!SRAM_CE && !SRAM_OE && SRAM_WE) begin
      #(T_AA);
      if (!SRAM_CE && !SRAM_OE && SRAM_WE) begin
        out_q  = mem[SRAM_ADDR];
        out_en = 1'b1;
      end
    end
  end
endmodule

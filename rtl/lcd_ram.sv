// lcd_ram: RAM 32x256 holding the LCD screens, one 32-character screen per
// word (first character in bits [255:248]).
//
// Simple dual-port block RAM: a synchronous write port (wr_en, wr_addr,
// wr_data) and a synchronous read port whose rd_data appears one clock after
// rd_addr. Words 0..11 are initialised with the device's status screens
// (device_pkg::lcd_text, the memory map of this design); the remaining words
// are spaces, free for later use. A write and a read of the same word in the
// same clock return the old word.
module lcd_ram
  import device_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 256
) (
  input  logic                     clock,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = WIDTH'(lcd_text(i));
  end

  always_ff @(posedge clock) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule

// uart_msg_rom: 1k x 8 block memory holding the terminal messages.
//
// The messages of device_pkg::uart_text are packed one after another, each
// ended by a 0x00 byte; a 16-entry table gives the start address of each
// message. Both are filled when the memory is initialised (FPGA block RAM
// contents), by copying the package strings; the rest of the memory is 0x00.
// Reads are synchronous: msg_start follows msg_id, and rd_data follows
// rd_addr, one clock later.
module uart_msg_rom
  import device_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clock,
  input  logic [3:0]               msg_id,
  output logic [$clog2(DEPTH)-1:0] msg_start,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [7:0]               rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [7:0]    mem   [DEPTH];
  logic [AW-1:0] table_start [16];

  initial begin
    automatic int unsigned a = 0;
    automatic string s;
    for (int i = 0; i < DEPTH; i++) mem[i] = 8'h00;
    for (int id = 0; id < 16; id++) begin
      s = uart_text(id);
      table_start[id] = AW'(a);
      for (int k = 0; k < s.len(); k++) begin
        if (a < DEPTH - 1) mem[a] = s[k];
        a++;
      end
      if (a < DEPTH) mem[a] = 8'h00;
      a++;
    end
  end

  always_ff @(posedge clock) begin
    msg_start <= table_start[msg_id];
    rd_data   <= mem[rd_addr];
  end
endmodule

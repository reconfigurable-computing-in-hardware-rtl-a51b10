// uart_msg_sender: sends one terminal message over the UART transmitter.
//
// This is the "message module" of the device controller, generalised: the
// controller gives a message number with a one-clock start pulse, the sender
// looks up the start address in uart_msg_rom, then reads and transmits bytes
// until the terminating 0x00, and pulses ready for one clock at the end.
// Each byte is handed to the UART with tx_data_enable while tx_chn_ready is
// high. busy is high from start to ready. A start while busy is ignored.
module uart_msg_sender (
  input  logic       clock,
  input  logic       reset,
  input  logic       start,
  input  logic [3:0] msg_id,
  output logic       ready,
  output logic       busy,
  output logic [7:0] tx_data,
  output logic       tx_data_enable,
  input  logic       tx_chn_ready
);
  typedef enum logic [2:0] {IDLE, LOOKUP, FIRST, FETCH, CHECK, SEND} snd_state_t;
  snd_state_t st;
  logic [3:0] id_q;
  logic [9:0] addr, msg_start;
  logic [7:0] rd_data;

  uart_msg_rom u_rom (.clock, .msg_id(id_q), .msg_start, .rd_addr(addr), .rd_data);

  assign busy           = (st != IDLE);
  assign tx_data        = rd_data;
  assign tx_data_enable = (st == SEND) && tx_chn_ready;

  always_ff @(posedge clock) begin
    if (reset) begin
      st    <= IDLE;
      id_q  <= '0;
      addr  <= '0;
      ready <= 1'b0;
    end else begin
      ready <= 1'b0;
      unique case (st)
        IDLE:   if (start) begin id_q <= msg_id; st <= LOOKUP; end
        LOOKUP: st <= FIRST;                       // table read
        FIRST:  begin addr <= msg_start; st <= FETCH; end
        FETCH:  st <= CHECK;                       // byte read
        CHECK:  if (rd_data == 8'h00) begin
                  ready <= 1'b1;
                  st    <= IDLE;
                end else st <= SEND;
        SEND:   if (tx_chn_ready) begin
                  addr <= addr + 10'd1;
                  st   <= FETCH;
                end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

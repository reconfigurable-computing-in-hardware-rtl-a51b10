// uart_controller: asynchronous serial port, 8 data bits, no parity, 1 stop
// bit (8N1), least significant bit first.
//
// It holds the four parts of the UART controller: an RX clock generator that
// ticks 16 times per bit, an RX FSM that finds the falling edge of the start
// bit, re-checks it half a bit later and then samples each data bit and the
// stop bit at the bit centre; a TX clock generator that ticks once per bit;
// and a TX FSM that shifts out start bit, data and stop bit. A missing stop
// bit drops the byte and raises frame_error for one cycle.
//
// Interface (names follow the TX/RX-to-controller wiring): tx_data is taken
// when tx_data_enable is high and tx_chn_ready is high; tx_chn_ready is low
// from then until the stop bit has been sent. rx_data_enable pulses for one
// clock with rx_data valid once a frame's stop bit is sampled. The rx pin is
// synchronised with two flip-flops. CLK_HZ and BAUD set the bit time; both
// are choices of this design (100 MHz board clock, 115200 baud).
module uart_controller #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clock,
  input  logic       reset,
  input  logic [7:0] tx_data,
  input  logic       tx_data_enable,
  output logic       tx_chn_ready,
  output logic [7:0] rx_data,
  output logic       rx_data_enable,
  output logic       frame_error,
  input  logic       rx,
  output logic       tx
);
  localparam int unsigned TX_DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned RX_DIV = (CLK_HZ + 8 * BAUD) / (16 * BAUD);
  localparam int unsigned TXW = $clog2(TX_DIV + 1);
  localparam int unsigned RXW = $clog2(RX_DIV + 1);

  // ---------------- RX clock generator: 16 ticks per bit ----------------
  logic [RXW-1:0] rx_cnt;
  logic           rx_tick;
  always_ff @(posedge clock) begin
    if (reset || rx_cnt == RXW'(RX_DIV - 1)) rx_cnt <= '0;
    else                                     rx_cnt <= rx_cnt + 1'b1;
  end
  assign rx_tick = (rx_cnt == RXW'(RX_DIV - 1));

  // ---------------- RX FSM ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_t;
  rx_state_t  rx_st;
  logic [1:0] rx_sync;
  logic [3:0] rx_ticks;
  logic [2:0] rx_bit;
  logic [7:0] rx_shift;

  always_ff @(posedge clock) begin
    if (reset) begin
      rx_sync        <= 2'b11;
      rx_st          <= RX_IDLE;
      rx_ticks       <= '0;
      rx_bit         <= '0;
      rx_shift       <= '0;
      rx_data        <= '0;
      rx_data_enable <= 1'b0;
      frame_error    <= 1'b0;
    end else begin
      rx_sync        <= {rx_sync[0], rx};
      rx_data_enable <= 1'b0;
      frame_error    <= 1'b0;
      if (rx_tick) begin
        unique case (rx_st)
          RX_IDLE: if (!rx_sync[1]) begin
            rx_st    <= RX_START;
            rx_ticks <= 4'd0;
          end
          RX_START: begin
            rx_ticks <= rx_ticks + 4'd1;
            if (rx_ticks == 4'd6) begin          // middle of the start bit
              if (rx_sync[1]) rx_st <= RX_IDLE;  // glitch, not a start bit
              else begin
                rx_st    <= RX_DATA;
                rx_ticks <= 4'd0;
                rx_bit   <= 3'd0;
              end
            end
          end
          RX_DATA: begin
            rx_ticks <= rx_ticks + 4'd1;
            if (rx_ticks == 4'd15) begin         // middle of a data bit
              rx_shift <= {rx_sync[1], rx_shift[7:1]};
              rx_bit   <= rx_bit + 3'd1;
              if (rx_bit == 3'd7) rx_st <= RX_STOP;
            end
          end
          RX_STOP: begin
            rx_ticks <= rx_ticks + 4'd1;
            if (rx_ticks == 4'd15) begin         // middle of the stop bit
              rx_st <= RX_IDLE;
              if (rx_sync[1]) begin
                rx_data        <= rx_shift;
                rx_data_enable <= 1'b1;
              end else begin
                frame_error <= 1'b1;
              end
            end
          end
          default: rx_st <= RX_IDLE;
        endcase
      end
    end
  end

  // ---------------- TX clock generator and TX FSM ----------------
  logic [TXW-1:0] tx_cnt;
  logic [3:0]     tx_bits;      // bits still to send, start..stop = 10
  logic [9:0]     tx_shift;
  logic           tx_busy;

  assign tx_chn_ready = !tx_busy;

  always_ff @(posedge clock) begin
    if (reset) begin
      tx_busy  <= 1'b0;
      tx_cnt   <= '0;
      tx_bits  <= '0;
      tx_shift <= '1;
      tx       <= 1'b1;
    end else if (!tx_busy) begin
      tx <= 1'b1;
      if (tx_data_enable) begin
        tx_busy  <= 1'b1;
        tx_shift <= {1'b1, tx_data, 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= '0;
      end
    end else begin
      if (tx_cnt == '0) begin
        tx       <= tx_shift[0];               // put the next bit on the line
        tx_shift <= {1'b1, tx_shift[9:1]};
      end
      if (tx_cnt == TXW'(TX_DIV - 1)) begin
        tx_cnt  <= '0;
        tx_bits <= tx_bits - 4'd1;
        if (tx_bits == 4'd1) tx_busy <= 1'b0;
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end
    end
  end
endmodule

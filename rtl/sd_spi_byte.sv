// sd_spi_byte: SPI master byte engine for the SD card controller, SPI mode 0
// (clock idles low, data sampled on the rising edge, changed on the falling
// edge), most significant bit first.
//
// start (while busy is low) loads tx_byte; MOSI shows bit 7 at once, and the
// engine then makes eight SCLK periods, each half period lasting half_div
// clocks. MISO is sampled at each rising edge. done pulses for one clock with
// rx_byte, the eight bits read. half_div is an input so the card can be
// clocked slowly during initialisation and fast afterwards; it must be 1 or
// more and is read at start.
module sd_spi_byte #(
  parameter int unsigned DW = 8
) (
  input  logic          clock,
  input  logic          reset,
  input  logic [DW-1:0] half_div,
  input  logic [7:0]    tx_byte,
  input  logic          start,
  output logic [7:0]    rx_byte,
  output logic          busy,
  output logic          done,
  output logic          sclk,
  output logic          mosi,
  input  logic          miso
);
  logic [DW-1:0] cnt, div;
  logic [7:0]    tx_sh;
  logic [2:0]    nbit;

  always_ff @(posedge clock) begin
    if (reset) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      sclk    <= 1'b0;
      mosi    <= 1'b1;
      cnt     <= '0;
      div     <= '0;
      tx_sh   <= '1;
      nbit    <= '0;
      rx_byte <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          tx_sh <= tx_byte;
          mosi  <= tx_byte[7];
          div   <= half_div;
          cnt   <= half_div - 1'b1;
          nbit  <= '0;
        end
      end else if (cnt != '0) begin
        cnt <= cnt - 1'b1;
      end else begin
        cnt <= div - 1'b1;
        if (!sclk) begin                       // rising edge: sample
          sclk    <= 1'b1;
          rx_byte <= {rx_byte[6:0], miso};
        end else begin                         // falling edge: next bit
          sclk  <= 1'b0;
          tx_sh <= {tx_sh[6:0], 1'b1};
          mosi  <= tx_sh[6];
          nbit  <= nbit + 3'd1;
          if (nbit == 3'd7) begin
            busy <= 1'b0;
            done <= 1'b1;
            mosi <= 1'b1;
          end
        end
      end
    end
  end
endmodule

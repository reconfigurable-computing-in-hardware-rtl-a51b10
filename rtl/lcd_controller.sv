// lcd_controller: performs one bus cycle on the 4-bit LCD interface.
//
// On start (accepted while busy is low) it latches rs, rw and the 4-bit
// data_in and drives them on LCD_RS, LCD_RW and LCD_DATA (DB7..DB4). After the
// address set-up time it raises LCD_E for the enable pulse width, lowers it,
// and keeps the bus stable for the hold time and for the rest of the enable
// cycle time. The minimum times are the write-cycle values of the display's
// timing table: t_AS 40 ns, PW_EH 230 ns, t_H 10 ns, t_cycE 500 ns; they
// are converted to clock cycles from CLK_HZ, rounding up. busy is high from
// the clock after start until the enable cycle has ended.
//
// Only write cycles are used by this design (the display's execution times
// are waited out by send_to_lcd instead of polling the busy flag), so the data
// bus is output only; rw is passed to the pin as given.
module lcd_controller #(
  parameter int unsigned CLK_HZ = 100_000_000
) (
  input  logic       clock,
  input  logic       reset,
  input  logic [3:0] data_in,
  input  logic       rs,
  input  logic       rw,
  input  logic       start,
  output logic       busy,
  output logic       LCD_RS,
  output logic       LCD_RW,
  output logic       LCD_E,
  output logic [3:0] LCD_DATA
);
  function automatic int unsigned ns2cyc(longint unsigned ns);
    longint unsigned c;
    c = (ns * longint'(CLK_HZ) + 64'd999_999_999) / 64'd1_000_000_000;
    return (c == 0) ? 1 : int'(c);
  endfunction

  localparam int unsigned T_AS  = ns2cyc(40);
  localparam int unsigned T_PW  = ns2cyc(230);
  localparam int unsigned T_H   = ns2cyc(10);
  localparam int unsigned T_CYC = ns2cyc(500);
  localparam int unsigned T_REST = (T_CYC > T_AS + T_PW + T_H) ? T_CYC - T_AS - T_PW : T_H;
  localparam int unsigned CW = $clog2(T_CYC + T_AS + T_PW + T_H + 2);

  typedef enum logic [1:0] {IDLE, SETUP, PULSE, HOLD} lcd_state_t;
  lcd_state_t     st;
  logic [CW-1:0]  cnt;

  assign busy = (st != IDLE);

  always_ff @(posedge clock) begin
    if (reset) begin
      st       <= IDLE;
      cnt      <= '0;
      LCD_RS   <= 1'b0;
      LCD_RW   <= 1'b0;
      LCD_E    <= 1'b0;
      LCD_DATA <= '0;
    end else begin
      unique case (st)
        IDLE: if (start) begin
          LCD_RS   <= rs;
          LCD_RW   <= rw;
          LCD_DATA <= data_in;
          cnt      <= CW'(T_AS - 1);
          st       <= SETUP;
        end
        SETUP: if (cnt == '0) begin
          LCD_E <= 1'b1;
          cnt   <= CW'(T_PW - 1);
          st    <= PULSE;
        end else cnt <= cnt - 1'b1;
        PULSE: if (cnt == '0) begin
          LCD_E <= 1'b0;
          cnt   <= CW'(T_REST - 1);
          st    <= HOLD;
        end else cnt <= cnt - 1'b1;
        HOLD: if (cnt == '0) st <= IDLE;
              else cnt <= cnt - 1'b1;
        default: st <= IDLE;
      endcase
    end
  end
endmodule

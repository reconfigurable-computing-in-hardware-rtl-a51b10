// send_to_lcd: initialises the character LCD in 4-bit mode and copies a
// 32-character screen to it, nibble by nibble, through lcd_controller.
//
// After reset it waits the display's power-on time (15 ms) and runs the
// 4-bit initialisation: the nibble 0x3 three times (waits 4.1 ms, 100 us,
// 37 us), the nibble 0x2, then Function set 0x28 (4 bits, 2 lines, 5x8 dots),
// Display on 0x0C, Entry mode 0x06 (increment, no shift) and Clear display
// 0x01 (1.52 ms). It then writes a screen: Set DDRAM address 0x80, the 16
// characters of line 1, Set DDRAM address 0xC0, the 16 characters of line 2.
// Every byte is sent high nibble first, as two lcd_controller cycles, and is
// followed by its execution time from the instruction table (37 us). The
// screen is a snapshot of data_in (character 0 in bits [255:248]); whenever
// data_in differs from the snapshot shown, the screen is written again.
// idle is high when the display shows data_in.
//
// Waiting out fixed execution times instead of reading the busy flag is a
// choice of this design; the timing constants scale with CLK_HZ.
module send_to_lcd #(
  parameter int unsigned CLK_HZ = 100_000_000
) (
  input  logic         clock,
  input  logic         reset,
  input  logic [255:0] data_in,
  output logic [3:0]   data_out,
  output logic         rs,
  output logic         rw,
  output logic         start,
  input  logic         busy,
  output logic         idle
);
  function automatic int unsigned us2cyc(longint unsigned us);
    longint unsigned c;
    c = (us * longint'(CLK_HZ) + 64'd999_999) / 64'd1_000_000;
    return (c == 0) ? 1 : int'(c);
  endfunction

  localparam int unsigned T_POWER = us2cyc(15_000);
  localparam int unsigned T_4100  = us2cyc(4_100);
  localparam int unsigned T_100   = us2cyc(100);
  localparam int unsigned T_EXEC  = us2cyc(37);
  localparam int unsigned T_CLEAR = us2cyc(1_520);
  localparam int unsigned DW = $clog2(T_POWER + 1);

  localparam int unsigned INIT_STEPS  = 8;
  localparam int unsigned WRITE_STEPS = 34;   // 2 addresses + 32 characters

  typedef enum logic [2:0] {S_POWER, S_ISSUE, S_GAP, S_WAITC, S_DELAY, S_IDLE} st_t;
  st_t            st;
  logic           writing;      // 0: init program, 1: screen write
  logic [5:0]     idx;
  logic           lo_nib;       // 0: high nibble next, 1: low nibble next
  logic [DW-1:0]  dly;
  logic [255:0]   shown;

  // current step: byte, register select, nibble-only flag, wait after it
  logic [7:0]     s_byte;
  logic           s_rs, s_nib_only;
  logic [DW-1:0]  s_wait;

  always_comb begin
    s_byte     = 8'h00;
    s_rs       = 1'b0;
    s_nib_only = 1'b0;
    s_wait     = DW'(T_EXEC);
    if (!writing) begin
      unique case (idx)
        6'd0: begin s_byte = 8'h30; s_nib_only = 1'b1; s_wait = DW'(T_4100); end
        6'd1: begin s_byte = 8'h30; s_nib_only = 1'b1; s_wait = DW'(T_100);  end
        6'd2: begin s_byte = 8'h30; s_nib_only = 1'b1; end
        6'd3: begin s_byte = 8'h20; s_nib_only = 1'b1; end
        6'd4: s_byte = 8'h28;                               // function set
        6'd5: s_byte = 8'h0C;                               // display on
        6'd6: s_byte = 8'h06;                               // entry mode
        default: begin s_byte = 8'h01; s_wait = DW'(T_CLEAR); end   // clear
      endcase
    end else if (idx == 6'd0) begin
      s_byte = 8'h80;                                       // DDRAM line 1
    end else if (idx == 6'd17) begin
      s_byte = 8'hC0;                                       // DDRAM line 2
    end else begin
      s_rs   = 1'b1;
      s_byte = (idx <= 6'd16) ? shown[255 - 8*(32'(idx) - 1) -: 8]
                              : shown[255 - 8*(32'(idx) - 2) -: 8];
    end
  end

  assign rw       = 1'b0;
  assign rs       = s_rs;
  assign data_out = lo_nib ? s_byte[3:0] : s_byte[7:4];
  assign start    = (st == S_ISSUE);
  assign idle     = (st == S_IDLE) && (data_in == shown);

  always_ff @(posedge clock) begin
    if (reset) begin
      st      <= S_POWER;
      writing <= 1'b0;
      idx     <= '0;
      lo_nib  <= 1'b0;
      dly     <= DW'(T_POWER - 1);
      shown   <= '0;
    end else begin
      unique case (st)
        S_POWER: if (dly == '0) st <= S_ISSUE;
                 else dly <= dly - 1'b1;
        S_ISSUE: if (!busy) st <= S_GAP;          // start is high this cycle
        S_GAP:   st <= S_WAITC;                   // controller raises busy
        S_WAITC: if (!busy) begin
          if (!s_nib_only && !lo_nib) begin
            lo_nib <= 1'b1;
            st     <= S_ISSUE;
          end else begin
            lo_nib <= 1'b0;
            dly    <= s_wait - 1'b1;
            st     <= S_DELAY;
          end
        end
        S_DELAY: if (dly != '0) dly <= dly - 1'b1;
        else if (!writing && idx == 6'(INIT_STEPS - 1)) begin
          writing <= 1'b1;
          idx     <= '0;
          shown   <= data_in;
          st      <= S_ISSUE;
        end else if (writing && idx == 6'(WRITE_STEPS - 1)) begin
          st <= S_IDLE;
        end else begin
          idx <= idx + 6'd1;
          st  <= S_ISSUE;
        end
        S_IDLE: if (data_in != shown) begin
          shown <= data_in;
          idx   <= '0;
          st    <= S_ISSUE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule

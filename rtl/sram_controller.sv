// sram_controller: SRAM1kx8 controller for the external asynchronous 1k x 8
// SRAM that keeps the authentication PIN.
//
// A request is taken while busy is low: rd starts a read cycle, we (with
// data_in) a write cycle, both at addr. The controller drives SRAM_ADDR and
// asserts SRAM_CE, and SRAM_OE for a read or SRAM_WE for a write, for
// ACCESS_NS (rounded up to whole clocks); a read then latches SRAM_DATA into
// data_out. A write releases SRAM_WE one clock before SRAM_CE and keeps
// driving SRAM_DATA during that clock, so data is held past the end of the
// write pulse. busy is high from the clock after the request until data_out
// is valid or the write has ended. SRAM_DATA is bidirectional: driven only
// during write cycles, high impedance otherwise.
//
// SRAM_CE, SRAM_WE and SRAM_OE are active low, the usual convention for
// asynchronous SRAM chips. LOW_BATT, the backup-battery warning of the SRAM,
// is synchronised with two flip-flops and reported on LOW_BATT_STATUS. The
// access time and the polarity are choices of this design.
module sram_controller #(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned ACCESS_NS = 70,
  parameter int unsigned AW        = 10
) (
  input  logic          clock,
  input  logic          reset,
  input  logic [7:0]    data_in,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic          rd,
  input  logic          LOW_BATT,
  output logic [7:0]    data_out,
  output logic          busy,
  output logic [AW-1:0] SRAM_ADDR,
  output logic          SRAM_CE,
  output logic          SRAM_WE,
  output logic          SRAM_OE,
  inout  wire  [7:0]    SRAM_DATA,
  output logic          LOW_BATT_STATUS
);
  localparam longint unsigned ACC = (longint'(ACCESS_NS) * longint'(CLK_HZ) + 64'd999_999_999)
                                    / 64'd1_000_000_000;
  localparam int unsigned ACCESS_CYCLES = (ACC == 0) ? 1 : int'(ACC);
  localparam int unsigned CW = $clog2(ACCESS_CYCLES + 1);

  typedef enum logic [1:0] {IDLE, READ, WRITE, WHOLD} sram_state_t;
  sram_state_t   st;
  logic [CW-1:0] cnt;
  logic [7:0]    wdata;
  logic          drive;
  logic [1:0]    batt_sync;

  assign SRAM_DATA = drive ? wdata : 8'bz;
  assign busy      = (st != IDLE);

  always_ff @(posedge clock) begin
    if (reset) begin
      st        <= IDLE;
      cnt       <= '0;
      wdata     <= '0;
      drive     <= 1'b0;
      data_out  <= '0;
      SRAM_ADDR <= '0;
      SRAM_CE   <= 1'b1;
      SRAM_WE   <= 1'b1;
      SRAM_OE   <= 1'b1;
    end else begin
      unique case (st)
        IDLE: begin
          if (we) begin
            SRAM_ADDR <= addr;
            wdata     <= data_in;
            drive     <= 1'b1;
            SRAM_CE   <= 1'b0;
            SRAM_WE   <= 1'b0;
            cnt       <= CW'(ACCESS_CYCLES - 1);
            st        <= WRITE;
          end else if (rd) begin
            SRAM_ADDR <= addr;
            SRAM_CE   <= 1'b0;
            SRAM_OE   <= 1'b0;
            cnt       <= CW'(ACCESS_CYCLES - 1);
            st        <= READ;
          end
        end
        READ: if (cnt == '0) begin
          data_out <= SRAM_DATA;
          SRAM_CE  <= 1'b1;
          SRAM_OE  <= 1'b1;
          st       <= IDLE;
        end else cnt <= cnt - 1'b1;
        WRITE: if (cnt == '0) begin
          SRAM_WE <= 1'b1;
          st      <= WHOLD;
        end else cnt <= cnt - 1'b1;
        WHOLD: begin
          SRAM_CE <= 1'b1;
          drive   <= 1'b0;
          st      <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clock) begin
    if (reset) batt_sync <= '0;
    else       batt_sync <= {batt_sync[0], LOW_BATT};
  end
  assign LOW_BATT_STATUS = batt_sync[1];
endmodule

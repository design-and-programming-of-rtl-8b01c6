// spi_master: SPI master used by a STAMP unit to talk to its three ADCs.
//
// One transfer shifts NBITS (1..32) bits out of tx_data, MSB first, while
// shifting the same number of bits in from MISO. The bus runs in SPI mode 1
// (CPOL=0, CPHA=1), as the ADS114x converters require: MOSI changes on the
// rising SCLK edge, MISO is sampled on the falling edge. The fabric clock is
// much faster than the converters' SPI timing allows, so SCLK is derived
// with a prescaler (HALF_PERIOD fabric cycles per SCLK phase) and three
// countdown timers keep the chip-select setup time before the first edge,
// the hold time after the last edge and a minimum CS-high gap between
// transfers. Several chip selects may be asserted at once (cs_mask), which
// lets a command be written to more than one ADC in the same transfer.
//
// Interface: pulse start for one cycle while busy is low; busy stays high
// until the transfer and its gap are complete, and done pulses for one cycle
// with rx_data holding the received bits right-aligned.
// Timing: a transfer takes CS_SETUP + 2*NBITS*HALF_PERIOD + CS_HOLD + CS_GAP
// cycles after start (+1 cycle to leave idle).
//
// The document only names a prescaled SPI master with countdown timers; the
// SPI mode follows the converter family, the timer values are this design's
// choice (at 50 MHz: 1.5625 MHz SCLK, 0.64 us CS setup, hold and gap).
module spi_master #(
  parameter int unsigned HALF_PERIOD = 16,
  parameter int unsigned CS_SETUP    = 32,
  parameter int unsigned CS_HOLD     = 32,
  parameter int unsigned CS_GAP      = 32,
  parameter int unsigned N_CS        = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [N_CS-1:0] cs_mask,
  input  logic [5:0]      nbits,     // 1..32
  input  logic [31:0]     tx_data,   // first bit sent is tx_data[31]
  output logic            busy,
  output logic            done,
  output logic [31:0]     rx_data,
  output logic            sclk,
  output logic            mosi,
  input  logic            miso,
  output logic [N_CS-1:0] cs_n
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_HIGH, S_LOW, S_HOLD, S_GAP} state_e;

  localparam int unsigned TW = $clog2(CS_SETUP + CS_HOLD + CS_GAP + HALF_PERIOD + 2);

  state_e          state;
  logic [TW-1:0]   timer;
  logic [5:0]      bits_left;
  logic [31:0]     tx_sr;
  logic [31:0]     rx_sr;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      timer     <= '0;
      bits_left <= '0;
      tx_sr     <= '0;
      rx_sr     <= '0;
      rx_data   <= '0;
      sclk      <= 1'b0;
      mosi      <= 1'b1;
      cs_n      <= '1;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            cs_n      <= ~cs_mask;
            tx_sr     <= tx_data;
            rx_sr     <= '0;
            bits_left <= (nbits == 6'd0) ? 6'd1 : nbits;
            timer     <= TW'(CS_SETUP - 1);
            state     <= S_SETUP;
          end
        end
        S_SETUP: begin
          if (timer != '0) timer <= timer - 1'b1;
          else begin
            sclk  <= 1'b1;               // rising edge: present next bit
            mosi  <= tx_sr[31];
            tx_sr <= {tx_sr[30:0], 1'b1};
            timer <= TW'(HALF_PERIOD - 1);
            state <= S_HIGH;
          end
        end
        S_HIGH: begin
          if (timer != '0) timer <= timer - 1'b1;
          else begin
            sclk      <= 1'b0;           // falling edge: sample MISO
            rx_sr     <= {rx_sr[30:0], miso};
            bits_left <= bits_left - 1'b1;
            timer     <= TW'(HALF_PERIOD - 1);
            state     <= S_LOW;
          end
        end
        S_LOW: begin
          if (timer != '0) timer <= timer - 1'b1;
          else if (bits_left != '0) begin
            sclk  <= 1'b1;
            mosi  <= tx_sr[31];
            tx_sr <= {tx_sr[30:0], 1'b1};
            timer <= TW'(HALF_PERIOD - 1);
            state <= S_HIGH;
          end else begin
            timer <= TW'(CS_HOLD - 1);
            state <= S_HOLD;
          end
        end
        S_HOLD: begin
          if (timer != '0) timer <= timer - 1'b1;
          else begin
            cs_n    <= '1;
            mosi    <= 1'b1;
            rx_data <= rx_sr;
            timer   <= TW'(CS_GAP - 1);
            state   <= S_GAP;
          end
        end
        S_GAP: begin
          if (timer != '0) timer <= timer - 1'b1;
          else begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A start request is only legal while the master is idle
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("spi_master: start while busy");

endmodule

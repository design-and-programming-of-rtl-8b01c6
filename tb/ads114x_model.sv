// ads114x_model: behavioural model of one 16-bit delta-sigma ADC of the
// ADS114x family as seen from its digital pins, for simulation only (not
// synthesizable intent, not a model of the analog front end).
//
// Conversions: every PERIOD cycles of clk (the shared ADC clock) a conversion
// finishes; the result is BASE + number of conversions so far (16 bits) and
// drdy_n goes low one cycle later (it is first pulsed high if still low).
// The first conversion ends PHASE cycles after reset or after start_n
// returns high. While start_n is low the conversion is held in reset,
// which is what a shared START line does to re-align several converters.
// DEAD = 1 makes a converter that never finishes a conversion.
// SPI (mode 1): while cs_n is low the model shifts out {result, result},
// MSB first, changing MISO after each rising SCLK edge, and shifts in MOSI on
// each falling edge. The first SCLK edge of an access releases drdy_n. On the
// rising edge of cs_n the received word is kept in last_rx. If any received
// byte is a calibration command (0x60..0x62) the converter is busy for
// CAL_CYCLES and then signals data ready again. The model samples SCLK and
// CS with clk, so SCLK phases must last at least two clk cycles.
module ads114x_model #(
  parameter int unsigned PERIOD     = 1000,
  parameter int unsigned PHASE      = 1000,
  parameter logic [15:0] BASE       = 16'h1000,
  parameter int unsigned CAL_CYCLES = 3000,
  parameter bit          DEAD       = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_n,
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        mosi,
  output logic        miso,
  output logic        miso_oe,
  output logic        drdy_n,
  output logic [15:0] result,       // last finished conversion
  output logic [31:0] last_rx,      // last word received over SPI
  output logic [31:0] last_tx,      // word shifted out during that access
  output int unsigned n_conv,
  output int unsigned n_access
);

  int unsigned cnt;
  int unsigned cal;
  logic        sclk_q, cs_q, edge_seen, drdy_set;
  logic [31:0] tx_sr, rx_sr, tx_word;
  int unsigned nbits;

  assign miso_oe = !cs_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0; cal <= 0; drdy_n <= 1'b1; result <= BASE; n_conv <= 0; n_access <= 0;
      sclk_q <= 1'b0; cs_q <= 1'b1; edge_seen <= 1'b0; drdy_set <= 1'b0;
      tx_sr <= '0; rx_sr <= '0; tx_word <= '0; last_rx <= '0; last_tx <= '0; miso <= 1'b0;
      nbits <= 0;
    end else begin
      sclk_q <= sclk;
      cs_q   <= cs_n;
      drdy_set <= 1'b0;
      if (drdy_set) drdy_n <= 1'b0;
      // ---- conversions
      if (!start_n) begin
        cnt <= 0;
      end else if (cal != 0) begin
        cal <= cal - 1;
        if (cal == 1) begin drdy_n <= 1'b0; cnt <= 0; end
      end else if (!DEAD) begin
        if (cnt + 1 >= ((n_conv == 0) ? PHASE : PERIOD)) begin
          cnt    <= 0;
          result <= BASE + 16'(n_conv);
          n_conv <= n_conv + 1;
          drdy_n <= 1'b1;          // unread data: DRDY pulses high first
          drdy_set <= 1'b1;
        end else cnt <= cnt + 1;
      end
      // ---- SPI
      if (cs_q && !cs_n) begin
        tx_sr     <= {result, result};
        tx_word   <= {result, result};
        rx_sr     <= '0;
        nbits     <= 0;
        edge_seen <= 1'b0;
      end
      if (!cs_n && sclk && !sclk_q) begin
        miso  <= tx_sr[31];
        tx_sr <= {tx_sr[30:0], 1'b0};
        if (!edge_seen) begin drdy_n <= 1'b1; edge_seen <= 1'b1; end
      end
      if (!cs_n && !sclk && sclk_q) begin
        rx_sr <= {rx_sr[30:0], mosi};
        nbits <= nbits + 1;
      end
      if (!cs_q && cs_n) begin
        last_rx  <= rx_sr;
        last_tx  <= (nbits >= 32) ? tx_word : (tx_word >> (32 - nbits));
        n_access <= n_access + 1;
        for (int b = 0; b < 4; b++)
          if (nbits >= 8*(b+1) && rx_sr[8*b +: 8] inside {8'h60, 8'h61, 8'h62}) begin
            cal    <= CAL_CYCLES;
            drdy_n <= 1'b1;
          end
      end
    end
  end

endmodule

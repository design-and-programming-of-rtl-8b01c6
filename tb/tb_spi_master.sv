// tb_spi_master: self-checking test of the prescaled mode-1 SPI master.
//
// A small SPI slave written here samples MOSI on falling SCLK edges and
// drives MISO from its own pattern after rising edges. For random words,
// lengths (1..32 bits) and chip-select masks the test checks the bits the
// slave received, the bits the master received, the chip selects, that SCLK
// idles low, and that each transfer takes exactly
// CS_SETUP + 2*NBITS*HALF + CS_HOLD + CS_GAP + 1 cycles from start to done.
module tb_spi_master;
  localparam int unsigned HALF = 3, SETUP = 4, HOLD = 3, GAP = 2;

  logic clk = 0, rst_n = 0;
  logic start;
  logic [2:0] cs_mask;
  logic [5:0] nbits;
  logic [31:0] tx, rx;
  logic busy, done, sclk, mosi, miso;
  logic [2:0] cs_n;
  int checks = 0, failures = 0;

  spi_master #(.HALF_PERIOD(HALF), .CS_SETUP(SETUP), .CS_HOLD(HOLD), .CS_GAP(GAP), .N_CS(3)) dut (
    .clk, .rst_n, .start, .cs_mask, .nbits, .tx_data(tx), .busy, .done, .rx_data(rx),
    .sclk, .mosi, .miso, .cs_n);

  always #5 clk = ~clk;

  // slave model
  logic [31:0] s_rx, s_tx;
  int          s_edges;
  logic [2:0]  cs_seen;
  always @(negedge sclk) if (cs_n != 3'b111) begin s_rx = {s_rx[30:0], mosi}; end
  always @(posedge sclk) if (cs_n != 3'b111) begin miso = s_tx[31]; s_tx = {s_tx[30:0], 1'b0}; s_edges++; end
  always @(posedge clk) if (cs_n != 3'b111) cs_seen = cs_n;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cs_mask = 0; nbits = 0; tx = 0; miso = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(cs_n == 3'b111 && sclk == 0 && !busy, "idle levels after reset");
    for (int t = 0; t < 40; t++) begin
      logic [31:0] word, pat, exp_m, exp_s;
      int n, cyc;
      logic [2:0] m;
      word = $urandom; pat = $urandom;
      n = (t < 3) ? (t == 0 ? 16 : (t == 1 ? 32 : 1)) : 1 + ($urandom % 32);
      m = 3'($urandom % 7) + 3'd1;
      s_tx = pat; s_rx = '0; s_edges = 0; cs_seen = '1;
      @(negedge clk);
      tx = word; nbits = 6'(n); cs_mask = m; start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      exp_s = (n == 32) ? word : (word >> (32 - n));
      exp_m = (n == 32) ? pat  : (pat  >> (32 - n));
      check(s_rx == exp_s, $sformatf("MOSI bits n=%0d got %h exp %h", n, s_rx, exp_s));
      check(rx == exp_m, $sformatf("MISO bits n=%0d got %h exp %h", n, rx, exp_m));
      check(s_edges == n, $sformatf("SCLK edges %0d exp %0d", s_edges, n));
      check(cs_seen == ~m, "chip select mask");
      check(cyc == SETUP + 2*n*HALF + HOLD + GAP + 1,
            $sformatf("transfer cycles %0d exp %0d", cyc, SETUP + 2*n*HALF + HOLD + GAP + 1));
      check(cs_n == 3'b111 && sclk == 0, "bus idle after transfer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

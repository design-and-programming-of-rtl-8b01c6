// tb_stamp: self-checking test of one STAMP unit with three ADC models.
//
// The two SGR converters run with the same period but SGR2 finishes SKEW
// cycles after SGR1; the RTD converter runs three times slower. The test
// drives APB3 transfers like the MSS and checks, against values taken from
// the ADC models:
//   configuration and scratch registers, read-only ID;
//   pass-through writes to two ADCs at once and reads from one ADC, the
//   last-MISO command, and the polling modifier holding PREADY through an
//   ADC calibration;
//   continuous mode: frame contents after every data_avail, one data_avail
//   per SGR conversion period, N/O flags against counted readouts, the
//   signed skew value, RR and sync_req against two thresholds;
//   the atomic modifier freezing the frame, the status-reset modifier, and
//   the soft reset bit.
module tb_stamp;
  import hermess_pkg::*;

  localparam int unsigned PER   = 2000;
  localparam int unsigned SKEW  = 40;
  localparam int unsigned PRESC = 4;
  localparam int unsigned CAL   = 3000;
  localparam logic [2:0]  MYID  = 3'd5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  apb_req_t req;
  apb_rsp_t rsp;
  logic sclk, mosi, miso;
  logic [2:0] cs_n, drdy_n;
  stamp_frame_t frame;
  logic data_avail, sync_req;

  stamp #(.ID(MYID), .ASYNC_PRESCALE(PRESC), .SPI_HALF(2), .SPI_CS_SETUP(2),
          .SPI_CS_HOLD(2), .SPI_CS_GAP(2)) dut (
    .clk, .rst_n, .apb_req(req), .apb_rsp(rsp),
    .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso), .adc_cs_n(cs_n), .adc_drdy_n(drdy_n),
    .frame, .data_avail, .sync_req);

  logic [2:0]  m_miso, m_oe;
  logic [15:0] m_res [3];
  logic [31:0] m_rx [3], m_tx [3];
  int unsigned m_conv [3], m_acc [3];

  ads114x_model #(.PERIOD(PER), .PHASE(3000), .BASE(16'h1100), .CAL_CYCLES(CAL)) adc0 (
    .clk, .rst_n, .start_n(1'b1), .cs_n(cs_n[0]), .sclk, .mosi, .miso(m_miso[0]), .miso_oe(m_oe[0]),
    .drdy_n(drdy_n[0]), .result(m_res[0]), .last_rx(m_rx[0]), .last_tx(m_tx[0]),
    .n_conv(m_conv[0]), .n_access(m_acc[0]));
  ads114x_model #(.PERIOD(PER), .PHASE(3000 + SKEW), .BASE(16'h2200), .CAL_CYCLES(CAL)) adc1 (
    .clk, .rst_n, .start_n(1'b1), .cs_n(cs_n[1]), .sclk, .mosi, .miso(m_miso[1]), .miso_oe(m_oe[1]),
    .drdy_n(drdy_n[1]), .result(m_res[1]), .last_rx(m_rx[1]), .last_tx(m_tx[1]),
    .n_conv(m_conv[1]), .n_access(m_acc[1]));
  ads114x_model #(.PERIOD(3*PER), .PHASE(4000), .BASE(16'h3300), .CAL_CYCLES(CAL)) adc2 (
    .clk, .rst_n, .start_n(1'b1), .cs_n(cs_n[2]), .sclk, .mosi, .miso(m_miso[2]), .miso_oe(m_oe[2]),
    .drdy_n(drdy_n[2]), .result(m_res[2]), .last_rx(m_rx[2]), .last_tx(m_tx[2]),
    .n_conv(m_conv[2]), .n_access(m_acc[2]));

  assign miso = |(m_miso & m_oe);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb(input bit wr, input logic [11:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output int n);
    @(negedge clk);
    req.psel = 1; req.penable = 0; req.pwrite = wr; req.paddr = a; req.pwdata = wd;
    @(negedge clk);
    req.penable = 1;
    n = 0;
    do begin @(posedge clk); n++; end while (!rsp.pready);
    rd = rsp.prdata;
    @(negedge clk);
    req.psel = 0; req.penable = 0;
  endtask

  // data_avail bookkeeping
  int unsigned n_avail = 0, last_avail_cyc = 0, n_period_ok = 0, n_period_bad = 0;
  logic avail_q = 0;
  always @(posedge clk) begin
    avail_q <= data_avail;
    if (data_avail && !avail_q) begin
      if (n_avail > 0) begin
        if (cyc - last_avail_cyc == PER) n_period_ok++; else n_period_bad++;
      end
      n_avail++;
      last_avail_cyc = cyc;
    end
  end

  task automatic wait_avail();
    @(posedge data_avail);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    logic [31:0] rd;
    int n;
    stamp_status_t s;
    int unsigned acc0 [3];
    logic [15:0] frozen;

    req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // ---- registers
    apb(0, 12'h200, 0, rd, n);
    check(rd == {29'd0, MYID}, $sformatf("config after reset %h", rd));
    check(n == 2, $sformatf("register access wait states %0d", n));
    apb(1, 12'h200, 32'h0F12_3458, rd, n);
    apb(0, 12'h200, 0, rd, n);
    check(rd == {32'h0F12_3458 & 32'h7FFF_FFF8} | 32'(MYID), $sformatf("config readback %h", rd));
    apb(1, 12'h200, 32'h0, rd, n);
    apb(1, 12'h380, 32'hCAFE_F00D, rd, n);
    apb(0, 12'h380, 0, rd, n);
    check(rd == 32'hCAFE_F00D, "dummy register");
    apb(0, 12'h000, 0, rd, n);
    check(rd == 0 && n == 2, "NOP command");

    // ---- pass-through to two ADCs at once
    apb(1, 12'h030, 32'h4201_0203, rd, n);
    check(m_rx[0] == 32'h4201_0203 && m_rx[1] == 32'h4201_0203, "write to SGR1 and SGR2");
    check(m_acc[2] == 0, "RTD not selected");
    check(n == 3 + 2 + 2*32*2 + 2 + 2 + 1, $sformatf("ADC command cycles %0d", n));
    // read from the RTD converter
    apb(0, 12'h040, 0, rd, n);
    check(m_rx[2] == 32'hFFFF_FFFF, "read sends NOP words");
    check(rd == m_tx[2], $sformatf("ADC read data %h exp %h", rd, m_tx[2]));
    apb(0, 12'h080, 0, rd, n);
    check(rd == m_tx[2], "last MISO word");
    // calibration with polling modifier: PREADY only after DRDY returns
    apb(1, 12'h0C0, 32'h62FF_FFFF, rd, n);
    check(n > CAL, $sformatf("polling held the bus %0d cycles", n));
    check(drdy_n[2] == 1'b0, "RTD data ready after polling");

    // ---- continuous mode, threshold 5
    apb(1, 12'h200, 32'h4500_0000, rd, n);
    wait_avail();
    apb(0, 12'h580, 0, rd, n);           // reset status after reading
    acc0 = m_acc;
    n_avail = 0; n_period_ok = 0; n_period_bad = 0;
    for (int r = 0; r < 6; r++) begin
      wait_avail();
      check(frame.sgr1 == m_res[0] && frame.sgr2 == m_res[1],
            $sformatf("frame SGR values %h %h exp %h %h", frame.sgr1, frame.sgr2, m_res[0], m_res[1]));
      apb(0, 12'h100, 0, rd, n);
      check(rd == {m_res[0], m_res[1]}, $sformatf("APB SGR readout %h", rd));
      apb(0, 12'h180, 0, rd, n);
      s = rd[15:0];
      check(rd[31:16] == frame.rtd, "APB RTD readout");
      check(s.id == MYID, "status ID");
      for (int i = 0; i < 3; i++) begin
        check(s.newval[2-i] == (m_acc[i] - acc0[i] >= 1), $sformatf("N%0d flag", i+1));
        check(s.overwr[2-i] == (m_acc[i] - acc0[i] >= 2), $sformatf("O%0d flag", i+1));
      end
      check($signed(s.async_cyc) == 6'((SKEW - 1) / PRESC), $sformatf("async cycles %0d", $signed(s.async_cyc)));
      check(s.rr && sync_req, "RR above threshold");
    end
    check(frame.rtd == m_res[2], "RTD value captured");
    check(n_period_ok >= 5 && n_period_bad == 0,
          $sformatf("data_avail once per period ok=%0d bad=%0d", n_period_ok, n_period_bad));

    // status reset modifier clears N/O
    apb(0, 12'h580, 0, rd, n);
    s = rd[15:0];
    check(s.newval[2:1] == 2'b11 && s.overwr[2:1] == 2'b11, "flags before status reset");
    apb(0, 12'h180, 0, rd, n);
    s = rd[15:0];
    check(s.newval == 0 && s.overwr == 0 && !s.rr, "flags after status reset");

    // threshold above the skew: RR drops after the next pair
    apb(1, 12'h200, 32'h5400_0000, rd, n);
    wait_avail();
    check(!sync_req && !frame.status.rr, "RR clears below threshold");
    check($signed(frame.status.async_cyc) == 6'((SKEW - 1) / PRESC), "skew still recorded");

    // ---- atomic modifier freezes the frame across a conversion
    apb(0, 12'h900, 0, rd, n);           // atomic + SGR readout
    frozen = rd[31:16];
    repeat (PER + 300) @(posedge clk);
    check(frame.sgr1 == frozen && m_res[0] != frozen, "frame frozen while atomic");
    apb(0, 12'h180, 0, rd, n);           // follow-up command releases the hold
    repeat (400) @(posedge clk);
    check(frame.sgr1 == m_res[0], "pending readout served after atomic");

    // ---- soft reset
    apb(1, 12'h200, 32'h8000_0000, rd, n);
    apb(0, 12'h200, 0, rd, n);
    check(rd == {29'd0, MYID}, $sformatf("config after soft reset %h", rd));
    check(frame.sgr1 == 0 && frame.sgr2 == 0 && frame.status.newval == 0, "frame cleared by soft reset");
    n = n_avail;
    repeat (2 * PER) @(posedge clk);
    check(n_avail == n, "no readout after soft reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

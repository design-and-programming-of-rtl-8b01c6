// tb_hermess_fabric_full: the SPU fabric at its real size and timing.
//
// hermess_fabric is instantiated without parameter overrides: six STAMPs,
// 50 MHz clock, 100 us timestamp tick, 300 us resync threshold, 1 s hold-off,
// 5 ms failure timeout, SPI clock of 1.5625 MHz. Eighteen ADC models run at
// the flight rates: SGR converters at 2 kHz (25 000 clock cycles), RTD
// converters at 10 Hz. The test configures all ADCs and STAMPs like the
// flight software, then reads packages over APB3 and checks
//   - the package layout, IDs and measured values against the ADC models,
//   - one package per SGR period (timestamp step of 5 ticks = 500 us),
//   - offsets of at most one tick while all ADCs run in step,
//   - a 10 us skew inside STAMP3 raising its sync request, followed by a
//     CSTART pulse and the FS resync bit, and the skew gone afterwards,
//   - a dead SGR converter on STAMP6 marked failed after 5 ms,
//   - no hard reset for a single failure,
//   - STAMP5 falling 400 us behind: packages slower than 300 us, and the
//     next resync exactly when the 1 s hold-off since the last one has ended,
//   - three more dead converters: hard reset pulse.
// About 51 million clock cycles (just over 1 s of flight time) are simulated.
module tb_hermess_fabric_full;
  import hermess_pkg::*;

  localparam int unsigned NS     = N_STAMPS;
  localparam int unsigned PER    = 25_000;      // 2 kHz at 50 MHz
  localparam int unsigned PER_RTD = 5_000_000;  // 10 Hz

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;                       // one 50 MHz cycle = 20 time units

  logic        psel, penable, pwrite, pready, pslverr;
  logic [31:0] paddr, pwdata, prdata;
  logic [NS-1:0]      sclk, mosi, miso;
  logic [NS-1:0][2:0] cs_n, drdy_n;
  logic        cstart_n, hard_reset_n;
  logic [NS:0] f2m;

  hermess_fabric dut (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso), .adc_cs_n(cs_n), .adc_drdy_n(drdy_n),
    .cstart_n, .hard_reset_n, .f2m_irq(f2m));

  logic [NS-1:0][2:0] hold_n;
  logic [15:0] m_res [NS][3];
  logic [31:0] m_rx  [NS][3];
  logic [31:0] m_tx  [NS][3];
  int unsigned m_conv [NS][3], m_acc [NS][3];
  logic [NS-1:0][2:0] m_miso, m_oe;

  for (genvar s = 0; s < NS; s++) begin : g_st
    for (genvar a = 0; a < 3; a++) begin : g_adc
      ads114x_model #(.PERIOD(a == 2 ? PER_RTD : PER), .PHASE(a == 2 ? 40_000 : 30_000 + 20 * s),
                      .BASE(16'((s + 1) * 16'h1000 + a * 16'h0400)), .CAL_CYCLES(20_000)) u_adc (
        .clk, .rst_n, .start_n(cstart_n & hold_n[s][a]), .cs_n(cs_n[s][a]), .sclk(sclk[s]),
        .mosi(mosi[s]), .miso(m_miso[s][a]), .miso_oe(m_oe[s][a]), .drdy_n(drdy_n[s][a]),
        .result(m_res[s][a]), .last_rx(m_rx[s][a]), .last_tx(m_tx[s][a]),
        .n_conv(m_conv[s][a]), .n_access(m_acc[s][a]));
    end
    assign miso[s] = |(m_miso[s] & m_oe[s]);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned n_cstart = 0, n_hrst = 0;
  longint unsigned cyc = 0, cstart_cyc [$];
  logic cst_q = 1, hr_q = 1;
  always @(posedge clk) begin
    cyc++;
    cst_q <= cstart_n;
    hr_q  <= hard_reset_n;
    if (rst_n && cst_q && !cstart_n) begin n_cstart++; cstart_cyc.push_back(cyc); end
    if (rst_n && hr_q && !hard_reset_n) n_hrst++;
  end

  task automatic apb(input bit wr, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = wd;
    @(negedge clk);
    penable = 1;
    do @(posedge clk); while (!pready);
    rd = prdata;
    check(!pslverr, "no slave error");
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  function automatic logic [31:0] st_addr(input int s, input logic [11:0] off);
    return 32'h5000_0000 + 32'((s + 1) << 12) + 32'(off);
  endfunction

  logic [7:0]  pkg [60];
  logic [31:0] ts, last_ts = 0;
  logic [NS-1:0] exp_failed = '0;
  int unsigned n_resync_flag = 0;

  task automatic get_package(input bit strict = 1);
    logic [31:0] rd;
    logic [15:0] res [NS][3];
    stamp_frame_t fr;
    while (!f2m[0]) @(negedge clk);
    res = m_res;
    for (int k = 0; k < 15; k++) begin
      apb(0, 32'h5000_0000 | ((k == 14) ? 32'h800 : 32'h0) | 32'(k << 4), 0, rd);
      {pkg[4*k+3], pkg[4*k+2], pkg[4*k+1], pkg[4*k]} = rd;
    end
    ts = {pkg[1], pkg[2], pkg[3], pkg[4]};
    check(pkg[0] == 8'h00, "start marker");
    check(ts > last_ts, "timestamp rises");
    last_ts = ts;
    if (pkg[11][7]) n_resync_flag++;
    check(!pkg[11][6], "no missed package");
    if (strict) check(pkg[11][5:0] == 6'(exp_failed), $sformatf("FS failed %b", pkg[11][5:0]));
    for (int s = 0; s < NS && strict; s++) begin
      for (int b = 0; b < 8; b++) fr[63 - 8*b -: 8] = pkg[12 + 8*s + b];
      if (exp_failed[s]) check(pkg[5+s] == 8'hFF, "failed STAMP not delivered");
      else begin
        check(fr.status.id == 3'(s + 1), "frame ID");
        check(fr.sgr1 == res[s][0] && fr.sgr2 == res[s][1],
              $sformatf("STAMP%0d values %h %h exp %h %h", s+1, fr.sgr1, fr.sgr2, res[s][0], res[s][1]));
        check(fr.rtd == res[s][2], "RTD value");
      end
    end
  endtask

  initial begin
    logic [31:0] rd, prev_ts;
    int t0, c0;
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    hold_n = '1;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // ADC setup through the STAMPs, then continuous mode with threshold 5 us
    for (int s = 0; s < NS; s++) begin
      apb(1, st_addr(s, 12'h070), 32'h4203_0A1E, rd);
      for (int a = 0; a < 3; a++) check(m_rx[s][a] == 32'h4203_0A1E, "ADC configured");
      apb(1, st_addr(s, 12'h200), 32'h4500_0000, rd);
      apb(0, st_addr(s, 12'h200), 0, rd);
      check(rd == (32'h4500_0000 | 32'(s + 1)), "STAMP configuration and ID");
    end
    apb(1, 32'h5000_0100, 32'h6, rd);          // resync and hard reset enabled

    // wait for the first RTD conversions, then steady packages
    while (m_conv[0][2] == 0) @(negedge clk);
    get_package(0);
    for (int p = 0; p < 6; p++) begin
      prev_ts = last_ts;
      get_package();
      if (p > 0) check(ts - prev_ts == 5, $sformatf("one package per 500 us, step %0d", ts - prev_ts));
      for (int s = 0; s < NS; s++) check(pkg[5+s] <= 8'd1, $sformatf("offset STAMP%0d %0d", s+1, pkg[5+s]));
    end

    // 10 us skew between the SGR converters of STAMP3
    c0 = n_cstart;
    while (!f2m[3]) @(negedge clk);
    hold_n[2][1] = 0;
    repeat (500) @(negedge clk);
    hold_n[2][1] = 1;
    t0 = 0;
    while (n_cstart == c0 && t0 < 5) begin get_package(0); t0++; end
    check(n_cstart == c0 + 1, "STAMP3 sync request caused one resync");
    repeat (2) get_package();
    check(n_resync_flag == 1, "FS resync bit in exactly one package");
    apb(0, st_addr(2, 12'h180), 0, rd);
    check(!rd[9], "STAMP3 RR cleared after resync");
    check($signed(rd[8:3]) == 0, $sformatf("STAMP3 skew after resync %0d", $signed(rd[8:3])));
    for (int s = 0; s < NS; s++) check(pkg[5+s] <= 8'd1, "offsets after resync");

    // SGR1 of STAMP6 stops: failed after 5 ms
    hold_n[5][0] = 0;
    t0 = 0;
    do begin get_package(0); t0++; end while (!pkg[11][5] && t0 < 16);
    check(pkg[11][5:0] == 6'b100000, "STAMP6 marked failed");
    exp_failed[5] = 1'b1;
    repeat (2) get_package();
    check(n_hrst == 0 && hard_reset_n, "no hard reset for one failed STAMP");

    // STAMP5 falls 400 us behind the others: every package now takes longer
    // than 300 us, but the next resync must wait for the 1 s hold-off
    c0 = n_cstart;
    while (!f2m[5]) @(negedge clk);
    hold_n[4][0] = 0; hold_n[4][1] = 0;
    repeat (20_000) @(negedge clk);
    hold_n[4][0] = 1; hold_n[4][1] = 1;
    t0 = 0;
    while (n_cstart == c0 && t0 < 2100) begin get_package(0); t0++; end
    check(n_cstart == c0 + 1, $sformatf("slow packages caused a resync after %0d packages", t0));
    check(cstart_cyc[c0] - cstart_cyc[c0-1] >= 64'(50_000_000) &&
          cstart_cyc[c0] - cstart_cyc[c0-1] <= 64'(50_000_000 + 2 * PER),
          $sformatf("resyncs %0d cycles apart (1 s = 50,000,000)", cstart_cyc[c0] - cstart_cyc[c0-1]));
    repeat (2) get_package();
    check(pkg[5+4] <= 8'd1, "STAMP5 back in step after the resync");

    // three more STAMPs lose an SGR converter: four failures -> hard reset
    hold_n[0][0] = 0; hold_n[1][0] = 0; hold_n[2][0] = 0;
    t0 = 0;
    while (n_hrst == 0 && t0 < 20) begin get_package(0); t0++; end
    check(n_hrst == 1, "hard reset after four failed STAMPs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

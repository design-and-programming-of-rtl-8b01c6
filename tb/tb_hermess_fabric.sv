// tb_hermess_fabric: end-to-end test of the SPU fabric with 18 ADC models.
//
// The test plays the microcontroller: it configures the ADCs through the
// STAMP pass-through commands, switches the six STAMPs to continuous mode,
// enables MemSync and then serves the data-available interrupt, reading
// each 60-byte package over APB3 and checking it against the ADC models
// (start marker, rising timestamp, frame IDs, measured values, offsets, FS).
// Along the way it provokes every mechanism of the design and counts it:
//   packages          packages read and checked
//   pass_through      ADC commands written through a STAMP
//   alias_window      accesses through the 0x3000_0000 window
//   apb_stall         an APB access held off while a package is assembled
//   atomic_read       a frame read with the atomic modifier
//   stamp_resync      resync caused by a STAMP sync request (SGR skew)
//   slow_resync       resync caused by a package assembled in >= 300 us
//   resync_flag       FS resync bit seen in a package
//   skew_cleared      RR flags cleared after a resync
//   missed            FS missed bit after the processor fell behind
//   failed_stamp      a STAMP marked failed after the timeout
//   hard_reset        hard reset pulse when more than three STAMPs are lost
//   restart           the fabric idle and unconfigured after that reset
// Skew is injected by holding the start input of selected ADC models low for
// a while, which delays their conversions; an ADC is killed by holding it
// permanently. Time constants are scaled (1 kHz-like period of 1000 cycles,
// 5 ms -> 10 periods, 1 s hold-off -> 20 periods, 300 us -> 0.6 period).
module tb_hermess_fabric;
  import hermess_pkg::*;

  localparam int unsigned PER = 1000;
  localparam int unsigned NS  = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        psel, penable, pwrite, pready, pslverr;
  logic [31:0] paddr, pwdata, prdata;
  logic [NS-1:0]      sclk, mosi, miso;
  logic [NS-1:0][2:0] cs_n, drdy_n;
  logic        cstart_n, hard_reset_n;
  logic [NS:0] f2m;

  hermess_fabric #(
    .TICK_CYCLES(50), .RESYNC_CYCLES(600), .HOLDOFF_CYCLES(20 * PER), .FAIL_CYCLES(10 * PER),
    .ASYNC_PRESCALE(4), .SPI_HALF(2), .SPI_CS_SETUP(2), .SPI_CS_HOLD(2), .SPI_CS_GAP(2)
  ) dut (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso), .adc_cs_n(cs_n), .adc_drdy_n(drdy_n),
    .cstart_n, .hard_reset_n, .f2m_irq(f2m));

  // ---------------------------------------------------------------- ADCs
  logic [NS-1:0][2:0] hold_n;          // test-controlled start hold per ADC
  logic [15:0] m_res [NS][3];
  logic [31:0] m_rx  [NS][3];
  logic [31:0] m_tx  [NS][3];
  int unsigned m_conv [NS][3], m_acc [NS][3];
  logic [NS-1:0][2:0] m_miso, m_oe;

  for (genvar s = 0; s < NS; s++) begin : g_st
    for (genvar a = 0; a < 3; a++) begin : g_adc
      ads114x_model #(.PERIOD(a == 2 ? 3 * PER : PER), .PHASE(4000 + 10 * s + (a == 2 ? 500 : 0)),
                      .BASE(16'((s + 1) * 16'h1000 + a * 16'h0400)), .CAL_CYCLES(2000)) u_adc (
        .clk, .rst_n, .start_n(cstart_n & hold_n[s][a]), .cs_n(cs_n[s][a]), .sclk(sclk[s]),
        .mosi(mosi[s]), .miso(m_miso[s][a]), .miso_oe(m_oe[s][a]), .drdy_n(drdy_n[s][a]),
        .result(m_res[s][a]), .last_rx(m_rx[s][a]), .last_tx(m_tx[s][a]),
        .n_conv(m_conv[s][a]), .n_access(m_acc[s][a]));
    end
    assign miso[s] = |(m_miso[s] & m_oe[s]);
  end

  // ------------------------------------------------------------- checking
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  typedef enum int {PACKAGES, PASS_THROUGH, ALIAS_WINDOW, APB_STALL, ATOMIC_READ,
                    STAMP_RESYNC, SLOW_RESYNC, RESYNC_FLAG, SKEW_CLEARED, MISSED,
                    FAILED_STAMP, HARD_RESET, RESTART, N_MECH} mech_e;
  int mech [N_MECH];

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned n_cstart = 0, n_hrst = 0;
  logic cst_q = 1, hr_q = 1;
  always @(posedge clk) begin
    cst_q <= cstart_n;
    hr_q  <= hard_reset_n;
    if (rst_n && cst_q && !cstart_n) n_cstart++;
    if (rst_n && hr_q && !hard_reset_n) n_hrst++;
  end

  task automatic apb(input bit wr, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output int n);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = wd;
    @(negedge clk);
    penable = 1;
    n = 0;
    do begin @(posedge clk); n++; end while (!pready);
    rd = prdata;
    check(!pslverr, "no slave error");
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  function automatic logic [31:0] st_addr(input int s, input logic [11:0] off);
    return 32'h5000_0000 + 32'((s + 1) << 12) + 32'(off);
  endfunction

  // one package: wait for the interrupt, read all 15 words, check
  logic [7:0]  pkg [60];
  logic [31:0] last_ts = 0;
  logic [NS-1:0] exp_failed = '0;

  // strict = 0 skips the value and failed-bit checks (packages around a fault)
  task automatic get_package(input bit strict = 1);
    logic [31:0] rd;
    int n;
    logic [15:0] res [NS][3];
    logic [31:0] ts;
    stamp_frame_t fr;
    while (!f2m[0]) @(negedge clk);
    res = m_res;
    for (int k = 0; k < 15; k++) begin
      apb(0, 32'h5000_0000 | ((k == 14) ? 32'h800 : 32'h0) | 32'(k << 4), 0, rd, n);
      {pkg[4*k+3], pkg[4*k+2], pkg[4*k+1], pkg[4*k]} = rd;
    end
    mech[PACKAGES]++;
    ts = {pkg[1], pkg[2], pkg[3], pkg[4]};
    check(pkg[0] == 8'h00, "start marker");
    check(ts > last_ts, $sformatf("timestamp rises %0d > %0d", ts, last_ts));
    last_ts = ts;
    if (strict) check(pkg[11][5:0] == 6'(exp_failed), $sformatf("FS failed bits %b exp %b", pkg[11][5:0], exp_failed));
    if (pkg[11][6]) mech[MISSED]++;
    if (pkg[11][7]) mech[RESYNC_FLAG]++;
    for (int s = 0; s < NS && strict; s++) begin
      for (int b = 0; b < 8; b++) fr[63 - 8*b -: 8] = pkg[12 + 8*s + b];
      if (!exp_failed[s]) begin
        check(pkg[5+s] != 8'hFF, $sformatf("STAMP%0d delivered", s+1));
        check(fr.status.id == 3'(s + 1), "frame ID");
        check(fr.sgr1 == res[s][0] && fr.sgr2 == res[s][1],
              $sformatf("STAMP%0d values %h %h exp %h %h", s+1, fr.sgr1, fr.sgr2, res[s][0], res[s][1]));
      end else begin
        check(pkg[5+s] == 8'hFF, $sformatf("failed STAMP%0d not delivered", s+1));
      end
    end
  endtask

  initial begin
    logic [31:0] rd;
    int n, c0, t0;
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    hold_n = '1;
    for (int i = 0; i < N_MECH; i++) mech[i] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // ---- configure the ADCs through the STAMPs (pass-through commands)
    for (int s = 0; s < NS; s++) begin
      apb(1, st_addr(s, 12'h030), 32'h4203_0A1E, rd, n);      // both SGR ADCs
      check(m_rx[s][0] == 32'h4203_0A1E && m_rx[s][1] == 32'h4203_0A1E, "SGR ADC configured");
      apb(1, st_addr(s, 12'h040) - 32'h2000_0000, 32'h4203_0A12, rd, n);  // RTD via 0x3000 window
      check(m_rx[s][2] == 32'h4203_0A12, "RTD ADC configured");
      mech[PASS_THROUGH] += 2;
      mech[ALIAS_WINDOW]++;
      apb(1, st_addr(s, 12'h200), 32'h4A00_0000, rd, n);      // continuous, threshold 10
    end
    apb(1, 32'h5000_0100, 32'h2, rd, n);                       // MemSync: resync enabled

    // ---- normal packages
    repeat (4) get_package();

    // ---- APB access during assembly is held off
    while (f2m[0]) @(negedge clk);
    while (f2m[1] || f2m[0]) @(negedge clk);
    while (!f2m[1]) @(negedge clk);
    apb(0, 32'h5000_0100, 0, rd, n);
    check(f2m[0], "stalled access ends with the package latched");
    if (n > 3) mech[APB_STALL]++;
    get_package();

    // ---- atomic frame read through the alias window
    apb(0, st_addr(2, 12'h900) - 32'h2000_0000, 0, rd, n);
    c0 = rd;
    apb(0, st_addr(2, 12'h180), 0, rd, n);
    check(rd[2:0] == 3'd3, "STAMP3 ID in status word");
    mech[ATOMIC_READ]++;
    mech[ALIAS_WINDOW]++;

    // ---- skew inside STAMP2: SGR2 delayed by 200 cycles -> sync request
    // (the hold starts right after STAMP2's pair is read, so the delay is known)
    c0 = n_cstart;
    while (!f2m[0]) @(negedge clk);
    while (f2m[2]) @(negedge clk);
    while (!f2m[2]) @(negedge clk);
    hold_n[1][1] = 0;
    repeat (200) @(negedge clk); hold_n[1][1] = 1;
    get_package(0);
    t0 = 0;
    while (n_cstart == c0 && t0 < 10) begin get_package(); t0++; end
    check(n_cstart == c0 + 1, "STAMP sync request triggered a resync");
    if (n_cstart == c0 + 1) mech[STAMP_RESYNC]++;
    repeat (3) get_package();
    apb(0, st_addr(1, 12'h180), 0, rd, n);
    check(rd[9] == 1'b0, "STAMP2 RR cleared after resync");
    if (rd[9] == 1'b0) mech[SKEW_CLEARED]++;

    // ---- whole STAMP5 late by 700 cycles -> slow packages -> resync after hold-off
    c0 = n_cstart;
    while (!f2m[0]) @(negedge clk);
    while (f2m[5]) @(negedge clk);
    while (!f2m[5]) @(negedge clk);
    hold_n[4][0] = 0; hold_n[4][1] = 0;
    repeat (600) @(negedge clk); hold_n[4][0] = 1; hold_n[4][1] = 1;
    get_package(0);
    t0 = 0;
    while (n_cstart == c0 && t0 < 30) begin get_package(); t0++; end
    check(n_cstart == c0 + 1, "slow package triggered a resync");
    if (n_cstart == c0 + 1) mech[SLOW_RESYNC]++;
    repeat (2) get_package();

    // ---- processor falls behind: missed bit
    c0 = mech[MISSED];
    while (!f2m[0]) @(negedge clk);
    repeat (2 * PER) @(negedge clk);
    get_package(0);                // old package: the ADCs have moved on
    check(mech[MISSED] == c0 + 1, "missed package flagged");
    get_package();

    // ---- STAMP4 loses its SGR1 ADC: marked failed after the timeout
    hold_n[3][0] = 0;
    t0 = 0;
    do begin get_package(0); t0++; end while (!pkg[11][3] && t0 < 15);
    check(pkg[11][5:0] == 6'b001000, "STAMP4 marked failed");
    if (pkg[11][3]) mech[FAILED_STAMP]++;
    exp_failed[3] = 1'b1;
    repeat (3) get_package();

    // ---- three more STAMPs lost with hard reset enabled
    apb(1, 32'h5000_0100, 32'h6, rd, n);
    c0 = n_hrst;
    hold_n[0][0] = 0; hold_n[1][0] = 0; hold_n[2][0] = 0;
    t0 = 0;
    while (n_hrst == c0 && t0 < 15) begin get_package(0); t0++; end
    check(n_hrst == c0 + 1, "hard reset requested");
    if (n_hrst == c0 + 1) mech[HARD_RESET]++;
    // the SoC reset input restarts the fabric
    rst_n = 0;
    hold_n = '1;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4 * PER) @(negedge clk);
    apb(0, st_addr(0, 12'h200), 0, rd, n);
    check(rd == 32'h1, "STAMP1 unconfigured after restart");
    apb(0, 32'h5000_0100, 0, rd, n);
    check(rd == 32'h0 && f2m == '0, "MemSync idle after restart");
    if (rd == 32'h0 && f2m == '0) mech[RESTART]++;

    // ---- every mechanism happened at least once
    for (int i = 0; i < N_MECH; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-14s %0d", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s exercised", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_memsync: self-checking test of the MemSync package builder.
//
// The six STAMP inputs are driven directly: each delivery puts a random
// 64-bit frame on st_frame[i] and raises st_avail[i]. The test keeps its own
// copy of the expected 60-byte package (timestamp from its own cycle count,
// offsets, FS byte, frames) and compares all fifteen APB words. It covers:
// a complete package with an APB read held off during assembly; the missed
// bit while latched; freeing the package; resync requested by a STAMP, the
// 1 s hold-off (scaled), resync after a slow package and the FS resync bit;
// failed STAMPs after the timeout and packages that no longer wait for them;
// the hard reset pulse when more than three STAMPs are missing or failed;
// the component reset. Time constants are scaled down by parameters.
module tb_memsync;
  import hermess_pkg::*;

  localparam int unsigned NS = 6, TICK = 10, RESYNC = 30, HOLDOFF = 3000,
                          FAIL = 500, CSTART = 5, HRST = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  apb_req_t req;
  apb_rsp_t rsp;
  stamp_frame_t st_frame [NS];
  logic [NS-1:0] st_avail, st_sync_req;
  logic irq, cstart_n, hard_reset_n;

  memsync #(.NS(NS), .TICK_CYCLES(TICK), .RESYNC_CYCLES(RESYNC), .HOLDOFF_CYCLES(HOLDOFF),
            .FAIL_CYCLES(FAIL), .MAX_FAILED(3), .CSTART_CYCLES(CSTART), .HRST_CYCLES(HRST)) dut (
    .clk, .rst_n, .apb_req(req), .apb_rsp(rsp), .st_frame, .st_avail, .st_sync_req,
    .irq, .cstart_n, .hard_reset_n);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int unsigned cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse counters for CSTART and hard reset
  int unsigned n_cstart = 0, cstart_len = 0, last_cstart_len = 0;
  int unsigned n_hrst = 0, hrst_len = 0, last_hrst_len = 0;
  always @(posedge clk) begin
    if (!rst_n) ;
    else if (!cstart_n) cstart_len++;
    else if (cstart_len != 0) begin n_cstart++; last_cstart_len = cstart_len; cstart_len = 0; end
    if (!rst_n) ;
    else if (!hard_reset_n) hrst_len++;
    else if (hrst_len != 0) begin n_hrst++; last_hrst_len = hrst_len; hrst_len = 0; end
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

  // expected package
  logic [7:0]  exp_pkg [60];
  logic [31:0] exp_ts;
  logic [NS-1:0] exp_failed;
  bit          exp_missed, exp_resync;
  int unsigned first_cyc;
  logic [63:0] sent [NS];

  task automatic new_package();
    for (int i = 0; i < 60; i++) exp_pkg[i] = 8'h00;
    for (int i = 0; i < NS; i++) exp_pkg[5+i] = 8'hFF;
    // frames not delivered keep the last frame copied from that STAMP
    for (int i = 0; i < NS; i++)
      for (int b = 0; b < 8; b++) exp_pkg[12 + 8*i + b] = sent[i][63 - 8*b -: 8];
    exp_missed = 0;
  endtask

  // deliver frame i; 'first' marks the event that opens a package
  task automatic deliver(input int i, input bit first, input bit latched = 0);
    logic [63:0] f;
    f = {$urandom, $urandom};
    @(negedge clk);
    st_frame[i] = f;
    st_avail[i] = 1'b1;
    if (latched) exp_missed = 1;
    else begin
      if (first) begin
        exp_ts = cyc / TICK;
        first_cyc = cyc;
        exp_pkg[1] = exp_ts[31:24]; exp_pkg[2] = exp_ts[23:16];
        exp_pkg[3] = exp_ts[15:8];  exp_pkg[4] = exp_ts[7:0];
      end
      exp_pkg[5+i] = 8'(cyc / TICK - exp_ts);
      for (int b = 0; b < 8; b++) exp_pkg[12 + 8*i + b] = f[63 - 8*b -: 8];
      sent[i] = f;
    end
    @(negedge clk);
    @(negedge clk);
    st_avail[i] = 1'b0;
  endtask

  task automatic read_check(input string tag, input bit free_it);
    logic [31:0] rd;
    int n;
    exp_pkg[11] = {exp_resync, exp_missed, 6'(exp_failed)};
    for (int k = 0; k < 15; k++) begin
      apb(0, ((free_it && k == 14) ? 12'h800 : 12'h000) | 12'(k << 4), 0, rd, n);
      check(rd == {exp_pkg[4*k+3], exp_pkg[4*k+2], exp_pkg[4*k+1], exp_pkg[4*k]},
            $sformatf("%s word %0d got %h exp %h", tag, k, rd,
                      {exp_pkg[4*k+3], exp_pkg[4*k+2], exp_pkg[4*k+1], exp_pkg[4*k]}));
    end
  endtask

  initial begin
    logic [31:0] rd;
    int n, t0, c;
    req = '0; st_avail = '0; st_sync_req = '0;
    for (int i = 0; i < NS; i++) st_frame[i] = '0;
    exp_failed = '0; exp_resync = 0;
    for (int i = 0; i < NS; i++) sent[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (23) @(negedge clk);

    apb(0, 12'h100, 0, rd, n);
    check(rd == 0 && n == 2, "config after reset");

    // ---- 1. complete package, APB read held off while assembling
    new_package();
    deliver(0, 1);
    fork
      begin
        apb(0, 12'h000, 0, rd, n);
        check(irq, "APB access completes only after the package is latched");
        check(n > 6 * 7, $sformatf("APB held off %0d cycles", n));
      end
      begin
        for (int i = 1; i < NS; i++) begin repeat (6) @(negedge clk); deliver(i, 0); end
      end
    join
    check(irq, "data available interrupt");
    read_check("pkg1", 0);
    // ---- 2. missed bit while latched
    deliver(2, 0, 1);
    repeat (3) @(negedge clk);
    read_check("pkg1-missed", 1);
    repeat (2) @(negedge clk);
    check(!irq, "interrupt cleared after free");

    // ---- 3. resync requested by a STAMP
    apb(1, 12'h100, 32'h2, rd, n);
    apb(0, 12'h100, 0, rd, n);
    check(rd == 32'h2, "resync enable readback");
    st_sync_req[3] = 1'b1;
    repeat (20) @(negedge clk);
    st_sync_req[3] = 1'b0;
    check(n_cstart == 1 && last_cstart_len == CSTART, $sformatf("CSTART pulse n=%0d len=%0d", n_cstart, last_cstart_len));
    new_package();
    exp_resync = 1;
    deliver(0, 1);
    for (int i = 1; i < NS; i++) deliver(i, 0);
    read_check("pkg-resync", 1);
    exp_resync = 0;
    // request again inside the hold-off: nothing happens
    st_sync_req[1] = 1'b1;
    repeat (200) @(negedge clk);
    check(n_cstart == 1, "no resync inside hold-off");
    st_sync_req[1] = 1'b0;
    // ---- 4. slow package (assembly >= RESYNC cycles) triggers resync after hold-off
    new_package();
    deliver(0, 1);
    for (int i = 1; i < NS; i++) begin repeat (8) @(negedge clk); deliver(i, 0); end
    read_check("pkg-slow", 1);
    repeat (HOLDOFF) @(negedge clk);
    check(n_cstart == 2, $sformatf("resync after slow package, n=%0d", n_cstart));
    new_package();
    exp_resync = 1;
    deliver(0, 1);
    for (int i = 1; i < NS; i++) deliver(i, 0);
    read_check("pkg-after-slow", 1);
    exp_resync = 0;
    repeat (HOLDOFF + 10) @(negedge clk);
    check(n_cstart == 2, "fast package does not trigger resync");

    // ---- 5. two STAMPs fail
    new_package();
    t0 = cyc;
    deliver(0, 1);
    for (int i = 1; i < 4; i++) deliver(i, 0);
    c = 0;
    while (!irq) begin @(negedge clk); c++; end
    check(cyc - t0 >= FAIL && cyc - t0 <= FAIL + 5, $sformatf("timeout after %0d cycles", cyc - t0));
    exp_failed = 6'b110000;
    read_check("pkg-failed", 1);
    check(hard_reset_n && n_hrst == 0, "no hard reset for two failures");
    // the 5 ms package was slow and the hold-off has passed: resync follows
    repeat (CSTART + 5) @(negedge clk);
    check(n_cstart == 3, "resync after timed-out package");
    // next package does not wait for the failed ones
    new_package();
    exp_resync = 1;
    t0 = cyc;
    deliver(0, 1);
    for (int i = 1; i < 4; i++) deliver(i, 0);
    repeat (3) @(negedge clk);
    check(irq && cyc - t0 < 20, "package complete without failed STAMPs");
    read_check("pkg-without-failed", 1);
    exp_resync = 0;

    // ---- 6. more than three missing or failed: hard reset
    apb(1, 12'h100, 32'h4, rd, n);
    new_package();
    deliver(0, 1);
    deliver(1, 0);
    while (!irq) @(negedge clk);
    repeat (HRST + 3) @(negedge clk);
    check(n_hrst == 1 && last_hrst_len == HRST, $sformatf("hard reset pulse n=%0d len=%0d", n_hrst, last_hrst_len));
    exp_failed = 6'b111100;
    read_check("pkg-hard-reset", 1);

    // ---- 7. component reset clears failures and configuration
    apb(1, 12'h100, 32'h1, rd, n);
    apb(0, 12'h100, 0, rd, n);
    check(rd == 0, "config cleared by component reset");
    exp_failed = '0;
    new_package();
    deliver(0, 1);
    for (int i = 1; i < NS; i++) deliver(i, 0);
    repeat (3) @(negedge clk);
    check(irq, "all six awaited again after component reset");
    read_check("pkg-after-reset", 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

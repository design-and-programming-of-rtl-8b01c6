// memsync: data package builder and ADC resynchronisation / recovery unit.
//
// Package assembly. The unit watches the data_avail lines of the STAMP units.
// The first rising edge after it becomes idle starts a package: the 32-bit
// timestamp (100 us ticks since reset) is taken and that STAMP's 64-bit frame
// is copied. Every further rising edge copies the frame of its STAMP and
// stores, in one saturating byte, how many ticks after the timestamp it came.
// When every STAMP that is not marked failed has delivered, the package is
// latched and irq (the MSS "data available" interrupt) is raised. The 60-byte
// package is
//   byte 0 0x00 start marker (erased flash reads 0xFF)
//   bytes 1..4 timestamp, most significant byte first
//   bytes 5..10 offsets of STAMP 1..6 (0xFE saturated, 0xFF not delivered)
//   byte 11 FS: bits 5..0 failed STAMP 6..1 (bit i = STAMP i+1),
//               bit 6 a package was missed while latched, bit 7 resync done
//   bytes 12..59 frames of STAMP 1..6, most significant byte first
// It stays latched, apart from the missed bit, until the MSS frees it with
// the address modifier. APB reads return word k = bytes 4k..4k+3 with byte
// 4k in bits 7..0, so storing the words little-endian reproduces the byte map.
//
// Failure handling. If a package is still incomplete 5 ms after it started,
// the missing STAMPs are marked failed (kept until a component reset) and the
// package is latched without them; if more than three STAMPs are then
// missing or failed, the hard reset output is pulsed instead (when enabled).
//
// Resynchronisation. While idle, when enabled, at least 1 s after the last
// one, and either the last package took 300 us or more to assemble or any
// STAMP requests a resync, cstart_n is pulled low for CSTART_CYCLES. This
// restarts the conversions of all ADCs together.
//
// State machine (Mealy; conditions checked in the order listed):
//   IDLE     data available from any STAMP -> READING (copy frames, timestamp)
//            APB access                     -> APB
//            resync condition               -> IDLE, CSTART pulse
//   READING  data available                 -> READING (copy frame, offset)
//            all non-failed STAMPs delivered -> LATCHED, irq
//            5 ms in READING                -> LATCHED, irq, missing STAMPs
//                                              failed; hard reset pulse if
//                                              more than three bad and enabled
//   LATCHED  APB access                     -> APB (data available: missed)
//   APB      access done, came from IDLE or package freed -> IDLE, irq low
//            access done otherwise          -> LATCHED
//
// APB3 address (12 bits): bit 11 frees the latched package after this access;
// bits 10..8 = 000 read package word bits 7..4 (0..14); bits 10..8 = 001 the
// configuration register {hard reset enable, resync enable, component reset}.
// Accesses are held off (PREADY low) while a package is being assembled, and
// otherwise end after one wait state.
//
// Follows the document: package layout and sizes, 100 us timestamp, states
// and edges of the Mealy machine (idle, reading, latched, APB access), the
// 300 us / 1 s / 5 ms / more-than-three limits, the configuration bits. This
// design's own choices: byte order of multi-byte fields, the FS bit order,
// offset unit (timestamp ticks), the CSTART and hard-reset pulse lengths, and
// that failed STAMPs stay failed until a component reset.
module memsync
  import hermess_pkg::*;
#(
  parameter int unsigned NS             = 6,
  parameter int unsigned TICK_CYCLES    = 5_000,       // 100 us at 50 MHz
  parameter int unsigned RESYNC_CYCLES  = 15_000,      // 300 us
  parameter int unsigned HOLDOFF_CYCLES = 50_000_000,  // 1 s
  parameter int unsigned FAIL_CYCLES    = 250_000,     // 5 ms
  parameter int unsigned MAX_FAILED     = 3,
  parameter int unsigned CSTART_CYCLES  = 100,         // 2 us
  parameter int unsigned HRST_CYCLES    = 100          // 2 us
) (
  input  logic         clk,
  input  logic         rst_n,
  input  apb_req_t     apb_req,
  output apb_rsp_t     apb_rsp,
  input  stamp_frame_t st_frame [NS],
  input  logic [NS-1:0] st_avail,
  input  logic [NS-1:0] st_sync_req,
  output logic         irq,
  output logic         cstart_n,
  output logic         hard_reset_n
);

  typedef enum logic [1:0] {M_IDLE, M_READING, M_LATCHED, M_APB} ms_state_e;

  localparam int unsigned TPW = (TICK_CYCLES > 1)    ? $clog2(TICK_CYCLES)    : 1;
  localparam int unsigned RW  = $clog2(FAIL_CYCLES + 1);
  localparam int unsigned HW  = $clog2(HOLDOFF_CYCLES + 1);
  localparam int unsigned PW  = $clog2(CSTART_CYCLES + HRST_CYCLES + 1);

  ms_state_e     st;
  logic          from_latched;
  logic          srst;
  memsync_cfg_t  cfg;
  logic [31:0]   rdata;
  logic          free_req;

  // time base
  logic [TPW-1:0] tick_presc;
  logic [31:0]    ticks;

  // package registers
  logic [31:0]    ts;
  logic [7:0]     offs [NS];
  stamp_frame_t   frames [NS];
  logic [NS-1:0]  failed;
  logic           missed;
  logic           fs_resync;
  logic           resync_pend;

  logic [NS-1:0]  recv;
  logic [NS-1:0]  avail_q;
  logic [NS-1:0]  avail_rise;
  logic [RW-1:0]  t_state;
  logic [RW-1:0]  last_read;
  logic [HW-1:0]  since_resync;
  logic [PW-1:0]  cstart_cnt, hrst_cnt;

  assign avail_rise = st_avail & ~avail_q;

  logic apb_access;
  assign apb_access = apb_req.psel && apb_req.penable;

  // ------------------------------------------------------ package bytes
  logic [7:0] pkg [PKG_WORDS*4];
  always_comb begin
    pkg    = '{default: 8'h00};
    pkg[0] = 8'h00;
    pkg[1] = ts[31:24];
    pkg[2] = ts[23:16];
    pkg[3] = ts[15:8];
    pkg[4] = ts[7:0];
    for (int i = 0; i < NS; i++) pkg[5+i] = offs[i];
    pkg[11] = {fs_resync, missed, 6'(failed)};
    for (int i = 0; i < NS; i++)
      for (int b = 0; b < 8; b++)
        pkg[12 + 8*i + b] = frames[i][63 - 8*b -: 8];
  end

  function automatic logic [31:0] pkg_word(input logic [3:0] k);
    logic [31:0] w;
    w = '0;
    for (int i = 0; i < PKG_WORDS; i++)
      if (k == 4'(i)) w = {pkg[4*i+3], pkg[4*i+2], pkg[4*i+1], pkg[4*i]};
    return w;
  endfunction

  // STAMPs still awaited (unfinished) and the number unfinished or failed
  logic [NS-1:0] unfinished;
  logic [3:0]    n_bad;
  assign unfinished = ~(recv | failed);
  always_comb begin
    n_bad = '0;
    for (int i = 0; i < NS; i++) n_bad = n_bad + 4'(unfinished[i] | failed[i]);
  end

  logic resync_go;
  assign resync_go = (st == M_IDLE) && cfg.resync_en && !apb_access &&
                     (avail_rise == '0) &&
                     (since_resync >= HW'(HOLDOFF_CYCLES)) &&
                     ((last_read >= RW'(RESYNC_CYCLES)) || (st_sync_req != '0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= M_IDLE;
      from_latched <= 1'b0;
      srst         <= 1'b0;
      cfg          <= '0;
      rdata        <= '0;
      free_req     <= 1'b0;
      tick_presc   <= '0;
      ticks        <= '0;
      ts           <= '0;
      offs         <= '{default: '0};
      frames       <= '{default: '0};
      failed       <= '0;
      missed       <= 1'b0;
      fs_resync    <= 1'b0;
      resync_pend  <= 1'b0;
      recv         <= '0;
      avail_q      <= '0;
      t_state      <= '0;
      last_read    <= '0;
      since_resync <= HW'(HOLDOFF_CYCLES);
      cstart_cnt   <= '0;
      hrst_cnt     <= '0;
      irq          <= 1'b0;
    end else if (srst) begin
      // component reset: everything but the free-running time base
      st           <= M_IDLE;
      from_latched <= 1'b0;
      srst         <= 1'b0;
      cfg          <= '0;
      free_req     <= 1'b0;
      ts           <= '0;
      offs         <= '{default: '0};
      frames       <= '{default: '0};
      failed       <= '0;
      missed       <= 1'b0;
      fs_resync    <= 1'b0;
      resync_pend  <= 1'b0;
      recv         <= '0;
      avail_q      <= st_avail;
      t_state      <= '0;
      last_read    <= '0;
      since_resync <= HW'(HOLDOFF_CYCLES);
      cstart_cnt   <= '0;
      hrst_cnt     <= '0;
      irq          <= 1'b0;
      if (tick_presc == TPW'(TICK_CYCLES - 1)) begin
        tick_presc <= '0;
        ticks      <= ticks + 1'b1;
      end else tick_presc <= tick_presc + 1'b1;
    end else begin
      avail_q <= st_avail;

      if (tick_presc == TPW'(TICK_CYCLES - 1)) begin
        tick_presc <= '0;
        ticks      <= ticks + 1'b1;
      end else tick_presc <= tick_presc + 1'b1;

      if (since_resync < HW'(HOLDOFF_CYCLES)) since_resync <= since_resync + 1'b1;
      if (cstart_cnt != '0) cstart_cnt <= cstart_cnt - 1'b1;
      if (hrst_cnt   != '0) hrst_cnt   <= hrst_cnt - 1'b1;

      case (st)
        M_IDLE: begin
          if (avail_rise != '0) begin
            // IDLE -> READING: first data available of a new package
            st        <= M_READING;
            t_state   <= '0;
            ts        <= ticks;
            recv      <= avail_rise;
            missed    <= 1'b0;
            fs_resync <= resync_pend;
            resync_pend <= 1'b0;
            for (int i = 0; i < NS; i++) begin
              offs[i] <= 8'hFF;
              if (avail_rise[i]) begin
                frames[i] <= st_frame[i];
                offs[i]   <= 8'h00;
              end
            end
          end else if (apb_access) begin
            // IDLE -> APB: register or package access
            from_latched <= 1'b0;
            st           <= M_APB;
          end else if (resync_go) begin
            // IDLE -> IDLE: trigger resynchronisation
            cstart_cnt   <= PW'(CSTART_CYCLES);
            since_resync <= '0;
            last_read    <= '0;
            resync_pend  <= 1'b1;
          end
        end

        M_READING: begin
          if (t_state != RW'(FAIL_CYCLES)) t_state <= t_state + 1'b1;
          // READING -> READING: further data available signals
          for (int i = 0; i < NS; i++) begin
            if (avail_rise[i]) begin
              frames[i] <= st_frame[i];
              recv[i]   <= 1'b1;
              offs[i]   <= ((ticks - ts) > 32'd254) ? 8'hFE : 8'(ticks - ts);
            end
          end
          if (((recv | avail_rise | failed) == '1)) begin
            // READING -> LATCHED: no STAMP left to wait for, interrupt
            st        <= M_LATCHED;
            irq       <= 1'b1;
            last_read <= t_state;
          end else if (t_state >= RW'(FAIL_CYCLES - 1)) begin
            last_read <= t_state;
            failed    <= failed | (unfinished & ~avail_rise);
            st        <= M_LATCHED;
            irq       <= 1'b1;
            if (n_bad > 4'(MAX_FAILED) && cfg.hard_rst_en) begin
              // more than MAX_FAILED bad STAMPs: restart the whole system
              hrst_cnt <= PW'(HRST_CYCLES);
            end
            // READING -> LATCHED after the timeout, missing STAMPs now failed
          end
        end

        M_LATCHED: begin
          if (avail_rise != '0) missed <= 1'b1;
          if (apb_access) begin
            // LATCHED -> APB
            from_latched <= 1'b1;
            st           <= M_APB;
          end
        end

        default: begin  // M_APB, PREADY high in this cycle: back to IDLE, or LATCHED unless freed
          if (avail_rise != '0 && from_latched) missed <= 1'b1;
          if (!from_latched || free_req) begin
            st  <= M_IDLE;
            irq <= 1'b0;
          end else begin
            st <= M_LATCHED;
          end
        end
      endcase

      // APB register access, performed on entry to M_APB
      if ((st == M_IDLE && avail_rise == '0 && apb_access) ||
          (st == M_LATCHED && apb_access)) begin
        free_req <= apb_req.paddr[11];
        rdata    <= '0;
        if (apb_req.paddr[10:8] == 3'b000) begin
          rdata <= pkg_word(apb_req.paddr[7:4]);
        end else if (apb_req.paddr[10:8] == 3'b001) begin
          rdata <= {29'd0, cfg.hard_rst_en, cfg.resync_en, 1'b0};
          if (apb_req.pwrite) begin
            cfg.hard_rst_en <= apb_req.pwdata[2];
            cfg.resync_en   <= apb_req.pwdata[1];
            srst            <= apb_req.pwdata[0];
          end
        end
      end
    end
  end

  assign cstart_n     = (cstart_cnt == '0);
  assign hard_reset_n = (hrst_cnt == '0);

  assign apb_rsp.pready  = (st == M_APB);
  assign apb_rsp.pslverr = 1'b0;
  assign apb_rsp.prdata  = rdata;

  assert property (@(posedge clk) disable iff (!rst_n) apb_req.psel && apb_req.penable |-> $past(apb_req.psel))
    else $error("memsync: access phase without setup phase");

endmodule

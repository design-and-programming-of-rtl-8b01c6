// stamp: fabric unit serving one Strain and Temperature Applied Measurement
// Point (two strain gauge rosette ADCs, SGR1 and SGR2, and one PT-100 RTD ADC).
//
// The three ADCs share SCLK, MOSI and MISO; each has its own active-low chip
// select and active-low data-ready line. The unit is an APB3 slave with two
// jobs:
//  * Pass-through: the MSS writes commands to any combination of the three
//    ADCs (configuration, calibration, continuous-mode commands). An optional
//    polling modifier holds PREADY low until the addressed ADCs signal data
//    ready again, so slow operations such as calibrations block the bus.
//  * Continuous mode (config bit C): each falling data-ready edge queues a
//    16-bit readout; the unit clocks out a NOP word and stores the received
//    conversion into the 64-bit data frame {SGR1, SGR2, RTD, status}. When
//    both SGR ADCs of a conversion round have been read, data_avail rises
//    (MSS interrupt and MemSync input). It falls when the next automatic
//    readout starts or the status register is reset.
// The skew between the SGR1 and SGR2 data-ready edges is counted in units of
// ASYNC_PRESCALE fabric cycles, saturated to +/-31 and stored as a signed
// 6-bit value (positive: SGR1 came first). If its magnitude exceeds the
// configured async threshold, the RR flag and sync_req are set; a later round
// inside the threshold clears them. The RTD ADC takes no part in this.
// Status flags N1..N3 mark ADCs read at least once and O1..O3 ADCs read at
// least twice since the last status reset.
//
// APB3 address (12 bits, bits 3..0 ignored):
//   bit 11 atomic: no automatic readout until the next command has finished
//   bit 10 reset the status register when this command finishes
//   bits 9..8 = 00: bits 6..4 select ADCs RTD/SGR2/SGR1 for a 32-bit SPI
//                   transfer (write: PWDATA, read: NOP words; PRDATA = MISO),
//                   bit 7 = polling; with no ADC selected bit 7 returns the
//                   last MISO word of such a transfer, otherwise NOP.
//   bits 9..8 = 01: bit 7 = 0 frame[63:32] (SGR1, SGR2), 1 frame[31:0]
//   bits 9..8 = 10: configuration register {R, C, threshold[5:0], rsvd, ID}
//   bits 9..8 = 11: 32-bit scratch (dummy) register
// Timing: register accesses finish after one wait state; ADC accesses after
// any running automatic readout plus the SPI transfer (spi_master timing),
// plus the wait for data ready when polling.
//
// Follows the document: command set, register and frame layouts, the 16-bit
// NOP readout on data-ready edges, flag meanings, atomic and status-reset
// modifiers, the soft reset bit. This design's own choices: the 32-bit length
// of pass-through transfers, the readout order when several ADCs are pending
// (SGR1, SGR2, RTD), when data_avail rises and falls, how RR is cleared, the
// skew prescaler default (1 us) and the synchronisers on the data-ready lines.
module stamp
  import hermess_pkg::*;
#(
  parameter logic [2:0]  ID             = 3'd1,
  parameter int unsigned ASYNC_PRESCALE = 50,
  parameter int unsigned SPI_HALF       = 16,
  parameter int unsigned SPI_CS_SETUP   = 32,
  parameter int unsigned SPI_CS_HOLD    = 32,
  parameter int unsigned SPI_CS_GAP     = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  apb_req_t     apb_req,
  output apb_rsp_t     apb_rsp,
  // SPI link to the ADC triplet; index 0 SGR1, 1 SGR2, 2 RTD
  output logic         spi_sclk,
  output logic         spi_mosi,
  input  logic         spi_miso,
  output logic [2:0]   adc_cs_n,
  input  logic [2:0]   adc_drdy_n,
  // to MemSync and MSS
  output stamp_frame_t frame,
  output logic         data_avail,
  output logic         sync_req
);

  typedef enum logic [2:0] {A_IDLE, A_WAITSPI, A_SPI, A_POLL, A_RESP} apb_state_e;

  // ---------------------------------------------------------------- state
  apb_state_e  aps;
  logic        srst;            // soft reset from config bit R (one cycle)
  logic        crst_n;          // combined reset of the SPI master
  stamp_cfg_t  cfg;
  logic [31:0] dummy;
  logic [31:0] last_miso;
  logic [31:0] rdata;
  logic        hold;            // atomic modifier active
  logic        cmd_atomic, cmd_streset, cmd_poll;
  logic [2:0]  cmd_adcs;
  logic [31:0] cmd_tx;

  logic [15:0] meas [3];
  logic [2:0]  newval, overwr;
  logic        rr;
  logic [5:0]  async_cyc;
  logic [1:0]  got_sgr;

  logic [2:0]  drdy_s1, drdy_s2, drdy_q;   // synchronised, active low
  logic [2:0]  drdy_fall;
  logic [2:0]  pending;

  logic        auto_active;
  logic [1:0]  auto_idx;

  // SPI master interface
  logic        spi_start, spi_busy, spi_done;
  logic [2:0]  spi_cs_mask;
  logic [5:0]  spi_nbits;
  logic [31:0] spi_tx, spi_rx;

  assign crst_n = rst_n & ~srst;

  spi_master #(
    .HALF_PERIOD(SPI_HALF), .CS_SETUP(SPI_CS_SETUP),
    .CS_HOLD(SPI_CS_HOLD), .CS_GAP(SPI_CS_GAP), .N_CS(3)
  ) u_spi (
    .clk, .rst_n(crst_n),
    .start(spi_start), .cs_mask(spi_cs_mask), .nbits(spi_nbits), .tx_data(spi_tx),
    .busy(spi_busy), .done(spi_done), .rx_data(spi_rx),
    .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso), .cs_n(adc_cs_n)
  );

  // ---------------------------------------------------------- data ready
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drdy_s1 <= '1; drdy_s2 <= '1; drdy_q <= '1;
    end else begin
      drdy_s1 <= adc_drdy_n;
      drdy_s2 <= drdy_s1;
      drdy_q  <= drdy_s2;
    end
  end
  assign drdy_fall = drdy_q & ~drdy_s2;

  // ------------------------------------------------------- address decode
  logic        a_atomic, a_streset, a_poll;
  logic [1:0]  a_sel;
  logic [2:0]  a_adcs;
  assign a_atomic  = apb_req.paddr[11];
  assign a_streset = apb_req.paddr[10];
  assign a_sel     = apb_req.paddr[9:8];
  assign a_poll    = apb_req.paddr[7];
  assign a_adcs    = apb_req.paddr[6:4];

  logic apb_access;
  assign apb_access = apb_req.psel && apb_req.penable;

  // --------------------------------------------------- readout arbitration
  logic       auto_go;
  logic [1:0] auto_pick;
  always_comb begin
    auto_pick = 2'd0;
    if      (pending[0]) auto_pick = 2'd0;
    else if (pending[1]) auto_pick = 2'd1;
    else if (pending[2]) auto_pick = 2'd2;
  end
  assign auto_go = cfg.cont && !hold && (aps == A_IDLE) && !apb_access &&
                   !spi_busy && !auto_active && (pending != '0);

  always_comb begin
    spi_start   = 1'b0;
    spi_cs_mask = '0;
    spi_nbits   = 6'd16;
    spi_tx      = {ADC_NOP, ADC_NOP, ADC_NOP, ADC_NOP};
    if (aps == A_WAITSPI && !spi_busy && !auto_active) begin
      spi_start   = 1'b1;
      spi_cs_mask = cmd_adcs;
      spi_nbits   = 6'd32;
      spi_tx      = cmd_tx;
    end else if (auto_go) begin
      spi_start   = 1'b1;
      spi_cs_mask = 3'b001 << auto_pick;
    end
  end

  // -------------------------------------------------------- main datapath
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aps         <= A_IDLE;
      srst        <= 1'b0;
      cfg         <= '0;
      dummy       <= '0;
      last_miso   <= '0;
      rdata       <= '0;
      hold        <= 1'b0;
      cmd_atomic  <= 1'b0;
      cmd_streset <= 1'b0;
      cmd_poll    <= 1'b0;
      cmd_adcs    <= '0;
      cmd_tx      <= '0;
      meas        <= '{default: '0};
      newval      <= '0;
      overwr      <= '0;
      got_sgr     <= '0;
      pending     <= '0;
      auto_active <= 1'b0;
      auto_idx    <= '0;
      data_avail  <= 1'b0;
    end else begin
      srst <= 1'b0;

      // ---- APB3 slave state machine (survives the soft reset)
      case (aps)
        A_IDLE: if (apb_access) begin
          cmd_atomic  <= a_atomic;
          cmd_streset <= a_streset;
          cmd_poll    <= a_poll;
          cmd_adcs    <= a_adcs;
          cmd_tx      <= apb_req.pwrite ? apb_req.pwdata : {ADC_NOP, ADC_NOP, ADC_NOP, ADC_NOP};
          if (a_atomic) hold <= 1'b1;
          rdata <= '0;
          aps   <= A_RESP;
          case (a_sel)
            2'b00: begin
              if (a_adcs != '0) aps <= A_WAITSPI;
              else if (a_poll)  rdata <= last_miso;
            end
            2'b01: rdata <= a_poll ? frame[31:0] : frame[63:32];
            2'b10: begin
              rdata <= {cfg[31:3], ID};
              if (apb_req.pwrite) begin
                cfg      <= apb_req.pwdata;
                cfg.id   <= ID;
                srst     <= apb_req.pwdata[31];
              end
            end
            default: begin
              rdata <= dummy;
              if (apb_req.pwrite) dummy <= apb_req.pwdata;
            end
          endcase
        end
        A_WAITSPI: if (!spi_busy && !auto_active) aps <= A_SPI;
        A_SPI: if (spi_done) begin
          last_miso <= spi_rx;
          rdata     <= spi_rx;
          aps       <= cmd_poll ? A_POLL : A_RESP;
        end
        A_POLL: if ((~drdy_s2 & cmd_adcs) == cmd_adcs) aps <= A_RESP;
        default: begin   // A_RESP: PREADY is high in this cycle
          if (!cmd_atomic) hold <= 1'b0;
          aps <= A_IDLE;
        end
      endcase

      // ---- automatic readout
      if (cfg.cont) pending <= pending | drdy_fall;
      else          pending <= '0;

      if (auto_go) begin
        auto_active       <= 1'b1;
        auto_idx          <= auto_pick;
        pending[auto_pick] <= drdy_fall[auto_pick];
        data_avail        <= 1'b0;
      end

      if (spi_done && auto_active) begin
        auto_active      <= 1'b0;
        meas[auto_idx]   <= spi_rx[15:0];
        newval[auto_idx] <= 1'b1;
        if (newval[auto_idx]) overwr[auto_idx] <= 1'b1;
        if (auto_idx != 2'd2) begin
          if ((got_sgr | (2'b01 << auto_idx)) == 2'b11) begin
            got_sgr    <= '0;
            data_avail <= 1'b1;
          end else begin
            got_sgr[auto_idx[0]] <= 1'b1;
          end
        end
      end

      if (aps == A_RESP && cmd_streset) begin
        newval     <= '0;
        overwr     <= '0;
        data_avail <= 1'b0;
      end

      // ---- soft reset from configuration bit R
      if (srst) begin
        cfg         <= '0;
        cfg.id      <= ID;
        dummy       <= '0;
        last_miso   <= '0;
        hold        <= 1'b0;
        meas        <= '{default: '0};
        newval      <= '0;
        overwr      <= '0;
        got_sgr     <= '0;
        pending     <= '0;
        auto_active <= 1'b0;
        data_avail  <= 1'b0;
        if (aps == A_WAITSPI || aps == A_SPI || aps == A_POLL) aps <= A_RESP;
      end
    end
  end

  // ---------------------------------------------- SGR skew measurement
  localparam int unsigned PW = (ASYNC_PRESCALE > 1) ? $clog2(ASYNC_PRESCALE) : 1;
  logic          sk_wait, sk_first;      // sk_first: 0 = SGR1 came first
  logic [PW-1:0] sk_presc;
  logic [4:0]    sk_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sk_wait   <= 1'b0;
      sk_first  <= 1'b0;
      sk_presc  <= '0;
      sk_cnt    <= '0;
      async_cyc <= '0;
      rr        <= 1'b0;
    end else if (srst || !cfg.cont) begin
      sk_wait   <= 1'b0;
      sk_presc  <= '0;
      sk_cnt    <= '0;
      async_cyc <= '0;
      rr        <= 1'b0;
    end else begin
      if (sk_wait) begin
        if (sk_presc == PW'(ASYNC_PRESCALE - 1)) begin
          sk_presc <= '0;
          if (sk_cnt != 5'd31) sk_cnt <= sk_cnt + 1'b1;
        end else begin
          sk_presc <= sk_presc + 1'b1;
        end
      end
      case (drdy_fall[1:0])
        2'b11: begin            // both edges together: no skew
          sk_wait   <= 1'b0;
          async_cyc <= '0;
          rr        <= 1'b0;
        end
        2'b01, 2'b10: begin
          if (sk_wait && (sk_first != drdy_fall[1])) begin
            // second edge of the pair
            sk_wait   <= 1'b0;
            async_cyc <= sk_first ? -{1'b0, sk_cnt} : {1'b0, sk_cnt};
            rr        <= ({1'b0, sk_cnt} > cfg.async_thr);
          end else begin
            // first edge, or the same ADC again: (re)start the pair
            sk_wait  <= 1'b1;
            sk_first <= drdy_fall[1];
            sk_presc <= '0;
            sk_cnt   <= '0;
          end
        end
        default: ;
      endcase
      if (aps == A_RESP && cmd_streset) begin
        async_cyc <= '0;
        rr        <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------- outputs
  always_comb begin
    frame.sgr1             = meas[0];
    frame.sgr2             = meas[1];
    frame.rtd              = meas[2];
    frame.status.newval    = {newval[0], newval[1], newval[2]};
    frame.status.overwr    = {overwr[0], overwr[1], overwr[2]};
    frame.status.rr        = rr;
    frame.status.async_cyc = async_cyc;
    frame.status.id        = ID;
  end
  assign sync_req = rr;

  assign apb_rsp.pready  = (aps == A_RESP);
  assign apb_rsp.pslverr = 1'b0;
  assign apb_rsp.prdata  = rdata;

  // APB3 rule: an access phase is always preceded by a setup phase (PENABLE is
  // shared by all slaves on the bus, so it is only checked while selected)
  assert property (@(posedge clk) disable iff (!rst_n) apb_req.psel && apb_req.penable |-> $past(apb_req.psel))
    else $error("stamp: access phase without setup phase");

endmodule

// hermess_fabric: FPGA user logic of the HERMESS Signal Processing Unit.
//
// The SPU reads six measurement points on a rocket hull, each with two strain
// gauge rosette (SGR) ADCs and one PT-100 RTD ADC, 18 ADCs in all. Every
// measurement point has its own SPI link and its own STAMP unit, so the six
// links run in parallel and no processor interrupt is needed per conversion.
// The MemSync unit joins the six 64-bit STAMP frames into one 60-byte data
// package, interrupts the microcontroller subsystem (MSS) once per package,
// restarts the conversions of all ADCs through the shared CSTART line when
// they drift apart, and requests a hard reset when four or more STAMPs fail.
//
// Structure: apb3_bus decodes the MSS APB3 master port into seven 4 KiB
// slots (0 MemSync, 1..6 STAMP1..6, windows 0x5000_0000 and 0x3000_0000).
// Interrupts: f2m_irq[0] MemSync data available, f2m_irq[n] STAMP n data
// available. hard_reset_n goes to the SoC reset input. Everything runs on one
// clock, the MSS APB clock PCLK (50 MHz), with PRESETN as rst_n.
//
// Parameters give the clock and the derived time constants; their defaults
// are the document's values at 50 MHz (100 us timestamp tick, 300 us resync
// threshold, 1 s resync hold-off, 5 ms failure timeout). STAMP IDs are 1..6.
module hermess_fabric
  import hermess_pkg::*;
#(
  parameter int unsigned CLK_HZ         = CLK_HZ_DEFAULT,
  parameter int unsigned TICK_CYCLES    = CLK_HZ / 10_000,
  parameter int unsigned RESYNC_CYCLES  = (CLK_HZ / 1_000_000) * 300,
  parameter int unsigned HOLDOFF_CYCLES = CLK_HZ,
  parameter int unsigned FAIL_CYCLES    = CLK_HZ / 200,
  parameter int unsigned ASYNC_PRESCALE = CLK_HZ / 1_000_000,
  parameter int unsigned SPI_HALF       = 16,
  parameter int unsigned SPI_CS_SETUP   = 32,
  parameter int unsigned SPI_CS_HOLD    = 32,
  parameter int unsigned SPI_CS_GAP     = 32
) (
  input  logic                       clk,        // PCLK
  input  logic                       rst_n,      // PRESETN
  // APB3 from the MSS fabric interface
  input  logic                       psel,
  input  logic                       penable,
  input  logic                       pwrite,
  input  logic [31:0]                paddr,
  input  logic [31:0]                pwdata,
  output logic [31:0]                prdata,
  output logic                       pready,
  output logic                       pslverr,
  // six SPI links, ADC order per link: SGR1, SGR2, RTD
  output logic [N_STAMPS-1:0]        spi_sclk,
  output logic [N_STAMPS-1:0]        spi_mosi,
  input  logic [N_STAMPS-1:0]        spi_miso,
  output logic [N_STAMPS-1:0][2:0]   adc_cs_n,
  input  logic [N_STAMPS-1:0][2:0]   adc_drdy_n,
  // shared conversion start, system reset request, interrupts to the MSS
  output logic                       cstart_n,
  output logic                       hard_reset_n,
  output logic [N_STAMPS:0]          f2m_irq
);

  apb_req_t      s_req [N_STAMPS+1];
  apb_rsp_t      s_rsp [N_STAMPS+1];
  stamp_frame_t  frames [N_STAMPS];
  logic [N_STAMPS-1:0] avail, sreq;
  logic          ms_irq;

  apb3_bus #(.NSLV(N_STAMPS + 1)) u_bus (
    .m_psel(psel), .m_penable(penable), .m_pwrite(pwrite), .m_paddr(paddr),
    .m_pwdata(pwdata), .m_prdata(prdata), .m_pready(pready), .m_pslverr(pslverr),
    .s_req, .s_rsp
  );

  for (genvar g = 0; g < N_STAMPS; g++) begin : g_stamp
    stamp #(
      .ID(3'(g + 1)), .ASYNC_PRESCALE(ASYNC_PRESCALE), .SPI_HALF(SPI_HALF),
      .SPI_CS_SETUP(SPI_CS_SETUP), .SPI_CS_HOLD(SPI_CS_HOLD), .SPI_CS_GAP(SPI_CS_GAP)
    ) u_stamp (
      .clk, .rst_n,
      .apb_req(s_req[g+1]), .apb_rsp(s_rsp[g+1]),
      .spi_sclk(spi_sclk[g]), .spi_mosi(spi_mosi[g]), .spi_miso(spi_miso[g]),
      .adc_cs_n(adc_cs_n[g]), .adc_drdy_n(adc_drdy_n[g]),
      .frame(frames[g]), .data_avail(avail[g]), .sync_req(sreq[g])
    );
  end

  memsync #(
    .NS(N_STAMPS), .TICK_CYCLES(TICK_CYCLES), .RESYNC_CYCLES(RESYNC_CYCLES),
    .HOLDOFF_CYCLES(HOLDOFF_CYCLES), .FAIL_CYCLES(FAIL_CYCLES)
  ) u_memsync (
    .clk, .rst_n,
    .apb_req(s_req[0]), .apb_rsp(s_rsp[0]),
    .st_frame(frames), .st_avail(avail), .st_sync_req(sreq),
    .irq(ms_irq), .cstart_n, .hard_reset_n
  );

  assign f2m_irq = {avail, ms_irq};

endmodule

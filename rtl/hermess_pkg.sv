// hermess_pkg: types and constants shared by the HERMESS SPU fabric logic.
//
// The fabric runs on one 50 MHz clock that is also the APB3 PCLK of the
// microcontroller subsystem (MSS). All custom blocks are APB3 slaves with a
// 12-bit internal address (4 KiB slot each, lowest four bits unused) and a
// 32-bit data bus. This package holds the APB3 request/response structs, the
// STAMP data frame and status layout (64 bits: SGR1, SGR2, RTD, status), the
// STAMP and MemSync configuration register layouts and the timing constants
// derived from the clock (100 us timestamp tick, 300 us resync threshold,
// 1 s resync hold-off, 5 ms failure timeout).
package hermess_pkg;

  localparam int unsigned CLK_HZ_DEFAULT = 50_000_000;
  localparam int unsigned N_STAMPS       = 6;
  localparam int unsigned ADCS_PER_STAMP = 3;   // SGR1, SGR2, RTD
  localparam int unsigned APB_AW         = 12;  // slave-internal address bits
  localparam int unsigned PKG_WORDS      = 15;  // 60-byte data package

  // ADS114x command byte used to clock out conversion data
  localparam logic [7:0] ADC_NOP = 8'hFF;

  // APB3 master-to-slave signals (PADDR reduced to the slave-internal part)
  typedef struct packed {
    logic                psel;
    logic                penable;
    logic                pwrite;
    logic [APB_AW-1:0]   paddr;
    logic [31:0]         pwdata;
  } apb_req_t;

  // APB3 slave-to-master signals
  typedef struct packed {
    logic        pready;
    logic        pslverr;
    logic [31:0] prdata;
  } apb_rsp_t;

  // STAMP status register, low 16 bits of the data frame
  typedef struct packed {
    logic [2:0] newval;     // N1..N3 : ADC read at least once since status reset
    logic [2:0] overwr;     // O1..O3 : ADC read at least twice since status reset
    logic       rr;         // request resync
    logic [5:0] async_cyc;  // signed SGR skew in prescaled clock cycles
    logic [2:0] id;         // STAMP identifier
  } stamp_status_t;

  // 64-bit STAMP data frame
  typedef struct packed {
    logic [15:0]   sgr1;
    logic [15:0]   sgr2;
    logic [15:0]   rtd;
    stamp_status_t status;
  } stamp_frame_t;

  // STAMP configuration register
  typedef struct packed {
    logic        rst;        // bit 31: component reset, self clearing
    logic        cont;       // bit 30: continuous mode
    logic [5:0]  async_thr;  // bits 29..24: async threshold
    logic [20:0] rsvd;       // bits 23..3: reserved, read/write
    logic [2:0]  id;         // bits 2..0: read-only STAMP identifier
  } stamp_cfg_t;

  // MemSync configuration register: only bits 2..0 are used
  typedef struct packed {
    logic hard_rst_en;  // bit 2
    logic resync_en;    // bit 1
    logic rst;          // bit 0, self clearing
  } memsync_cfg_t;

  // Index of the ADCs inside a STAMP (also the chip-select bit order)
  typedef enum logic [1:0] {ADC_SGR1 = 2'd0, ADC_SGR2 = 2'd1, ADC_RTD = 2'd2} adc_idx_e;

  function automatic int unsigned cycles_for_us(int unsigned clk_hz, int unsigned us);
    return (clk_hz / 1_000_000) * us;
  endfunction

endpackage

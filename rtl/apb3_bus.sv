// apb3_bus: APB3 interconnect between the MSS fabric interface (bus master)
// and the custom fabric slaves.
//
// Each slave owns one 4 KiB slot. Slot n (PADDR bits 15..12) selects slave n:
// slot 0 is MemSync, slots 1..6 are STAMP1..STAMP6. The fabric interface maps
// every slave twice, at 0x5000_0000 + n*0x1000 and at 0x3000_0000 + n*0x1000;
// both windows reach the same slave. The slave sees PADDR bits 11..0 only.
// PENABLE, PWRITE and PWDATA are broadcast; PREADY, PRDATA and PSLVERR come
// back from the selected slave. A transfer to a slot with no slave, or outside
// both windows, completes at once with PRDATA = 0 and PSLVERR = 1 so that the
// processor does not hang. The bus is purely combinational (no added latency).
//
// The address map and slot assignment follow the document; the response to
// unmapped addresses is this design's choice.
module apb3_bus
  import hermess_pkg::*;
#(
  parameter int unsigned NSLV = 7
) (
  // master side
  input  logic        m_psel,
  input  logic        m_penable,
  input  logic        m_pwrite,
  input  logic [31:0] m_paddr,
  input  logic [31:0] m_pwdata,
  output logic [31:0] m_prdata,
  output logic        m_pready,
  output logic        m_pslverr,
  // slave side
  output apb_req_t    s_req [NSLV],
  input  apb_rsp_t    s_rsp [NSLV]
);

  logic [3:0] slot;
  logic       in_window;
  logic       hit;

  assign slot      = m_paddr[15:12];
  assign in_window = (m_paddr[31:16] == 16'h5000) || (m_paddr[31:16] == 16'h3000);
  assign hit       = in_window && (32'(slot) < NSLV);

  always_comb begin
    for (int i = 0; i < NSLV; i++) begin
      s_req[i].psel    = m_psel && hit && (32'(slot) == i);
      s_req[i].penable = m_penable;
      s_req[i].pwrite  = m_pwrite;
      s_req[i].paddr   = m_paddr[APB_AW-1:0];
      s_req[i].pwdata  = m_pwdata;
    end
    m_prdata  = '0;
    m_pready  = 1'b1;
    m_pslverr = m_psel && !hit;
    for (int i = 0; i < NSLV; i++) begin
      if (hit && 32'(slot) == i) begin
        m_prdata  = s_rsp[i].prdata;
        m_pready  = s_rsp[i].pready;
        m_pslverr = s_rsp[i].pslverr;
      end
    end
  end

endmodule

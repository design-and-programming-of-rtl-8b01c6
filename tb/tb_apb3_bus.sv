// tb_apb3_bus: self-checking test of the APB3 slot decoder.
//
// Seven fake slaves answer with their own index in PRDATA and a per-slave
// PREADY/PSLVERR pattern. For every slot of both address windows, and for
// unmapped slots and addresses outside the windows, the test checks which
// PSEL is raised, the 12-bit slave address, the broadcast signals and the
// response routed back to the master.
module tb_apb3_bus;
  import hermess_pkg::*;
  localparam int unsigned NSLV = 7;

  logic        psel, penable, pwrite;
  logic [31:0] paddr, pwdata, prdata;
  logic        pready, pslverr;
  apb_req_t    s_req [NSLV];
  apb_rsp_t    s_rsp [NSLV];
  int checks = 0, failures = 0;

  apb3_bus #(.NSLV(NSLV)) dut (
    .m_psel(psel), .m_penable(penable), .m_pwrite(pwrite), .m_paddr(paddr),
    .m_pwdata(pwdata), .m_prdata(prdata), .m_pready(pready), .m_pslverr(pslverr),
    .s_req, .s_rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NSLV; i++) s_rsp[i] = '{pready: 1'b0, pslverr: 1'b0, prdata: '0};
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    for (int r = 0; r < 200; r++) begin
      logic [15:0] win;
      int slot;
      logic [11:0] off;
      bit mapped;
      int k;
      k = $urandom % 4;
      win = (k == 0) ? 16'h5000 : (k == 1) ? 16'h3000 : (k == 2) ? 16'h5000 : 16'h4000;
      slot = $urandom % 9;
      off = 12'($urandom);
      mapped = (win != 16'h4000) && (slot < NSLV);
      for (int i = 0; i < NSLV; i++) begin
        s_rsp[i].prdata  = 32'hA000_0000 + 32'(i) + 32'(r << 8);
        s_rsp[i].pready  = ((r + i) % 3) != 0;
        s_rsp[i].pslverr = ((r + i) % 5) == 0;
      end
      psel = 1; penable = r[0]; pwrite = r[1]; pwdata = $urandom;
      paddr = {win, 4'(slot), off};
      #1;
      for (int i = 0; i < NSLV; i++) begin
        check(s_req[i].psel == (mapped && i == slot), $sformatf("psel[%0d] addr %h", i, paddr));
        check(s_req[i].paddr == off && s_req[i].pwdata == pwdata &&
              s_req[i].penable == penable && s_req[i].pwrite == pwrite, "broadcast signals");
      end
      if (mapped) begin
        check(prdata == 32'hA000_0000 + 32'(slot) + 32'(r << 8), "prdata routed");
        check(pready == (((r + slot) % 3) != 0), "pready routed");
        check(pslverr == (((r + slot) % 5) == 0), "pslverr routed");
      end else begin
        check(pready == 1'b1 && pslverr == 1'b1 && prdata == 0, $sformatf("unmapped %h", paddr));
      end
      psel = 0; #1;
      for (int i = 0; i < NSLV; i++) check(!s_req[i].psel, "no psel when idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

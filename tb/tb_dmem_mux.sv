// tb_dmem_mux: self-checking test of the data-access multiplexer: addresses with
// addr[31:30] == 0 reach the data memory, all others the AXI4-lite master; grant, load data
// and error flags come back from the side that answers.
`timescale 1ns/1ps
module tb_dmem_mux;
  logic req, we, gnt, es, ed, mreq, mgnt, mes, med, breq, bgnt, owe;
  logic [3:0]  be, obe;
  logic [31:0] addr, wdata, rdata, mrd, brd, oaddr, owd;
  int checks = 0, failures = 0;

  dmem_mux dut (.req, .we, .be, .addr, .wdata, .gnt, .rdata, .err_single(es), .err_double(ed),
                .mem_req(mreq), .mem_gnt(mgnt), .mem_rdata(mrd), .mem_err_single(mes), .mem_err_double(med),
                .bus_req(breq), .bus_gnt(bgnt), .bus_rdata(brd),
                .out_we(owe), .out_be(obe), .out_addr(oaddr), .out_wdata(owd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic to_mem;
      addr = $urandom; req = 1'($urandom); we = 1'($urandom); be = 4'($urandom); wdata = $urandom;
      to_mem = addr[31:30] == 2'b00;
      mrd = $urandom; brd = $urandom; mes = 1'($urandom); med = 1'($urandom);
      mgnt = to_mem && req && 1'($urandom);
      bgnt = !to_mem && req && 1'($urandom);
      #1;
      check(mreq == (req && to_mem) && breq == (req && !to_mem), "request routed by address");
      check(owe == we && obe == be && oaddr == addr && owd == wdata, "request fields passed");
      check(gnt == (mgnt || bgnt), "grant");
      if (gnt) check(rdata == (to_mem ? mrd : brd), "load data from the granting side");
      check(es == (mgnt && mes) && ed == (mgnt && med), "error flags only from data memory");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

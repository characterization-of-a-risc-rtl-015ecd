// tb_axil_wdt: self-checking test of the watchdog timer.
//
// With a reset count of 100 cycles: the watchdog is enabled out of reset and fires exactly
// 100 cycles after reset; kicking (writing LOAD) restarts the count so it fires LOAD cycles
// after the kick; COUNT reads back the running value; disabling through CTRL stops it; a LOAD
// of 1 fires it at once, the software-forced reset.
`timescale 1ns/1ps
module tb_axil_wdt;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, wdt_rst;
  axil_req_t req = '0;
  axil_rsp_t rsp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  axil_wdt #(.DEFAULT_TIMEOUT(100)) dut (.clk, .rst_n, .axi_req(req), .axi_rsp(rsp), .wdt_rst);

  `include "axil_tasks.svh"

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v;
    logic [1:0]  r;
    int cnt;
    #12 @(negedge clk) rst_n = 1'b1;
    cnt = 0;
    while (!wdt_rst) begin @(negedge clk); cnt++; end
    check(cnt == 100, $sformatf("fires %0d cycles after reset, expected 100", cnt));
    @(negedge clk) rst_n = 1'b0; @(negedge clk) rst_n = 1'b1;
    axi_read(32'h4000_0104, v, r); check(v == 1 && r == RESP_OKAY, "enabled by default");
    axi_write(32'h4000_0100, 32'd500, 4'hF, r);
    cnt = 0;
    while (!wdt_rst) begin @(negedge clk); cnt++; end
    check(cnt > 490 && cnt <= 500, $sformatf("fires %0d cycles after the kick", cnt));
    @(negedge clk) rst_n = 1'b0; @(negedge clk) rst_n = 1'b1;
    axi_write(32'h4000_0100, 32'd1000, 4'hF, r);
    axi_read(32'h4000_0108, v, r);
    check(v < 1000 && v > 980, $sformatf("COUNT reads %0d", v));
    axi_read(32'h4000_0100, v, r); check(v == 1000, "LOAD reads back");
    axi_write(32'h4000_0104, 32'd0, 4'hF, r);
    repeat (1200) @(negedge clk);
    check(!wdt_rst, "disabled watchdog does not fire");
    axi_write(32'h4000_0104, 32'd1, 4'hF, r);
    axi_write(32'h4000_0100, 32'd1, 4'hF, r);
    check(wdt_rst, "LOAD of 1 forces a reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

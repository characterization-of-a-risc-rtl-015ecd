// tb_axil_apb_bridge: self-checking test of the AXI4-lite to APB3 bridge.
//
// An APB3 slave model here holds a word array, inserts random wait states and answers PSLVERR
// above a threshold address. The test checks read data, write data and address arriving at
// the slave, SLVERR passed back on both reads and writes, the APB3 phase rules (a SETUP cycle
// before every ACCESS, one transfer per AXI access) and the minimum latency of a transfer.
`timescale 1ns/1ps
module tb_axil_apb_bridge;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  axil_req_t req = '0;
  axil_rsp_t rsp;
  logic psel, penable, pwrite, pready, pslverr;
  logic [31:0] paddr, pwdata, prdata;
  logic [31:0] mem [64];
  int wait_cnt = 0, transfers = 0, setups = 0;
  logic max_wait = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  axil_apb_bridge dut (.clk, .rst_n, .axi_req(req), .axi_rsp(rsp), .psel, .penable, .pwrite, .paddr,
                       .pwdata, .prdata, .pready, .pslverr);

  `include "axil_tasks.svh"

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // APB3 slave model
  logic psel_q = 1'b0, pen_q = 1'b0;
  always @(posedge clk) begin
    if (rst_n && psel && !penable) begin
      wait_cnt <= max_wait ? $urandom_range(0, 3) : 0;
      setups++;
    end else if (psel && penable && wait_cnt != 0) wait_cnt <= wait_cnt - 1;
    if (pready) begin
      transfers++;
      if (pwrite && !pslverr) mem[paddr[7:2]] <= pwdata;
    end
    if (penable && !psel_q) begin failures++; $display("FAIL: ACCESS without SETUP"); end
    psel_q <= psel && !pready;
    pen_q  <= penable;
  end
  always_comb begin
    pready  = psel && penable && wait_cnt == 0;
    pslverr = pready && paddr[7:0] >= 8'hC0;
    prdata  = mem[paddr[7:2]];
  end

  initial begin
    logic [31:0] v;
    logic [1:0]  r;
    int t0, t1;
    for (int i = 0; i < 64; i++) mem[i] = $urandom;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      int i;
      logic [31:0] d;
      i = $urandom_range(0, 47);
      if (t % 2 == 0) begin
        axi_read(32'h6000_0000 + 32'(i * 4), v, r);
        check(v == mem[i] && r == RESP_OKAY, $sformatf("read word %0d", i));
      end else begin
        d = $urandom;
        axi_write(32'h6000_0000 + 32'(i * 4), d, 4'hF, r);
        @(negedge clk);
        check(mem[i] == d && r == RESP_OKAY, $sformatf("write word %0d", i));
      end
    end
    check(transfers == 100 && setups == 100, $sformatf("%0d transfers, %0d setups for 100 accesses", transfers, setups));
    axi_read(32'h6000_00C4, v, r);  check(r == RESP_SLVERR, "read error returned as SLVERR");
    axi_write(32'h6000_00C8, 0, 4'hF, r); check(r == RESP_SLVERR, "write error returned as SLVERR");
    // latency without wait states: AR handshake, request, SETUP, ACCESS, R
    max_wait = 1'b0;
    @(negedge clk); t0 = $time;
    axi_read(32'h6000_0010, v, r);
    t1 = $time;
    check((t1 - t0) / 10 == 6, $sformatf("zero-wait read took %0d cycles, expected 6", (t1 - t0) / 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

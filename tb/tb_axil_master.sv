// tb_axil_master: self-checking test of the AXI4-lite master against a slave model with
// random delays on every channel. Instruction-port reads, data-port reads and byte-strobed
// writes are compared with a reference array; a simultaneous request on both ports must serve
// the data port first; no grant may appear without a request; the zero-wait read latency is
// checked.
`timescale 1ns/1ps
module tb_axil_master;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic i_req = 1'b0, i_gnt, d_req = 1'b0, d_we = 1'b0, d_gnt;
  logic [31:0] i_addr = '0, i_rdata, d_addr = '0, d_wdata = '0, d_rdata;
  logic [3:0]  d_be = '0;
  axil_req_t axi_req;
  axil_rsp_t axi_rsp;
  logic [31:0] model [256];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  axil_master dut (.clk, .rst_n, .i_req, .i_addr, .i_gnt, .i_rdata, .d_req, .d_we, .d_be, .d_addr,
                   .d_wdata, .d_gnt, .d_rdata, .axi_req, .axi_rsp);
  axil_tb_slave #(.MAX_WAIT(2)) u_slv (.clk, .rst_n, .req(axi_req), .rsp(axi_rsp));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk)
    if ((i_gnt && !i_req) || (d_gnt && !d_req)) begin failures++; $display("FAIL: grant without request"); end

  task automatic iread(int idx, output logic [31:0] q, output int lat);
    @(negedge clk); i_req = 1'b1; i_addr = 32'h6000_0000 + 32'(idx * 4); lat = 0; #1;
    while (!i_gnt) begin @(negedge clk); lat++; #1; end
    q = i_rdata;
    @(negedge clk); i_req = 1'b0;
  endtask
  task automatic dacc(logic w, logic [3:0] be, int idx, logic [31:0] d, output logic [31:0] q);
    @(negedge clk); d_req = 1'b1; d_we = w; d_be = be; d_wdata = d; d_addr = 32'h4000_0000 + 32'(idx * 4); #1;
    while (!d_gnt) begin @(negedge clk); #1; end
    q = d_rdata;
    @(negedge clk); d_req = 1'b0;
  endtask

  initial begin
    logic [31:0] q;
    int lat;
    for (int i = 0; i < 256; i++) begin model[i] = $urandom; u_slv.mem[i] = model[i]; end
    #12 rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int i;
      logic [3:0] be;
      logic [31:0] d;
      i = $urandom_range(0, 255);
      unique case (t % 3)
        0: begin iread(i, q, lat); check(q == model[i], $sformatf("instruction read %0d", i)); end
        1: begin dacc(1'b0, 4'hF, i, 0, q); check(q == model[i], $sformatf("data read %0d", i)); end
        default: begin
          be = 4'($urandom_range(1, 15)); d = $urandom;
          dacc(1'b1, be, i, d, q);
          for (int b = 0; b < 4; b++) if (be[b]) model[i][8*b +: 8] = d[8*b +: 8];
          @(negedge clk);
          check(u_slv.mem[i] == model[i], $sformatf("data write %0d", i));
        end
      endcase
    end
    // both ports at once: data first
    @(negedge clk);
    i_req = 1'b1; i_addr = 32'h6000_0000; d_req = 1'b1; d_we = 1'b0; d_addr = 32'h4000_0004; #1;
    while (!i_gnt && !d_gnt) begin @(negedge clk); #1; end
    check(d_gnt && !i_gnt && d_rdata == model[1], "data port served first");
    @(negedge clk); d_req = 1'b0; #1;
    while (!i_gnt) begin @(negedge clk); #1; end
    check(i_rdata == model[0], "instruction port served next");
    @(negedge clk); i_req = 1'b0;
    // latency with no slave delays: AR, R, grant
    u_slv.ar_d = 0;
    force u_slv.r_d = 0;
    iread(5, q, lat);
    release u_slv.r_d;
    check(lat == 2, $sformatf("zero-wait fetch latency %0d cycles, expected 2", lat));
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

// tb_axil_interconnect: self-checking test of the 1-to-3 AXI4-lite interconnect.
//
// Three slave models with random delays sit at the UART, watchdog and APB3-bridge windows.
// Random reads and writes to each window must reach only their own slave (checked in the
// slaves' memories and transaction counts); accesses outside all windows must end with DECERR
// without touching any slave.
`timescale 1ns/1ps
module tb_axil_interconnect;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  axil_req_t req = '0;
  axil_rsp_t rsp;
  axil_req_t s_req [3];
  axil_rsp_t s_rsp [3];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  axil_interconnect dut (.clk, .rst_n, .m_req(req), .m_rsp(rsp), .s_req, .s_rsp);
  axil_tb_slave u_s0 (.clk, .rst_n, .req(s_req[0]), .rsp(s_rsp[0]));
  axil_tb_slave u_s1 (.clk, .rst_n, .req(s_req[1]), .rsp(s_rsp[1]));
  axil_tb_slave u_s2 (.clk, .rst_n, .req(s_req[2]), .rsp(s_rsp[2]));

  `include "axil_tasks.svh"

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [31:0] BASE [3] = '{32'h4000_0000, 32'h4000_0100, 32'h6000_0000};
  logic [31:0] model [3][64];
  int rd_cnt [3] = '{0, 0, 0};
  int wr_cnt [3] = '{0, 0, 0};

  function automatic logic [31:0] smem(int s, int i);
    unique case (s)
      0: return u_s0.mem[BASE[0][9:2] + 8'(i)];
      1: return u_s1.mem[BASE[1][9:2] + 8'(i)];
      default: return u_s2.mem[BASE[2][9:2] + 8'(i)];
    endcase
  endfunction

  initial begin
    logic [31:0] v;
    logic [1:0]  r;
    for (int i = 0; i < 64; i++) begin
      model[0][i] = $urandom; model[1][i] = $urandom; model[2][i] = $urandom;
      // the slaves decode addr[9:2], so each window starts at its base's word index
      u_s0.mem[BASE[0][9:2] + 8'(i)] = model[0][i];
      u_s1.mem[BASE[1][9:2] + 8'(i)] = model[1][i];
      u_s2.mem[BASE[2][9:2] + 8'(i)] = model[2][i];
    end
    #12 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int s, i;
      s = $urandom_range(0, 2);
      i = $urandom_range(0, 63);
      if (t % 2 == 0) begin
        axi_read(BASE[s] + 32'(i * 4), v, r);
        rd_cnt[s]++;
        check(v == model[s][i] && r == RESP_OKAY, $sformatf("read slave %0d word %0d", s, i));
      end else begin
        v = $urandom;
        axi_write(BASE[s] + 32'(i * 4), v, 4'hF, r);
        wr_cnt[s]++;
        model[s][i] = v;
        @(negedge clk);
        check(smem(s, i) == v && r == RESP_OKAY, $sformatf("write slave %0d word %0d", s, i));
      end
    end
    check(u_s0.reads == rd_cnt[0] && u_s1.reads == rd_cnt[1] && u_s2.reads == rd_cnt[2], "reads went to their slaves only");
    check(u_s0.writes == wr_cnt[0] && u_s1.writes == wr_cnt[1] && u_s2.writes == wr_cnt[2], "writes went to their slaves only");
    axi_read(32'h5000_0000, v, r);  check(r == RESP_DECERR && v == 0, "unmapped read: DECERR");
    axi_write(32'h4000_0200, 32'h1, 4'hF, r); check(r == RESP_DECERR, "unmapped write: DECERR");
    check(u_s0.writes + u_s1.writes + u_s2.writes == wr_cnt[0] + wr_cnt[1] + wr_cnt[2], "DECERR touched no slave");
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

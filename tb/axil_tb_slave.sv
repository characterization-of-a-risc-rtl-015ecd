// axil_tb_slave: AXI4-lite memory slave for the testbenches.
//
// Behavioural model, not design RTL. Holds 256 words addressed by addr[9:2], applies write
// strobes, and gives every channel a random 0..MAX_WAIT cycle delay before its ready or valid,
// so masters and interconnects are tested against slow and fast responses. AW and W are
// accepted independently; B follows once both have arrived. `reads` and `writes` count the
// completed transactions.
`timescale 1ns/1ps
module axil_tb_slave
  import soc_pkg::*;
#(
  parameter int MAX_WAIT = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp
);
  logic [31:0] mem [256];
  int ar_d = 0, r_d = 0, aw_d = 0, w_d = 0, b_d = 0;
  logic ar_got = 1'b0, aw_got = 1'b0, w_got = 1'b0;
  logic [31:0] ar_a = '0, aw_a = '0, w_dat = '0;
  logic [3:0]  w_s = '0;
  int reads = 0, writes = 0;

  always_comb begin
    rsp = '0;
    rsp.arready = rst_n && !ar_got && ar_d == 0;
    rsp.rvalid  = ar_got && r_d == 0;
    rsp.rdata   = mem[ar_a[9:2]];
    rsp.rresp   = RESP_OKAY;
    rsp.awready = rst_n && !aw_got && aw_d == 0;
    rsp.wready  = rst_n && !w_got && w_d == 0;
    rsp.bvalid  = aw_got && w_got && b_d == 0;
    rsp.bresp   = RESP_OKAY;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (req.arvalid && !ar_got) begin
        if (ar_d == 0) begin ar_got <= 1'b1; ar_a <= req.araddr; r_d <= $urandom_range(0, MAX_WAIT); end
        else ar_d <= ar_d - 1;
      end
      if (rsp.rvalid && req.rready) begin
        ar_got <= 1'b0; ar_d <= $urandom_range(0, MAX_WAIT); reads <= reads + 1;
      end else if (ar_got && r_d != 0) r_d <= r_d - 1;

      if (req.awvalid && !aw_got) begin
        if (aw_d == 0) begin aw_got <= 1'b1; aw_a <= req.awaddr; end
        else aw_d <= aw_d - 1;
      end
      if (req.wvalid && !w_got) begin
        if (w_d == 0) begin w_got <= 1'b1; w_dat <= req.wdata; w_s <= req.wstrb; b_d <= $urandom_range(0, MAX_WAIT); end
        else w_d <= w_d - 1;
      end
      if (rsp.bvalid && req.bready) begin
        for (int b = 0; b < 4; b++) if (w_s[b]) mem[aw_a[9:2]][8*b +: 8] <= w_dat[8*b +: 8];
        aw_got <= 1'b0; w_got <= 1'b0; writes <= writes + 1;
        aw_d <= $urandom_range(0, MAX_WAIT); w_d <= $urandom_range(0, MAX_WAIT);
      end else if (aw_got && w_got && b_d != 0) b_d <= b_d - 1;
    end
  end
endmodule

// axil_regif: AXI4-lite slave front end shared by the peripherals.
//
// Accepts AW and W in any order (one of each is buffered), then presents one write on
// wr_req/wr_addr/wr_data/wr_strb until the peripheral answers wr_ack (with wr_err for SLVERR);
// the B response follows on the next cycle. A read is buffered from AR and presented on
// rd_req/rd_addr until rd_ack, when rd_data/rd_err are captured and returned on R. The
// peripheral may hold the ack low to stall (the UART does while it transmits, the APB3 bridge
// until PREADY). Only one write and one read are in flight.
module axil_regif
  import soc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   axi_req,
  output axil_rsp_t   axi_rsp,
  output logic        wr_req,
  output logic [31:0] wr_addr,
  output logic [31:0] wr_data,
  output logic [3:0]  wr_strb,
  input  logic        wr_ack,
  input  logic        wr_err,
  output logic        rd_req,
  output logic [31:0] rd_addr,
  input  logic [31:0] rd_data,
  input  logic        rd_ack,
  input  logic        rd_err
);
  logic        aw_v, w_v, b_v, ar_v, r_v;
  logic [31:0] aw_a, w_d, ar_a, r_d;
  logic [3:0]  w_s;
  logic        b_err, r_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_v <= 1'b0; w_v <= 1'b0; b_v <= 1'b0; ar_v <= 1'b0; r_v <= 1'b0;
      aw_a <= '0; w_d <= '0; w_s <= '0; ar_a <= '0; r_d <= '0;
      b_err <= 1'b0; r_err <= 1'b0;
    end else begin
      if (axi_req.awvalid && axi_rsp.awready) begin aw_v <= 1'b1; aw_a <= axi_req.awaddr; end
      if (axi_req.wvalid && axi_rsp.wready) begin
        w_v <= 1'b1; w_d <= axi_req.wdata; w_s <= axi_req.wstrb;
      end
      if (wr_req && wr_ack) begin
        aw_v <= 1'b0; w_v <= 1'b0; b_v <= 1'b1; b_err <= wr_err;
      end
      if (b_v && axi_req.bready) b_v <= 1'b0;

      if (axi_req.arvalid && axi_rsp.arready) begin ar_v <= 1'b1; ar_a <= axi_req.araddr; end
      if (rd_req && rd_ack) begin
        ar_v <= 1'b0; r_v <= 1'b1; r_d <= rd_data; r_err <= rd_err;
      end
      if (r_v && axi_req.rready) r_v <= 1'b0;
    end
  end

  always_comb begin
    axi_rsp         = '0;
    axi_rsp.awready = !aw_v;
    axi_rsp.wready  = !w_v;
    axi_rsp.bvalid  = b_v;
    axi_rsp.bresp   = b_err ? RESP_SLVERR : RESP_OKAY;
    axi_rsp.arready = !ar_v;
    axi_rsp.rvalid  = r_v;
    axi_rsp.rdata   = r_d;
    axi_rsp.rresp   = r_err ? RESP_SLVERR : RESP_OKAY;
    wr_req  = aw_v && w_v && !b_v;
    wr_addr = aw_a;
    wr_data = w_d;
    wr_strb = w_s;
    rd_req  = ar_v && !r_v;
    rd_addr = ar_a;
  end
endmodule

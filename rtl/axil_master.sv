// axil_master: AXI4-lite master for the core's instruction fetches and bus data accesses.
//
// Two request ports use the same req/gnt handshake as the rest of the core: the instruction
// port (read only) and the data port coming from dmem_mux. The core is multi-cycle, so the two
// never wait at the same time; if they did, the data port would go first. One transaction at a
// time: a read drives AR until arready and then takes R; a write drives AW and W together
// (each until its ready) and then takes B. The grant is the cycle with rvalid or bvalid, and
// read data comes with it. An error response is passed on as a completed access (read data of
// an erroring read is whatever the slave returns); the document does not say how the core
// reacts to bus errors.
module axil_master
  import soc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction port
  input  logic        i_req,
  input  logic [31:0] i_addr,
  output logic        i_gnt,
  output logic [31:0] i_rdata,
  // data port
  input  logic        d_req,
  input  logic        d_we,
  input  logic [3:0]  d_be,
  input  logic [31:0] d_addr,
  input  logic [31:0] d_wdata,
  output logic        d_gnt,
  output logic [31:0] d_rdata,
  // AXI4-lite
  output axil_req_t   axi_req,
  input  axil_rsp_t   axi_rsp
);
  typedef enum logic [1:0] {B_IDLE, B_READ, B_WRITE} bstate_e;
  bstate_e     state_q;
  logic        owner_d_q;      // 1: data port owns the transaction
  logic [31:0] addr_q, wdata_q;
  logic [3:0]  strb_q;
  logic        addr_done_q, data_done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= B_IDLE;
      owner_d_q   <= 1'b0;
      addr_q      <= '0;
      wdata_q     <= '0;
      strb_q      <= '0;
      addr_done_q <= 1'b0;
      data_done_q <= 1'b0;
    end else begin
      unique case (state_q)
        B_IDLE: begin
          addr_done_q <= 1'b0;
          data_done_q <= 1'b0;
          if (d_req) begin
            owner_d_q <= 1'b1;
            addr_q    <= d_addr;
            wdata_q   <= d_wdata;
            strb_q    <= d_be;
            state_q   <= d_we ? B_WRITE : B_READ;
          end else if (i_req) begin
            owner_d_q <= 1'b0;
            addr_q    <= i_addr;
            state_q   <= B_READ;
          end
        end
        B_READ: begin
          if (axi_rsp.arready) addr_done_q <= 1'b1;
          if (axi_rsp.rvalid && addr_done_q) state_q <= B_IDLE;
        end
        B_WRITE: begin
          if (axi_rsp.awready) addr_done_q <= 1'b1;
          if (axi_rsp.wready)  data_done_q <= 1'b1;
          if (axi_rsp.bvalid && addr_done_q && data_done_q) state_q <= B_IDLE;
        end
        default: state_q <= B_IDLE;
      endcase
    end
  end

  logic done;
  always_comb begin
    axi_req         = '0;
    axi_req.araddr  = addr_q;
    axi_req.awaddr  = addr_q;
    axi_req.wdata   = wdata_q;
    axi_req.wstrb   = strb_q;
    axi_req.arvalid = (state_q == B_READ)  && !addr_done_q;
    axi_req.rready  = (state_q == B_READ)  && addr_done_q;
    axi_req.awvalid = (state_q == B_WRITE) && !addr_done_q;
    axi_req.wvalid  = (state_q == B_WRITE) && !data_done_q;
    axi_req.bready  = (state_q == B_WRITE) && addr_done_q && data_done_q;

    done    = (axi_req.rready && axi_rsp.rvalid) || (axi_req.bready && axi_rsp.bvalid);
    i_gnt   = done && !owner_d_q;
    d_gnt   = done && owner_d_q;
    i_rdata = axi_rsp.rdata;
    d_rdata = axi_rsp.rdata;
  end
endmodule

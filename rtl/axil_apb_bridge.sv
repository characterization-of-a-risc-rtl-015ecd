// axil_apb_bridge: AXI4-lite slave to APB3 master bridge towards the on-chip flash.
//
// The flash (eNVM) of the FPGA sits in the vendor microcontroller subsystem and is reached
// only over APB3, so the document adds this bridge. Each AXI4-lite access becomes one APB3
// transfer: a SETUP cycle (psel=1, penable=0) followed by ACCESS cycles (psel=1, penable=1)
// until pready; prdata and pslverr are returned as the AXI read data and SLVERR. A write
// waiting together with a read goes first. APB3 has no byte strobes: a write always writes
// the whole word. paddr is the full AXI address; the flash decodes its own offset.
// An assertion checks the APB3 rule that address and direction stay stable from SETUP until
// pready; its reset condition is why lint sees rst_n sampled as well as used as a reset.
module axil_apb_bridge
  import soc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   axi_req,
  output axil_rsp_t   axi_rsp,
  output logic        psel,
  output logic        penable,
  output logic        pwrite,
  output logic [31:0] paddr,
  output logic [31:0] pwdata,
  input  logic [31:0] prdata,
  input  logic        pready,
  input  logic        pslverr
);
  logic        wr_req, wr_ack, rd_req, rd_ack;
  logic [31:0] wr_addr, wr_data, rd_addr;
  logic [3:0]  wr_strb;

  axil_regif u_if (
    .clk, .rst_n, .axi_req, .axi_rsp,
    .wr_req, .wr_addr, .wr_data, .wr_strb, .wr_ack, .wr_err(pslverr),
    .rd_req, .rd_addr, .rd_data(prdata), .rd_ack, .rd_err(pslverr)
  );

  typedef enum logic [1:0] {P_IDLE, P_SETUP, P_ACCESS} pstate_e;
  pstate_e state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= P_IDLE;
      pwrite  <= 1'b0;
      paddr   <= '0;
      pwdata  <= '0;
    end else begin
      unique case (state_q)
        P_IDLE: begin
          if (wr_req) begin
            pwrite <= 1'b1; paddr <= wr_addr; pwdata <= wr_data; state_q <= P_SETUP;
          end else if (rd_req) begin
            pwrite <= 1'b0; paddr <= rd_addr; state_q <= P_SETUP;
          end
        end
        P_SETUP:  state_q <= P_ACCESS;
        P_ACCESS: if (pready) state_q <= P_IDLE;
        default:  state_q <= P_IDLE;
      endcase
    end
  end

  always_comb begin
    psel    = (state_q != P_IDLE);
    penable = (state_q == P_ACCESS);
    wr_ack  = penable && pready && pwrite;
    rd_ack  = penable && pready && !pwrite;
  end

  // APB3 rule: once selected, address and direction hold until the transfer completes
  property p_stable;
    @(posedge clk) disable iff (!rst_n) (psel && !(penable && pready)) |=> ($stable(paddr) && $stable(pwrite) && psel);
  endproperty
  a_stable: assert property (p_stable);
endmodule

// axil_interconnect: AXI4-lite interconnect from the one master to the three peripherals.
//
// Slave 0 = UART (0x40000000-0x400000FF), slave 1 = watchdog (0x40000100-0x400001FF),
// slave 2 = APB3 bridge to the flash (0x60000000-0x6FFFFFFF); the base addresses are those of
// the SoC diagram, the window sizes are this design's choice. Any other address is answered
// by the interconnect itself with DECERR (read data zero).
// One transaction at a time: in idle a pending AR (or else AW) picks the slave from its
// address; the master's channels are then connected to that slave until the R (or B)
// handshake ends the transaction. Selecting costs one cycle of latency.
module axil_interconnect
  import soc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m_req,
  output axil_rsp_t m_rsp,
  output axil_req_t s_req [3],
  input  axil_rsp_t s_rsp [3]
);
  typedef enum logic [1:0] {X_IDLE, X_READ, X_WRITE} xstate_e;
  xstate_e    state_q;
  logic [1:0] sel_q;          // 0..2 slaves, 3 = no slave (decode error)
  logic       aw_ok_q, w_ok_q, ar_ok_q;

  function automatic logic [1:0] decode(input logic [31:0] a);
    if (a[31:8] == UART_BASE[31:8]) return 2'd0;
    if (a[31:8] == WDT_BASE[31:8])  return 2'd1;
    if (a[31:28] == APB_BASE[31:28]) return 2'd2;
    return 2'd3;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= X_IDLE;
      sel_q   <= 2'd3;
      aw_ok_q <= 1'b0;
      w_ok_q  <= 1'b0;
      ar_ok_q <= 1'b0;
    end else begin
      unique case (state_q)
        X_IDLE: begin
          aw_ok_q <= 1'b0;
          w_ok_q  <= 1'b0;
          ar_ok_q <= 1'b0;
          if (m_req.arvalid) begin
            sel_q   <= decode(m_req.araddr);
            state_q <= X_READ;
          end else if (m_req.awvalid) begin
            sel_q   <= decode(m_req.awaddr);
            state_q <= X_WRITE;
          end
        end
        X_READ: begin
          if (m_req.arvalid && m_rsp.arready) ar_ok_q <= 1'b1;
          if (m_rsp.rvalid && m_req.rready) state_q <= X_IDLE;
        end
        X_WRITE: begin
          if (m_req.awvalid && m_rsp.awready) aw_ok_q <= 1'b1;
          if (m_req.wvalid && m_rsp.wready)   w_ok_q  <= 1'b1;
          if (m_rsp.bvalid && m_req.bready) state_q <= X_IDLE;
        end
        default: state_q <= X_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      s_req[i] = m_req;
      s_req[i].arvalid = 1'b0;
      s_req[i].rready  = 1'b0;
      s_req[i].awvalid = 1'b0;
      s_req[i].wvalid  = 1'b0;
      s_req[i].bready  = 1'b0;
    end
    m_rsp = '0;

    if (state_q == X_READ) begin
      if (sel_q != 2'd3) begin
        s_req[sel_q].arvalid = m_req.arvalid;
        s_req[sel_q].rready  = m_req.rready;
        m_rsp.arready = s_rsp[sel_q].arready;
        m_rsp.rvalid  = s_rsp[sel_q].rvalid;
        m_rsp.rdata   = s_rsp[sel_q].rdata;
        m_rsp.rresp   = s_rsp[sel_q].rresp;
      end else begin
        m_rsp.arready = !ar_ok_q;
        m_rsp.rvalid  = ar_ok_q;
        m_rsp.rresp   = RESP_DECERR;
      end
    end else if (state_q == X_WRITE) begin
      if (sel_q != 2'd3) begin
        s_req[sel_q].awvalid = m_req.awvalid;
        s_req[sel_q].wvalid  = m_req.wvalid;
        s_req[sel_q].bready  = m_req.bready;
        m_rsp.awready = s_rsp[sel_q].awready;
        m_rsp.wready  = s_rsp[sel_q].wready;
        m_rsp.bvalid  = s_rsp[sel_q].bvalid;
        m_rsp.bresp   = s_rsp[sel_q].bresp;
      end else begin
        m_rsp.awready = !aw_ok_q;
        m_rsp.wready  = !w_ok_q;
        m_rsp.bvalid  = aw_ok_q && w_ok_q;
        m_rsp.bresp   = RESP_DECERR;
      end
    end
  end
endmodule

// riscv_soc: the hardened RISC-V system-on-chip.
//
// A multi-cycle RV32I core with SECDED-protected PC and register file and triplicated ALU and
// control (rv_core) runs its program straight out of the on-chip flash. Its data accesses go
// through an address multiplexer (dmem_mux) either to the SECDED-protected data memory
// (dmem_secded, addresses with addr[31:30] == 0) or, like the instruction fetches, to the
// AXI4-lite master. An AXI4-lite interconnect spreads the bus over the UART (0x40000000), the
// watchdog timer (0x40000100) and the APB3 bridge to the flash (0x60000000). The watchdog's
// reset and the power-on reset meet in reset_ctrl, which resets the whole SoC and keeps the
// reset cause for the core's reset-cause CSR; the core's error counters survive watchdog resets.
// The flash itself is the FPGA vendor's memory block and is not part of this RTL: its APB3
// port is brought out (apb_*). Reset vector 0x60000000 is the first flash word.
// Clock: one clock, 50 MHz in the document's setup (the default watchdog and UART settings
// assume it). por_rst_n is active low.
module riscv_soc
  import soc_pkg::*;
#(
  parameter int unsigned DMEM_WORDS   = 8192,
  parameter int unsigned WDT_TIMEOUT  = 500_000_000,
  parameter int unsigned UART_DIV     = 434,
  parameter logic [31:0] RESET_VECTOR = RESET_VEC
) (
  input  logic        clk,
  input  logic        por_rst_n,
  output logic        uart_tx,
  input  logic        uart_rx,
  output logic        apb_psel,
  output logic        apb_penable,
  output logic        apb_pwrite,
  output logic [31:0] apb_paddr,
  output logic [31:0] apb_pwdata,
  input  logic [31:0] apb_prdata,
  input  logic        apb_pready,
  input  logic        apb_pslverr
);
  logic rst_n, wdt_rst, wdt_cause;

  reset_ctrl u_rst (.clk, .por_rst_n, .wdt_rst_req(wdt_rst), .soc_rst_n(rst_n), .wdt_cause);

  // core
  logic        i_req, i_gnt;
  logic [31:0] i_addr, i_rdata;
  logic        c_req, c_we, c_gnt, c_err_s, c_err_d, c_corr;
  logic [3:0]  c_be;
  logic [31:0] c_addr, c_wdata, c_rdata;

  rv_core #(.RESET_VECTOR(RESET_VECTOR)) u_core (
    .clk, .rst_n, .por_rst_n,
    .imem_req(i_req), .imem_addr(i_addr), .imem_gnt(i_gnt), .imem_rdata(i_rdata),
    .dmem_req(c_req), .dmem_we(c_we), .dmem_be(c_be), .dmem_addr(c_addr), .dmem_wdata(c_wdata),
    .dmem_gnt(c_gnt), .dmem_rdata(c_rdata), .dmem_err_single(c_err_s), .dmem_err_double(c_err_d),
    .dmem_correct_en(c_corr), .wdt_reset_cause(wdt_cause)
  );

  // data access multiplexer
  logic        m_req, m_gnt, m_err_s, m_err_d, b_req, b_gnt, x_we;
  logic [31:0] m_rdata, b_rdata, x_addr, x_wdata;
  logic [3:0]  x_be;

  dmem_mux u_mux (
    .req(c_req), .we(c_we), .be(c_be), .addr(c_addr), .wdata(c_wdata),
    .gnt(c_gnt), .rdata(c_rdata), .err_single(c_err_s), .err_double(c_err_d),
    .mem_req(m_req), .mem_gnt(m_gnt), .mem_rdata(m_rdata),
    .mem_err_single(m_err_s), .mem_err_double(m_err_d),
    .bus_req(b_req), .bus_gnt(b_gnt), .bus_rdata(b_rdata),
    .out_we(x_we), .out_be(x_be), .out_addr(x_addr), .out_wdata(x_wdata)
  );

  dmem_secded #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .rst_n, .req(m_req), .we(x_we), .be(x_be), .addr(x_addr), .wdata(x_wdata),
    .correct_en(c_corr), .gnt(m_gnt), .rdata(m_rdata), .err_single(m_err_s), .err_double(m_err_d)
  );

  // AXI4-lite
  axil_req_t m_axi_req;
  axil_rsp_t m_axi_rsp;
  axil_req_t s_axi_req [3];
  axil_rsp_t s_axi_rsp [3];

  axil_master u_axm (
    .clk, .rst_n,
    .i_req, .i_addr, .i_gnt, .i_rdata,
    .d_req(b_req), .d_we(x_we), .d_be(x_be), .d_addr(x_addr), .d_wdata(x_wdata),
    .d_gnt(b_gnt), .d_rdata(b_rdata),
    .axi_req(m_axi_req), .axi_rsp(m_axi_rsp)
  );

  axil_interconnect u_xbar (
    .clk, .rst_n, .m_req(m_axi_req), .m_rsp(m_axi_rsp), .s_req(s_axi_req), .s_rsp(s_axi_rsp)
  );

  axil_uart #(.DEFAULT_DIV(UART_DIV)) u_uart (
    .clk, .rst_n, .axi_req(s_axi_req[0]), .axi_rsp(s_axi_rsp[0]), .tx(uart_tx), .rx(uart_rx)
  );

  axil_wdt #(.DEFAULT_TIMEOUT(WDT_TIMEOUT)) u_wdt (
    .clk, .rst_n, .axi_req(s_axi_req[1]), .axi_rsp(s_axi_rsp[1]), .wdt_rst
  );

  axil_apb_bridge u_apb (
    .clk, .rst_n, .axi_req(s_axi_req[2]), .axi_rsp(s_axi_rsp[2]),
    .psel(apb_psel), .penable(apb_penable), .pwrite(apb_pwrite), .paddr(apb_paddr),
    .pwdata(apb_pwdata), .prdata(apb_prdata), .pready(apb_pready), .pslverr(apb_pslverr)
  );
endmodule

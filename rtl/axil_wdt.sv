// axil_wdt: watchdog timer on AXI4-lite that resets the whole SoC when software stops kicking it.
//
// A down-counter runs while enabled; when it reaches zero wdt_rst goes high and the reset
// controller resets the SoC (this timer included). As in the document the watchdog is enabled
// out of reset. Registers (byte offsets):
//   0x0 LOAD   read/write: writing sets the reload value and restarts the count from it (the
//              kick). Software writes 10 s worth of cycles per benchmark iteration; writing 1
//              forces a watchdog reset on the next cycle.
//   0x4 CTRL   read/write: bit 0 = enable (reset value 1)
//   0x8 COUNT  read: current count
// DEFAULT_TIMEOUT (the count after reset) is 500,000,000 cycles = 10 s at 50 MHz, the period
// the document uses; the register map is this design's choice.
module axil_wdt
  import soc_pkg::*;
#(
  parameter int unsigned DEFAULT_TIMEOUT = 500_000_000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t axi_req,
  output axil_rsp_t axi_rsp,
  output logic      wdt_rst
);
  logic        wr_req, wr_ack, rd_req, rd_ack;
  logic [31:0] wr_addr, wr_data, rd_addr, rd_data;
  logic [3:0]  wr_strb;

  axil_regif u_if (
    .clk, .rst_n, .axi_req, .axi_rsp,
    .wr_req, .wr_addr, .wr_data, .wr_strb, .wr_ack, .wr_err(1'b0),
    .rd_req, .rd_addr, .rd_data, .rd_ack, .rd_err(1'b0)
  );

  logic [31:0] load_q, count_q;
  logic        en_q;

  always_comb begin
    wr_ack = wr_req;
    rd_ack = rd_req;
    unique case (rd_addr[3:2])
      2'd0:    rd_data = load_q;
      2'd1:    rd_data = {31'b0, en_q};
      2'd2:    rd_data = count_q;
      default: rd_data = '0;
    endcase
    wdt_rst = en_q && (count_q == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_q  <= 32'(DEFAULT_TIMEOUT);
      count_q <= 32'(DEFAULT_TIMEOUT);
      en_q    <= 1'b1;
    end else begin
      if (en_q && count_q != '0) count_q <= count_q - 32'd1;
      if (wr_req && wr_ack) begin
        unique case (wr_addr[3:2])
          2'd0: begin load_q <= wr_data; count_q <= wr_data; end
          2'd1: en_q <= wr_data[0];
          default: ;
        endcase
      end
    end
  end
endmodule

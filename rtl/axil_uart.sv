// axil_uart: UART peripheral on AXI4-lite (8 data bits, no parity, one stop bit).
//
// The SoC prints its results and error counters through this UART. Registers (byte offsets):
//   0x0 TXDATA  write: send the low byte. The write is held (no B response) while the
//               transmitter is busy, so software never loses a character and needs no polling.
//   0x4 STATUS  read: bit 0 = transmitter busy, bit 1 = received byte waiting
//   0x8 RXDATA  read: last received byte; reading clears the waiting flag
//   0xC DIV     read/write: clock cycles per bit (reset DEFAULT_DIV = 434, 115200 baud at 50 MHz)
// The document only names the UART; register map, frame format and baud rate are this
// design's choices. The receiver samples the middle of each bit after a 2-flop synchroniser.
module axil_uart
  import soc_pkg::*;
#(
  parameter int unsigned DEFAULT_DIV = 434
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t axi_req,
  output axil_rsp_t axi_rsp,
  output logic      tx,
  input  logic      rx
);
  logic        wr_req, wr_ack, rd_req, rd_ack;
  logic [31:0] wr_addr, wr_data, rd_addr, rd_data;
  logic [3:0]  wr_strb;

  axil_regif u_if (
    .clk, .rst_n, .axi_req, .axi_rsp,
    .wr_req, .wr_addr, .wr_data, .wr_strb, .wr_ack, .wr_err(1'b0),
    .rd_req, .rd_addr, .rd_data, .rd_ack, .rd_err(1'b0)
  );

  logic [15:0] div_q;
  // transmitter
  logic [9:0]  tx_shift;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;
  logic        tx_busy;
  // receiver
  logic [1:0]  rx_sync;
  logic        rx_busy;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;
  logic [7:0]  rx_shift, rx_data;
  logic        rx_valid;

  assign tx_busy = (tx_bits != 4'd0);
  assign tx      = tx_busy ? tx_shift[0] : 1'b1;

  always_comb begin
    wr_ack  = wr_req && !(wr_addr[3:2] == 2'd0 && tx_busy);
    rd_ack  = rd_req;
    unique case (rd_addr[3:2])
      2'd0:    rd_data = '0;
      2'd1:    rd_data = {30'b0, rx_valid, tx_busy};
      2'd2:    rd_data = {24'b0, rx_data};
      default: rd_data = {16'b0, div_q};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q    <= 16'(DEFAULT_DIV);
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      rx_sync  <= 2'b11;
      rx_busy  <= 1'b0;
      rx_bits  <= '0;
      rx_cnt   <= '0;
      rx_shift <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
    end else begin
      // register writes
      if (wr_req && wr_ack) begin
        if (wr_addr[3:2] == 2'd0 && wr_strb[0]) begin
          tx_shift <= {1'b1, wr_data[7:0], 1'b0};
          tx_bits  <= 4'd10;
          tx_cnt   <= div_q - 16'd1;
        end
        if (wr_addr[3:2] == 2'd3) div_q <= wr_data[15:0];
      end
      // transmit
      if (tx_busy) begin
        if (tx_cnt == '0) begin
          tx_cnt   <= div_q - 16'd1;
          tx_shift <= {1'b1, tx_shift[9:1]};
          tx_bits  <= tx_bits - 4'd1;
        end else begin
          tx_cnt <= tx_cnt - 16'd1;
        end
      end
      // receive
      rx_sync <= {rx_sync[0], rx};
      if (!rx_busy) begin
        if (!rx_sync[1]) begin
          rx_busy <= 1'b1;
          rx_bits <= 4'd9;
          rx_cnt  <= (div_q >> 1);
        end
      end else if (rx_cnt == '0) begin
        rx_cnt  <= div_q - 16'd1;
        rx_bits <= rx_bits - 4'd1;
        if (rx_bits == 4'd9) begin
          if (rx_sync[1]) rx_busy <= 1'b0;          // false start
        end else if (rx_bits == 4'd0) begin
          rx_busy <= 1'b0;
        end else begin
          rx_shift <= {rx_sync[1], rx_shift[7:1]};
          if (rx_bits == 4'd1) begin
            rx_data  <= {rx_sync[1], rx_shift[7:1]};
            rx_valid <= 1'b1;
          end
        end
      end else begin
        rx_cnt <= rx_cnt - 16'd1;
      end
      if (rd_req && rd_ack && rd_addr[3:2] == 2'd2) rx_valid <= 1'b0;
    end
  end
endmodule

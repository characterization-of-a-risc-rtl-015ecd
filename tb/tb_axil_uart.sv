// tb_axil_uart: self-checking test of the UART.
//
// With 16 cycles per bit: bytes written to TXDATA are decoded from the tx line by a monitor
// here and compared, including the bit period (a rate check: the frame of 10 bits takes
// 160 cycles); back-to-back writes are held until the transmitter is free, so no byte is lost;
// STATUS shows busy; DIV can be changed; tx looped back to rx is received into RXDATA.
`timescale 1ns/1ps
module tb_axil_uart;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, tx;
  axil_req_t req = '0;
  axil_rsp_t rsp;
  int checks = 0, failures = 0;
  int div = 16;
  byte got [$];
  int  frame_len [$];
  always #5 clk = ~clk;

  axil_uart #(.DEFAULT_DIV(16)) dut (.clk, .rst_n, .axi_req(req), .axi_rsp(rsp), .tx, .rx(tx));

  `include "axil_tasks.svh"

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // line monitor: sample mid-bit, measure start-to-stop-end length
  initial begin
    forever begin
      logic [7:0] ch;
      int len;
      @(negedge tx);
      len = 0;
      repeat (div / 2) begin @(posedge clk); len++; end
      for (int b = 0; b < 8; b++) begin
        repeat (div) begin @(posedge clk); len++; end
        ch[b] = tx;
      end
      repeat (div) begin @(posedge clk); len++; end
      if (tx !== 1'b1) begin failures++; $display("FAIL: stop bit"); end
      while (tx === 1'b1 && len < 10 * div) begin @(posedge clk); len++; end
      got.push_back(ch);
      frame_len.push_back(len);
    end
  end

  initial begin
    logic [31:0] v;
    logic [1:0]  r;
    byte msg [4];
    msg = '{8'h48, 8'hA5, 8'h00, 8'hFF};
    #12 rst_n = 1'b1;
    axi_read(32'h4000_000C, v, r); check(v == 16, "DIV reset value");
    axi_read(32'h4000_0004, v, r); check(v[0] == 1'b0, "idle");
    for (int i = 0; i < 4; i++) begin
      axi_write(32'h4000_0000, 32'(msg[i]), 4'h1, r);
      if (i == 0) begin axi_read(32'h4000_0004, v, r); check(v[0] == 1'b1, "busy while sending"); end
    end
    repeat (12 * 16) @(negedge clk);
    check(got.size() == 4, $sformatf("%0d bytes received", got.size()));
    for (int i = 0; i < got.size() && i < 4; i++) check(got[i] == msg[i], $sformatf("byte %0d: %h", i, got[i]));
    for (int i = 0; i < frame_len.size() && i < 3; i++)
      check(frame_len[i] == 160, $sformatf("frame %0d lasted %0d cycles, expected 160", i, frame_len[i]));
    axi_read(32'h4000_0004, v, r); check(v[1] == 1'b1, "looped-back byte waiting");
    axi_read(32'h4000_0008, v, r); check(v[7:0] == 8'hFF, "RXDATA holds the last byte");
    axi_read(32'h4000_0004, v, r); check(v[1] == 1'b0, "RXDATA read clears the flag");
    axi_write(32'h4000_000C, 32'd8, 4'hF, r);
    div = 8;
    axi_write(32'h4000_0000, 32'h5A, 4'h1, r);
    repeat (12 * 8) @(negedge clk);
    check(got.size() == 5 && got[4] == 8'h5A, "byte at the new rate");
    if (frame_len.size() == 5) check(frame_len[4] == 80, $sformatf("frame at new rate lasted %0d", frame_len[4]));
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

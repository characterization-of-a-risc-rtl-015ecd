// tb_hamming_reg: self-checking test of the SECDED-protected register used for the PC.
//
// Checks the reset value, write/read of random values, repair and flagging of a flipped stored
// bit with correction on, pass-through of the flip with correction off, scrubbing by the next
// write, and detection of a double flip. Flips are injected into the stored code word.
`timescale 1ns/1ps
module tb_hamming_reg;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, corr = 1'b1, es, ed;
  logic [31:0] d = '0, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hamming_reg #(.RESET_VALUE(32'h6000_0000)) dut (.clk, .rst_n, .we, .d, .correct_en(corr), .q,
                                                  .err_single(es), .err_double(ed));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(logic [31:0] v);
    @(negedge clk); d = v; we = 1'b1; @(negedge clk); we = 1'b0;
  endtask

  initial begin
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(q == 32'h6000_0000 && !es && !ed, "reset value");
    for (int t = 0; t < 50; t++) begin
      logic [31:0] v;
      v = $urandom;
      wr(v);
      check(q == v && !es && !ed, "write/read");
      dut.code_q[t % 39] = ~dut.code_q[t % 39];
      corr = 1'b1; #1;
      check(q == v && es && !ed, "flip corrected");
      corr = 1'b0; #1;
      check(es, "flip flagged with correction off");
      if ((t % 39) != 0 && ((t % 39) & ((t % 39) - 1)) != 0) check(q != v, "flip visible with correction off");
      corr = 1'b1;
      wr(v + 4);
      check(q == v + 4 && !es, "write scrubs the flip");
    end
    dut.code_q[3] = ~dut.code_q[3];
    dut.code_q[20] = ~dut.code_q[20];
    #1 check(ed && !es, "double flip detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

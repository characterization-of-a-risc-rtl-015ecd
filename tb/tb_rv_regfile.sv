// tb_rv_regfile: self-checking test of the SECDED register file.
//
// Writes every register with random values, reads them back on both ports, checks that x0
// stays zero, then flips one stored bit (corrected on both ports and flagged per port), two
// bits (flagged as double) and checks that with correction off a flipped data bit reaches
// the output.
`timescale 1ns/1ps
module tb_rv_regfile;
  import soc_pkg::*;
  logic clk = 1'b0, corr = 1'b1, we = 1'b0;
  logic [4:0]  ra1 = '0, ra2 = '0, wa = '0;
  logic [31:0] wd = '0, rd1, rd2;
  logic        s1, d1, s2, d2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rv_regfile dut (.clk, .correct_en(corr), .raddr1(ra1), .raddr2(ra2), .rdata1(rd1), .rdata2(rd2),
                  .err1_single(s1), .err1_double(d1), .err2_single(s2), .err2_double(d2),
                  .we, .waddr(wa), .wdata(wd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    model[0] = '0;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk); wa = 5'(r); wd = $urandom; we = 1'b1;
      if (r != 0) model[r] = wd;
    end
    @(negedge clk); we = 1'b0;
    for (int t = 0; t < 200; t++) begin
      ra1 = 5'($urandom); ra2 = 5'($urandom); #1;
      check(rd1 == model[ra1] && rd2 == model[ra2] && !s1 && !s2 && !d1 && !d2,
            $sformatf("read x%0d x%0d", ra1, ra2));
    end
    for (int r = 1; r < 32; r++) begin
      int b;
      b = $urandom_range(0, 38);
      dut.regs[r][b] = ~dut.regs[r][b];
      ra1 = 5'(r); ra2 = 5'(r); corr = 1'b1; #1;
      check(rd1 == model[r] && rd2 == model[r] && s1 && s2 && !d1 && !d2, $sformatf("single flip x%0d bit %0d", r, b));
      ra2 = 5'((r + 1) % 32); #1;
      check(s1 && !s2, "flag only on the port reading the upset register");
      dut.regs[r][b] = ~dut.regs[r][b];
    end
    dut.regs[5][9] = ~dut.regs[5][9];               // code bit 9 = data bit 4
    ra1 = 5'd5; corr = 1'b0; #1;
    check(rd1 == (model[5] ^ 32'h10) && s1, "uncorrected with correction off");
    dut.regs[5][11] = ~dut.regs[5][11];
    corr = 1'b1; #1;
    check(d1 && !s1, "double flip detected");
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

// tb_dmem_secded: self-checking test of the SECDED data memory.
//
// Against a reference array: random full-word writes, byte and half-word writes
// (read-modify-write), reads, each with its grant latency checked (one cycle after the
// request). Then single flips in stored words (corrected and flagged), a flip with correction
// off (passes through), a double flip (flagged), and a partial write into a word with a single
// flip, which must merge into the corrected data.
`timescale 1ns/1ps
module tb_dmem_secded;
  import soc_pkg::*;
  localparam int W = 256;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, we = 1'b0, corr = 1'b1, gnt, es, ed;
  logic [3:0]  be = '0;
  logic [31:0] addr = '0, wdata = '0, rdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dmem_secded #(.WORDS(W)) dut (.clk, .rst_n, .req, .we, .be, .addr, .wdata, .correct_en(corr),
                                .gnt, .rdata, .err_single(es), .err_double(ed));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one access; returns data and flags sampled with the grant, and the grant latency
  task automatic access(logic w, logic [3:0] b, int idx, logic [31:0] d,
                        output logic [31:0] q, output logic s, output logic dd, output int lat);
    @(negedge clk); req = 1'b1; we = w; be = b; addr = 32'(idx * 4); wdata = d; lat = 0;
    #1;
    while (!gnt) begin @(negedge clk); lat++; #1; end
    q = rdata; s = es; dd = ed;
    @(negedge clk); req = 1'b0;
  endtask

  initial begin
    logic [31:0] q;
    logic s, dd;
    int lat;
    #12 rst_n = 1'b1;
    for (int i = 0; i < W; i++) begin
      model[i] = $urandom;
      access(1'b1, 4'hF, i, model[i], q, s, dd, lat);
      if (i < 4) check(lat == 1, $sformatf("write grant latency %0d", lat));
    end
    for (int t = 0; t < 300; t++) begin
      int i;
      logic [3:0] b;
      logic [31:0] d;
      i = $urandom_range(0, W - 1);
      if (t % 3 == 0) begin
        b = (t % 2 == 0) ? 4'b0001 << (t % 4) : 4'b1100;
        d = $urandom;
        access(1'b1, b, i, d, q, s, dd, lat);
        for (int k = 0; k < 4; k++) if (b[k]) model[i][8*k +: 8] = d[8*k +: 8];
        check(lat == 1, "partial write latency");
      end else begin
        access(1'b0, 4'hF, i, 0, q, s, dd, lat);
        check(q == model[i] && !s && !dd, $sformatf("read word %0d", i));
        check(lat == 1, $sformatf("read grant latency %0d", lat));
      end
    end
    // single flips
    for (int t = 0; t < 39; t++) begin
      dut.mem[t][t] = ~dut.mem[t][t];
      access(1'b0, 4'hF, t, 0, q, s, dd, lat);
      check(q == model[t] && s && !dd, $sformatf("single flip bit %0d corrected", t));
    end
    // correction off: code bit 3 carries data bit 0 (word 3 already has flip at bit 3)
    corr = 1'b0;
    access(1'b0, 4'hF, 3, 0, q, s, dd, lat);
    check(q == (model[3] ^ 32'h1) && s, "flip passes with correction off");
    corr = 1'b1;
    // double flip
    dut.mem[100][5] = ~dut.mem[100][5];
    dut.mem[100][17] = ~dut.mem[100][17];
    access(1'b0, 4'hF, 100, 0, q, s, dd, lat);
    check(dd && !s, "double flip detected");
    // partial write over a single flip merges corrected data and rewrites a clean word
    dut.mem[120][30] = ~dut.mem[120][30];
    access(1'b1, 4'b0010, 120, 32'h0000_AB00, q, s, dd, lat);
    model[120][15:8] = 8'hAB;
    check(s, "flip seen during read-modify-write");
    access(1'b0, 4'hF, 120, 0, q, s, dd, lat);
    check(q == model[120] && !s, "merged word is clean");
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

// tb_tmr_voter: self-checking test of the majority voter.
//
// Random words with no, one or two corrupted copies: with correction on the output is the
// bitwise majority (computed here bit by bit), with correction off it is copy 0; mismatch is
// high exactly when the copies differ.
`timescale 1ns/1ps
module tb_tmr_voter;
  logic [32:0] a, b, c, y;
  logic        corr, mm;
  int checks = 0, failures = 0;

  tmr_voter #(.WIDTH(33)) dut (.in0(a), .in1(b), .in2(c), .correct_en(corr), .out(y), .mismatch(mm));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [32:0] v, e;
      v = {$urandom, 1'($urandom)};
      a = v; b = v; c = v;
      unique case (t % 4)
        0: ;
        1: a = v ^ (33'h1 << $urandom_range(0, 32));
        2: b = {$urandom, 1'b0};
        3: begin c = ~v; b = v ^ 33'h1; end
      endcase
      corr = 1'($urandom);
      #1;
      for (int i = 0; i < 33; i++) e[i] = (32'(a[i]) + 32'(b[i]) + 32'(c[i])) >= 2;
      check(y == (corr ? e : a), "voted output");
      check(mm == !(a == b && b == c), "mismatch flag");
      if (t % 4 == 1 && corr) check(y == v, "single faulty copy masked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

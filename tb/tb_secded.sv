// tb_secded: self-checking test of the SECDED encoder and decoder (39,32).
//
// For random words it checks, independently of the design's encoding routine, that a code
// word has even overall parity and an all-zero Hamming syndrome, that words differing in one
// data bit give code words at least 4 bits apart (the SECDED distance), that every one of the
// 39 single flips is flagged and repaired (and with correction off repaired only if the flip
// hit a check bit), and that random double flips are flagged as uncorrectable.
`timescale 1ns/1ps
module tb_secded;
  import soc_pkg::*;

  logic [31:0] d, d2, q;
  logic [38:0] c, c2, cin;
  logic        corr, es, ed;
  int checks = 0, failures = 0;

  secded_enc u_enc  (.data(d),  .code(c));
  secded_enc u_enc2 (.data(d2), .code(c2));
  secded_dec u_dec  (.code(cin), .correct_en(corr), .data(q), .err_single(es), .err_double(ed));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [5:0] syndrome(input logic [38:0] w);
    logic [5:0] s;
    s = '0;
    for (int p = 1; p < 39; p++) s ^= 6'(p) & {6{w[p]}};
    return s;
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      d = $urandom; d2 = d ^ (32'h1 << $urandom_range(0, 31)); corr = 1'b1;
      #1;
      check(^c == 1'b0, "overall parity even");
      check(syndrome(c) == 6'd0, "zero syndrome");
      check($countones(c ^ c2) >= 4, "distance >= 4");
      cin = c; #1;
      check(q == d && !es && !ed, "clean word decodes");
      for (int b = 0; b < 39; b++) begin
        cin = c ^ (39'h1 << b); corr = 1'b1; #1;
        check(q == d && es && !ed, $sformatf("single flip bit %0d corrected", b));
        corr = 1'b0; #1;
        check(es && !ed, "single flip flagged without correction");
        // data bits live at the positions that are not powers of two (and not 0)
        check((q == d) == (b == 0 || (b & (b - 1)) == 0), $sformatf("uncorrected flip bit %0d passes through", b));
      end
      begin
        int a, b;
        a = $urandom_range(0, 38);
        b = (a + $urandom_range(1, 38)) % 39;
        cin = c ^ (39'h1 << a) ^ (39'h1 << b); corr = 1'b1; #1;
        check(ed && !es, $sformatf("double flip %0d,%0d detected", a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

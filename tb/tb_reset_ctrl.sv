// tb_reset_ctrl: self-checking test of the reset controller: power-on reset asserts the SoC
// reset at once and releases it STRETCH cycles after por_rst_n rises; a one-cycle watchdog
// request resets the SoC for exactly STRETCH+1 cycles and sets the reset cause, which only the
// power-on reset clears.
`timescale 1ns/1ps
module tb_reset_ctrl;
  logic clk = 1'b0, por = 1'b0, wreq = 1'b0, srst, cause;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  reset_ctrl #(.STRETCH(16)) dut (.clk, .por_rst_n(por), .wdt_rst_req(wreq), .soc_rst_n(srst), .wdt_cause(cause));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cnt;
    #1 check(!srst && !cause, "power-on reset asserted");
    #20 @(negedge clk); por = 1'b1;
    cnt = 0;
    while (!srst) begin @(negedge clk); cnt++; end
    check(cnt == 17, $sformatf("power-on release after %0d cycles, expected 17", cnt));
    check(!cause, "cause: power-on");
    repeat (5) @(negedge clk);
    wreq = 1'b1; @(negedge clk); wreq = 1'b0;
    check(!srst && cause, "watchdog reset asserted, cause set");
    cnt = 0;
    while (!srst) begin @(negedge clk); cnt++; end
    check(cnt == 17, $sformatf("watchdog reset lasted %0d cycles, expected 17", cnt));
    check(cause, "cause kept after release");
    #3 por = 1'b0; #1;
    check(!srst && !cause, "power-on reset clears the cause asynchronously");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rv_csr: self-checking test of the CSR file.
//
// Checks reset values (hardening all on), csrrw/rs/rc semantics, the 64-bit cycle counter's
// rate (exactly one per clock, carried into cycleh), trap entry (uepc/ucause/utval, UIE to
// UPIE) and uret, the machine information registers, the ten error counters (one per input,
// each counting its own events), that the SoC reset leaves the counters alone while the
// power-on reset clears them, and the reset-cause register.
`timescale 1ns/1ps
module tb_rv_csr;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, por_rst_n = 1'b0;
  logic csr_en = 1'b0, trap_en = 1'b0, uret_en = 1'b0, cause_in = 1'b0;
  csr_op_e op = CSR_NONE;
  logic [11:0] addr = '0;
  logic [31:0] wdata = '0, rdata, utvec, uepc;
  logic [3:0]  tcause = '0;
  logic [31:0] tpc = '0, tval = '0;
  harden_cfg_t cfg;
  logic [N_ERR_CNT-1:0] inc = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rv_csr dut (.clk, .rst_n, .por_rst_n, .csr_en, .csr_op(op), .csr_addr(addr), .csr_wdata(wdata),
              .csr_rdata(rdata), .trap_en, .trap_cause(tcause), .trap_pc(tpc), .trap_val(tval),
              .uret_en, .utvec, .uepc, .harden_cfg(cfg), .err_inc(inc), .wdt_reset_cause(cause_in));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic rd(logic [11:0] a, output logic [31:0] v);
    @(negedge clk); addr = a; #1 v = rdata;
  endtask
  task automatic acc(csr_op_e o, logic [11:0] a, logic [31:0] w, output logic [31:0] old);
    @(negedge clk); addr = a; op = o; wdata = w; csr_en = 1'b1; #1 old = rdata;
    @(negedge clk); csr_en = 1'b0; op = CSR_NONE;
  endtask

  initial begin
    logic [31:0] v, v2;
    #12 por_rst_n = 1'b1; rst_n = 1'b1;
    rd(CSR_HARDEN, v); check(v == 32'h1F && cfg == HARDEN_ALL, "hardening on at reset");
    acc(CSR_RW, CSR_HARDEN, 32'h5, v); check(v == 32'h1F, "csrrw returns old value");
    check(cfg == harden_cfg_t'(5'h5), "csrrw writes");
    acc(CSR_RS, CSR_HARDEN, 32'h2, v); check(cfg == harden_cfg_t'(5'h7), "csrrs sets");
    acc(CSR_RC, CSR_HARDEN, 32'h4, v); check(cfg == harden_cfg_t'(5'h3), "csrrc clears");
    acc(CSR_RW, CSR_USCRATCH, 32'hCAFE_F00D, v); rd(CSR_USCRATCH, v); check(v == 32'hCAFE_F00D, "uscratch");
    acc(CSR_RW, CSR_UTVEC, 32'h6000_0103, v); check(utvec == 32'h6000_0100, "utvec aligned");
    rd(CSR_MIMPID, v); check(v == MIMPID_VALUE, "mimpid");
    rd(CSR_MHARTID, v); check(v == 0, "mhartid");
    // cycle counter rate
    rd(CSR_CYCLE, v); repeat (100) @(negedge clk); #1 v2 = rdata;
    check(v2 - v == 32'd100, $sformatf("cycle counter: %0d counts in 100 cycles", v2 - v));
    dut.cycle_q = 64'h0000_0000_FFFF_FFFE;
    repeat (3) @(negedge clk);
    rd(CSR_CYCLEH, v); check(v == 1, "cycleh carries");
    // ustatus.UIE set, then trap and return
    acc(CSR_RS, CSR_USTATUS, 32'h1, v);
    @(negedge clk); trap_en = 1'b1; tcause = CAUSE_ECALL; tpc = 32'h6000_0040; tval = 32'h0;
    @(negedge clk); trap_en = 1'b0;
    check(uepc == 32'h6000_0040, "uepc saved");
    rd(CSR_UCAUSE, v); check(v == 8, "ucause saved");
    rd(CSR_USTATUS, v); check(v == 32'h10, "UIE moved to UPIE");
    @(negedge clk); uret_en = 1'b1; @(negedge clk); uret_en = 1'b0;
    rd(CSR_USTATUS, v); check(v[0] == 1'b1, "uret restores UIE");
    // error counters: counter i counts i+1 events
    for (int i = 0; i < N_ERR_CNT; i++) begin
      for (int j = 0; j <= i; j++) begin @(negedge clk); inc = '0; inc[i] = 1'b1; end
      @(negedge clk); inc = '0;
    end
    for (int i = 0; i < N_ERR_CNT; i++) begin
      rd(CSR_ERRCNT0 + 12'(i), v); check(v == 32'(i + 1), $sformatf("error counter %0d = %0d", i, v));
    end
    acc(CSR_RW, CSR_ERRCNT0, 32'h0, v); rd(CSR_ERRCNT0, v); check(v == 1, "error counters are read-only");
    // reset cause
    cause_in = 1'b1; rd(CSR_RSTCAUSE, v); check(v == 1, "reset cause");
    // SoC reset keeps the counters, power-on reset clears them
    @(negedge clk); rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    rd(CSR_ERRCNT0 + 12'd9, v); check(v == 10, "counters survive SoC reset");
    rd(CSR_HARDEN, v); check(v == 32'h1F, "hardening back to all on after SoC reset");
    @(negedge clk); por_rst_n = 1'b0; @(negedge clk); por_rst_n = 1'b1;
    rd(CSR_ERRCNT0 + 12'd9, v); check(v == 0, "power-on reset clears counters");
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

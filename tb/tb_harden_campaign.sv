// tb_harden_campaign: the four-configuration radiation-test sequence, run on the SoC at its
// default parameters.
//
// The document's test software selects a hardening configuration at the start of each
// execution, in the order processor+memory, memory only, none, processor only, and ends each
// execution by forcing a watchdog reset, so the next starts from reset. This testbench runs a
// program written in that style from the flash model. The program picks its run number from
// the reset-cause CSR (power-on: run 0) and a word kept in data memory. It writes the matching
// value into the hardening-configuration CSR, fills a 64-word vector in data memory, and loads
// a constant into x20. It then reports that it is ready and waits. The testbench now plays the
// radiation: it flips one data bit of a stored vector word and one bit of x20, then lets the
// program go on.
// The program sums the vector and compares the sum and x20 with reference values fetched fresh
// from flash. It prints the run number, 'M' or 'm' (sum right or wrong), 'R' or 'r' (x20
// right or wrong), and the low digit of the data-memory and rs1 single-error counters. It then
// waits for the UART to drain and forces the watchdog reset. After the fourth run it prints
// 'E'. The expected line follows from which corrections each configuration enables; the
// counters keep counting across the watchdog resets.
`timescale 1ns/1ps
module tb_harden_campaign;
  import soc_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 1'b0, por_rst_n = 1'b0;
  always #10 clk = ~clk;    // 50 MHz

  logic        uart_tx;
  logic        psel, penable, pwrite, pready, pslverr;
  logic [31:0] paddr, pwdata, prdata;

  riscv_soc dut (
    .clk, .por_rst_n, .uart_tx, .uart_rx(1'b1),
    .apb_psel(psel), .apb_penable(penable), .apb_pwrite(pwrite), .apb_paddr(paddr),
    .apb_pwdata(pwdata), .apb_prdata(prdata), .apb_pready(pready), .apb_pslverr(pslverr)
  );

  flash_apb_model u_flash (.clk, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [31:0] FB = 32'h6000_0000;
  localparam int TABLE_IDX = 512;      // flash words: 4 configurations, expected sum, constant
  localparam logic [31:0] K = 32'h1234_5678;
  // bits ctrl, alu, dmem, rf, pc
  localparam logic [4:0] CFG [4] = '{5'b11111, 5'b00100, 5'b00000, 5'b11011};
  int n = 0;
  task automatic p(logic [31:0] w); u_flash.mem[n] = w; n++; endtask
  task automatic li(int r, logic [31:0] v); p(LI_HI(r, v)); p(LI_LO(r, v)); endtask

  function automatic logic [31:0] dm_rd(int byte_addr);
    return secded_extract(dut.u_dmem.mem[byte_addr >> 2]);
  endfunction
  task automatic dm_wr(int byte_addr, logic [31:0] v);
    dut.u_dmem.mem[byte_addr >> 2] = secded_encode(v);
  endtask

  // UART monitor, 434 cycles per bit
  string uart_str = "";
  initial begin
    forever begin
      logic [7:0] ch;
      @(negedge uart_tx);
      repeat (434 / 2) @(posedge clk);
      for (int b = 0; b < 8; b++) begin
        repeat (434) @(posedge clk);
        ch[b] = uart_tx;
      end
      repeat (434) @(posedge clk);
      uart_str = {uart_str, string'(ch)};
    end
  end

  int n_wdt_rst = 0;
  logic wdt_q = 1'b0;
  always @(posedge clk) begin
    wdt_q <= dut.wdt_rst;
    if (dut.wdt_rst && !wdt_q) n_wdt_rst++;
  end

  initial begin
    logic [31:0] sum;
    string exp;
    for (int i = 0; i < 1024; i++) u_flash.mem[i] = NOP();
    for (int i = 0; i < 8192; i++) dut.u_dmem.mem[i] = secded_encode(32'h0);
    sum = 0;
    for (int i = 0; i < 64; i++) sum += 32'(3 * i + 1);
    for (int i = 0; i < 4; i++) u_flash.mem[TABLE_IDX + i] = 32'(CFG[i]);
    u_flash.mem[TABLE_IDX + 4] = sum;
    u_flash.mem[TABLE_IDX + 5] = K;

    p(LUI(31, 'h40000));                          // x31 = UART
    p(ADDI(30, 31, 'h100));                       // x30 = watchdog
    p(CSRRS(5, 'hCCA, 0));                        // reset cause
    p(ADDI(6, 0, 0));                             // run 0 after power-on
    p(BEQ(5, 0, 12));
    p(LW(6, 0, 'h400)); p(ADDI(6, 6, 1));         // else previous run + 1
    p(SW(6, 0, 'h400));
    p(ADDI(7, 0, 4)); p(BNE(6, 7, 16));
    p(ADDI(10, 0, int'("E"))); p(SW(10, 31, 0)); p(JAL(0, 0));
    li(8, FB + TABLE_IDX * 4);                    // configuration of this run
    p(SLLI(7, 6, 2)); p(ADD(7, 8, 7)); p(LW(7, 7, 0)); p(CSRRW(0, 'h800, 7));
    p(ADDI(10, 6, int'("0"))); p(SW(10, 31, 0));  // print the run number
    p(ADDI(8, 0, 0)); p(ADDI(11, 0, 1)); p(ADDI(12, 0, 256));
    p(SW(11, 8, 0)); p(ADDI(11, 11, 3)); p(ADDI(8, 8, 4)); p(BNE(8, 12, -12));
    li(20, K);
    p(ADDI(24, 6, 1)); p(SW(24, 0, 'h500));       // ready; wait for the go word
    p(LW(25, 0, 'h504)); p(BNE(25, 24, -4));
    p(ADDI(8, 0, 0)); p(ADDI(13, 0, 0));
    p(LW(11, 8, 0)); p(ADD(13, 13, 11)); p(ADDI(8, 8, 4)); p(BNE(8, 12, -12));
    li(8, FB + (TABLE_IDX + 4) * 4);
    p(LW(14, 8, 0));
    p(ADDI(10, 0, int'("M"))); p(BEQ(13, 14, 8)); p(ADDI(10, 0, int'("m"))); p(SW(10, 31, 0));
    p(LW(14, 8, 4));
    p(ADDI(10, 0, int'("R"))); p(BEQ(20, 14, 8)); p(ADDI(10, 0, int'("r"))); p(SW(10, 31, 0));
    p(CSRRS(10, 'hCC2, 0)); p(ANDI(10, 10, 7)); p(ADDI(10, 10, int'("0"))); p(SW(10, 31, 0));
    p(CSRRS(10, 'hCC4, 0)); p(ANDI(10, 10, 7)); p(ADDI(10, 10, int'("0"))); p(SW(10, 31, 0));
    p(LW(10, 31, 4)); p(ANDI(10, 10, 1)); p(BNE(10, 0, -8));   // let the UART drain
    p(ADDI(10, 0, 1)); p(SW(10, 30, 0)); p(JAL(0, 0));          // force the watchdog reset

    repeat (3) @(posedge clk);
    por_rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      while (dm_rd('h500) != 32'(run + 1)) @(posedge clk);
      repeat (3) @(posedge clk);
      check(dut.u_core.u_csr.cfg_q == CFG[run], $sformatf("run %0d: configuration %b", run, dut.u_core.u_csr.cfg_q));
      dut.u_dmem.mem[5][3] = ~dut.u_dmem.mem[5][3];                    // vector word 5, data bit 0
      dut.u_core.u_rf.regs[20][9] = ~dut.u_core.u_rf.regs[20][9];      // x20, data bit 4
      dm_wr('h504, 32'(run + 1));
    end
    while (uart_str.len() < 21) @(posedge clk);

    exp = "0MR111Mr222mr333mR44E";
    check(uart_str == exp, $sformatf("UART output \"%s\", expected \"%s\"", uart_str, exp));
    check(n_wdt_rst == 4, $sformatf("watchdog resets: %0d, expected 4", n_wdt_rst));
    check(dut.u_core.u_csr.err_cnt[ERR_DMEM_SINGLE] == 4, "data-memory single errors counted over all runs");
    check(dut.u_core.u_csr.err_cnt[ERR_RS1_SINGLE] == 4, "register-file single errors counted over all runs");
    check(dut.u_core.u_csr.err_cnt[ERR_DMEM_DOUBLE] == 0 && dut.u_core.u_csr.err_cnt[ERR_PC_SINGLE] == 0,
          "no other events counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, UART so far \"%s\"", uart_str);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

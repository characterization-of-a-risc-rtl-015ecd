// tb_riscv_soc: end-to-end test of the SoC at its default parameters.
//
// The program is assembled here and placed in the flash model; the core fetches every
// instruction from it over AXI4-lite and the APB3 bridge. Like the application in the
// document, the program first copies its data section from flash into the data memory and
// checks it with a software CRC-32 against a value stored in flash, prints through the UART,
// runs a vector sum under full hardening while the testbench upsets data-memory words (one
// single, one double error), a register, a control-unit copy and an ALU copy, then repeats a
// read with the data-memory correction switched off. It touches an unmapped address (DECERR)
// and writes the read-only flash (SLVERR). It then stops kicking the watchdog, which resets the
// SoC; after that reset it reads the reset cause and the error counters (which must have
// survived) and forces a second watchdog reset by writing a count of 1, as the document's
// software does at the end of each run. The UART line is decoded and compared with "CHTWF";
// results the program stores in data memory are compared with values computed here. Every
// mechanism is counted and each must occur at least once.
`timescale 1ns/1ps
module tb_riscv_soc;
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

  // ---------------------------------------------------------------- program builder
  localparam logic [31:0] FB = 32'h6000_0000;
  localparam int DATA_IDX = 768;       // data section in flash: 16 words, then its CRC
  localparam int AFTER_WDT = 600, THIRD = 700;
  int n = 0;
  task automatic p(logic [31:0] w); u_flash.mem[n] = w; n++; endtask
  task automatic li(int r, logic [31:0] v); p(LI_HI(r, v)); p(LI_LO(r, v)); endtask
  task automatic putc(byte c); p(ADDI(10, 0, int'(c))); p(SW(10, 31, 0)); endtask
  task automatic sync_point(int flag_addr);
    p(ADDI(24, 0, 1)); p(SW(24, 0, flag_addr)); p(LW(24, 0, flag_addr + 4)); p(BEQ(24, 0, -4));
  endtask

  logic [31:0] data [16];
  logic [31:0] crc_exp;

  function automatic logic [31:0] crc32(input logic [31:0] w [16]);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < 64; i++) begin
      c ^= 32'(w[i / 4][8 * (i % 4) +: 8]);
      for (int b = 0; b < 8; b++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  // data memory access from the testbench (words are stored encoded)
  function automatic logic [31:0] dm_rd(int byte_addr);
    return secded_extract(dut.u_dmem.mem[byte_addr >> 2]);
  endfunction
  task automatic dm_wr(int byte_addr, logic [31:0] v);
    dut.u_dmem.mem[byte_addr >> 2] = secded_encode(v);
  endtask

  // ---------------------------------------------------------------- UART monitor (434 cycles/bit)
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

  // ---------------------------------------------------------------- mechanism counters
  int n_fetch_apb = 0, n_dmem_rd = 0, n_dmem_wr = 0, n_dmem_rmw = 0, n_decerr = 0, n_slverr = 0;
  int n_wdt_rst = 0, n_dmem_s = 0, n_dmem_d = 0, n_ctrl_tmr = 0, n_alu_tmr = 0, n_rf_s = 0;
  logic wdt_q = 1'b0;
  always @(posedge clk) begin
    if (dut.i_gnt) n_fetch_apb++;
    if (dut.m_gnt && !dut.x_we) n_dmem_rd++;
    if (dut.m_gnt && dut.x_we) n_dmem_wr++;
    if (dut.u_dmem.wr_merge) n_dmem_rmw++;
    if (dut.m_axi_rsp.rvalid && dut.m_axi_req.rready && dut.m_axi_rsp.rresp == RESP_DECERR) n_decerr++;
    if (dut.m_axi_rsp.bvalid && dut.m_axi_req.bready && dut.m_axi_rsp.bresp == RESP_SLVERR) n_slverr++;
    wdt_q <= dut.wdt_rst;
    if (dut.wdt_rst && !wdt_q) n_wdt_rst++;
    if (dut.c_gnt && dut.c_err_s) n_dmem_s++;
    if (dut.c_gnt && dut.c_err_d) n_dmem_d++;
    if (dut.u_core.err_inc[ERR_CTRL_TMR]) n_ctrl_tmr++;
    if (dut.u_core.err_inc[ERR_ALU_TMR]) n_alu_tmr++;
    if (dut.u_core.err_inc[ERR_RS1_SINGLE]) n_rf_s++;
  end

  initial begin
    for (int i = 0; i < 1024; i++) u_flash.mem[i] = NOP();
    for (int i = 0; i < 8192; i++) dut.u_dmem.mem[i] = secded_encode(32'h0);
    for (int i = 0; i < 16; i++) data[i] = $urandom;
    crc_exp = crc32(data);
    for (int i = 0; i < 16; i++) u_flash.mem[DATA_IDX + i] = data[i];
    u_flash.mem[DATA_IDX + 16] = crc_exp;

    // ---- boot
    p(LUI(9, 1));                 // x9  = 0x1000: results area
    p(LUI(31, 'h40000));          // x31 = UART
    p(CSRRS(5, 'hCCA, 0));        // reset cause
    p(LW(6, 0, 'h400));           // boot counter
    p(BNE(5, 0, (AFTER_WDT - n) * 4));
    p(ADDI(6, 0, 1)); p(SW(6, 0, 'h400));
    // ---- copy the data section from flash and check its CRC-32
    li(8, FB + DATA_IDX * 4); p(ADDI(7, 0, 0)); p(ADDI(30, 8, 64));
    p(LW(10, 8, 0)); p(SW(10, 7, 0)); p(ADDI(8, 8, 4)); p(ADDI(7, 7, 4)); p(BNE(8, 30, -16));
    li(6, 32'hEDB8_8320); p(ADDI(5, 0, -1)); p(ADDI(8, 0, 0)); p(ADDI(30, 0, 64));
    begin
      int byte_loop;
      byte_loop = n;
      p(LBU(7, 8, 0)); p(XOR(5, 5, 7)); p(ADDI(28, 0, 8));
      p(ANDI(29, 5, 1)); p(SUB(29, 0, 29)); p(AND(29, 29, 6)); p(SRLI(5, 5, 1)); p(XOR(5, 5, 29));
      p(ADDI(28, 28, -1)); p(BNE(28, 0, -24));
      p(ADDI(8, 8, 1)); p(BNE(8, 30, (byte_loop - n) * 4));
    end
    p(XORI(5, 5, -1));
    li(7, FB + (DATA_IDX + 16) * 4); p(LW(7, 7, 0));
    p(ADDI(10, 0, int'("C"))); p(BEQ(5, 7, 8)); p(ADDI(10, 0, int'("E"))); p(SW(10, 31, 0));
    p(SW(5, 9, 0));                                           // r0: computed CRC
    // ---- hardened vector sum C = A + B (A at 0x00, B at 0x20, C at 0x40)
    p(CSRRWI(0, 'h800, 31));
    putc("H");
    sync_point('h500);
    p(ADDI(8, 0, 0)); p(ADDI(30, 0, 32));
    p(LW(11, 8, 0)); p(LW(12, 8, 32)); p(ADD(13, 11, 12)); p(SW(13, 8, 64)); p(ADDI(8, 8, 4));
    p(BNE(8, 30, -20));
    p(ADDI(10, 0, 'h5A)); p(SB(10, 0, 65));                   // byte store: read-modify-write
    p(CSRRS(10, 'hCC2, 0)); p(SW(10, 9, 4));                  // r1: dmem single
    p(CSRRS(10, 'hCC3, 0)); p(SW(10, 9, 8));                  // r2: dmem double
    // ---- data-memory correction off
    p(CSRRWI(0, 'h800, 'h1B));
    sync_point('h508);
    p(LW(10, 0, 12)); p(SW(10, 9, 12));                       // r3: uncorrected A[3]
    p(CSRRWI(0, 'h800, 31));
    p(LW(10, 0, 12)); p(SW(10, 9, 16));                       // r4: corrected A[3]
    p(CSRRS(10, 'hCC2, 0)); p(SW(10, 9, 20));                 // r5
    // ---- bus errors: unmapped load, write to flash
    p(LUI(8, 'h50000)); p(LW(10, 8, 0)); p(SW(10, 9, 24));    // r6: DECERR reads 0
    p(LUI(8, 'h60000)); p(SW(0, 8, 0));
    p(CSRRS(10, 'hCC4, 0)); p(SW(10, 9, 28));                 // r7: rs1 single
    p(CSRRS(10, 'hCC8, 0)); p(SW(10, 9, 32));                 // r8: control TMR
    p(CSRRS(10, 'hCC9, 0)); p(SW(10, 9, 36));                 // r9: ALU TMR
    // ---- stop kicking the watchdog: it must reset the SoC
    putc("T");
    p(LUI(10, 'h40000)); p(ADDI(10, 10, 'h100)); p(LUI(11, 5)); p(SW(11, 10, 0));
    p(JAL(0, 0));

    // ---- second boot, after the watchdog reset
    n = AFTER_WDT;
    p(ADDI(7, 0, 1)); p(BNE(6, 7, (THIRD - n) * 4));
    putc("W");
    p(CSRRS(10, 'hCC2, 0)); p(SW(10, 9, 40));                 // r10: counters survive
    p(CSRRS(10, 'hCCA, 0)); p(SW(10, 9, 44));                 // r11: reset cause
    p(ADDI(6, 0, 2)); p(SW(6, 0, 'h400));
    p(LW(12, 31, 4)); p(ANDI(12, 12, 1)); p(BNE(12, 0, -8));  // let the UART drain
    p(LUI(10, 'h40000)); p(ADDI(10, 10, 'h100)); p(ADDI(11, 0, 1)); p(SW(11, 10, 0));
    p(JAL(0, 0));
    // ---- third boot, after the forced reset
    n = THIRD;
    putc("F");
    p(ADDI(10, 0, 1)); p(SW(10, 0, 'h3FC));
    p(JAL(0, 0));

    repeat (5) @(posedge clk);
    por_rst_n = 1'b1;

    // injection 1: hardened
    while (dm_rd('h500) != 1) @(posedge clk);
    repeat (3) @(posedge clk);
    dut.u_dmem.mem[2][9]  = ~dut.u_dmem.mem[2][9];            // A[2]: single
    dut.u_dmem.mem[15][3] = ~dut.u_dmem.mem[15][3];           // B[7]: double
    dut.u_dmem.mem[15][5] = ~dut.u_dmem.mem[15][5];
    dut.u_core.u_rf.regs[9][20] = ~dut.u_core.u_rf.regs[9][20];     // x9: results base
    @(negedge clk);
    dut.u_core.g_ctrl[0].u_ctrl.state_q =
      (dut.u_core.g_ctrl[0].u_ctrl.state_q == S_FETCH) ? S_EXEC : S_FETCH;
    force dut.u_core.g_alu[1].y = 32'h0;
    repeat (40) @(posedge clk);
    release dut.u_core.g_alu[1].y;
    dm_wr('h504, 1);

    // injection 2: data-memory correction off
    while (dm_rd('h508) != 1) @(posedge clk);
    repeat (3) @(posedge clk);
    dut.u_dmem.mem[3][3] = ~dut.u_dmem.mem[3][3];             // A[3] data bit 0
    dm_wr('h50C, 1);

    while (dm_rd('h3FC) != 1) @(posedge clk);
    repeat (5000) @(posedge clk);

    check(dm_rd('h1000) == crc_exp, "CRC-32 computed by the program");
    for (int i = 0; i < 7; i++) begin
      logic [31:0] e;
      e = data[i] + data[8 + i];
      if (i == 0) e[15:8] = 8'h5A;
      check(dm_rd('h40 + 4 * i) == e, $sformatf("C[%0d] = %h, expected %h", i, dm_rd('h40 + 4 * i), e));
    end
    check(dm_rd('h1004) >= 1, "dmem single-error counter");
    check(dm_rd('h1008) >= 1, "dmem double-error counter");
    check(dm_rd('h100C) == (data[3] ^ 32'h1), "uncorrected read with correction off");
    check(dm_rd('h1010) == data[3], "corrected read with correction on");
    check(dm_rd('h1014) >= 3, "dmem single-error count after the second injection");
    check(dm_rd('h1018) == 0, "DECERR read returns 0");
    check(dm_rd('h101C) >= 1, "register-file single-error counter");
    check(dm_rd('h1020) >= 1, "control TMR counter");
    check(dm_rd('h1024) >= 1, "ALU TMR counter");
    check(dm_rd('h1028) >= dm_rd('h1014), "error counters survive the watchdog reset");
    check(dm_rd('h102C) == 1, "reset cause after watchdog reset");
    check(uart_str == "CHTWF", $sformatf("UART output \"%s\", expected \"CHTWF\"", uart_str));
    check(u_flash.writes_refused == 1, "flash write refused");

    check(n_fetch_apb > 0, "instruction fetches over AXI/APB");
    check(n_dmem_rd > 0,   "data-memory reads");
    check(n_dmem_wr > 0,   "data-memory writes");
    check(n_dmem_rmw > 0,  "data-memory read-modify-write");
    check(n_decerr > 0,    "AXI DECERR");
    check(n_slverr > 0,    "AXI SLVERR from the APB bridge");
    check(n_wdt_rst == 2,  $sformatf("watchdog resets: %0d, expected 2", n_wdt_rst));
    check(n_dmem_s > 0,    "dmem single errors");
    check(n_dmem_d > 0,    "dmem double errors");
    check(n_ctrl_tmr > 0,  "control TMR events");
    check(n_alu_tmr > 0,   "ALU TMR events");
    check(n_rf_s > 0,      "register-file single errors");
    $display("mechanisms: fetch=%0d dmem_rd=%0d dmem_wr=%0d rmw=%0d decerr=%0d slverr=%0d wdt=%0d dmem_s=%0d dmem_d=%0d ctrl_tmr=%0d alu_tmr=%0d rf_s=%0d",
             n_fetch_apb, n_dmem_rd, n_dmem_wr, n_dmem_rmw, n_decerr, n_slverr, n_wdt_rst,
             n_dmem_s, n_dmem_d, n_ctrl_tmr, n_alu_tmr, n_rf_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, UART so far \"%s\"", uart_str);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

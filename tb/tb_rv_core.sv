// tb_rv_core: self-checking test of the hardened multi-cycle RV32I core.
//
// The program is assembled in the testbench (rv_asm_pkg) and served from a memory model with
// random 0-2 cycle grant delays on both the instruction and the data port. Each tested
// instruction leaves its result in x10, which the program stores to a results area; the
// expected values are computed here from the RV32I semantics. At three hand-shake points the
// program spins on a flag word while the testbench injects upsets: a single flip in a
// register (corrected, counted per read port), a flip in the stored PC (corrected and counted
// once), an upset of one control-unit copy's state (voted out, counted), a double flip in a
// register (counted as uncorrectable), a forced wrong value on one ALU copy (voted out,
// counted), a data-memory error flag, and, with hardening switched off in the CSR, a single
// flip that must reach the result uncorrected. Error counters and the reset-cause CSR are read
// back by the program. A final check tests the cycle count of a plain ALU instruction.
`timescale 1ns/1ps
module tb_rv_core;
  import soc_pkg::*;
  import rv_asm_pkg::*;

  localparam logic [31:0] RV = 32'h6000_0000;
  localparam int RES = 32'h1000;   // results area (byte address)

  logic clk = 1'b0, rst_n = 1'b0, por_rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        imem_req, imem_gnt, dmem_req, dmem_we, dmem_gnt, dmem_corr;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_be;
  logic        inj_dm_err = 1'b0;

  rv_core dut (
    .clk, .rst_n, .por_rst_n,
    .imem_req, .imem_addr, .imem_gnt, .imem_rdata,
    .dmem_req, .dmem_we, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_gnt, .dmem_rdata,
    .dmem_err_single(inj_dm_err && dmem_gnt), .dmem_err_double(1'b0), .dmem_correct_en(dmem_corr),
    .wdt_reset_cause(1'b1)
  );

  // ---------------------------------------------------------------- memories
  logic [31:0] prog [1024];
  logic [31:0] dm   [2048];
  int icnt, dcnt;

  always_ff @(posedge clk) begin
    if (!imem_req || imem_gnt) icnt <= $urandom_range(0, 2); else if (icnt != 0) icnt <= icnt - 1;
    if (!dmem_req || dmem_gnt) dcnt <= $urandom_range(0, 2); else if (dcnt != 0) dcnt <= dcnt - 1;
    if (dmem_gnt && dmem_we)
      for (int b = 0; b < 4; b++)
        if (dmem_be[b]) dm[dmem_addr[12:2]][8*b +: 8] <= dmem_wdata[8*b +: 8];
  end
  assign imem_gnt   = imem_req && icnt == 0;
  assign imem_rdata = prog[10'((imem_addr - RV) >> 2)];
  assign dmem_gnt   = dmem_req && dcnt == 0;
  assign dmem_rdata = dm[dmem_addr[12:2]];

  // ---------------------------------------------------------------- program builder
  int n = 0;           // next instruction index
  int k = 0;           // next result slot
  logic [31:0] exp_v [256];
  int          exp_kind [256];   // 0 exact, 1 at least 1, 2 do not check

  function automatic logic [31:0] pc_of(int idx); return RV + 32'(idx * 4); endfunction
  task automatic p(logic [31:0] w); prog[n] = w; n++; endtask
  task automatic store_x(int r, logic [31:0] e, int kind);
    p(SW(r, 9, k * 4)); exp_v[k] = e; exp_kind[k] = kind; k++;
  endtask
  task automatic res(logic [31:0] w, logic [31:0] e); p(w); store_x(10, e, 0); endtask
  task automatic brt(logic [31:0] w, bit taken);
    p(ADDI(10, 0, 0)); p(w); p(ADDI(10, 0, 1)); store_x(10, taken ? 0 : 1, 0);
  endtask
  task automatic li(int r, logic [31:0] v); p(LI_HI(r, v)); p(LI_LO(r, v)); endtask
  task automatic sync_point(int flag_addr);   // write 1 to flag_addr, spin until flag_addr+4 != 0
    p(ADDI(24, 0, 1)); p(SW(24, 0, flag_addr)); p(LW(24, 0, flag_addr + 4)); p(BEQ(24, 0, -4));
  endtask

  localparam int HANDLER = 900;

  logic [31:0] x1v, x2v;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) prog[i] = NOP();
    for (int i = 0; i < 2048; i++) dm[i] = '0;
    x1v = 32'h1234_5678;
    x2v = 32'hFFFF_FFFB;

    p(LUI(9, 1));                                 // x9 = 0x1000, results base
    li(1, x1v); p(ADDI(2, 0, -5)); p(ADDI(5, 0, 7));
    res(ADD(10, 1, 2),  x1v + x2v);
    res(SUB(10, 1, 2),  x1v - x2v);
    res(AND(10, 1, 2),  x1v & x2v);
    res(OR(10, 1, 2),   x1v | x2v);
    res(XOR(10, 1, 2),  x1v ^ x2v);
    res(SLL(10, 1, 5),  x1v << 7);
    res(SRL(10, 2, 5),  x2v >> 7);
    res(SRA(10, 2, 5),  32'($signed(x2v) >>> 7));
    res(SLT(10, 2, 1),  1);
    res(SLTU(10, 2, 1), 0);
    res(ADDI(10, 1, -1000), x1v - 1000);
    res(SLTI(10, 2, -4),  1);
    res(SLTIU(10, 2, -4), 1);
    res(XORI(10, 1, 'h7FF), x1v ^ 32'h7FF);
    res(ORI(10, 1, -256),   x1v | 32'hFFFF_FF00);
    res(ANDI(10, 1, 'h0F0), x1v & 32'hF0);
    res(SLLI(10, 1, 4),  x1v << 4);
    res(SRLI(10, 2, 28), 32'hF);
    res(SRAI(10, 2, 1),  32'hFFFF_FFFD);
    res(AUIPC(10, 1),    pc_of(n) + 32'h1000);
    res(LUI(10, 'hABCDE), 32'hABCD_E000);
    // byte and half-word access
    p(SW(1, 0, 400));
    res(LB(10, 0, 401),  32'h56);
    res(LBU(10, 0, 403), 32'h12);
    res(LH(10, 0, 402),  32'h1234);
    p(SB(2, 0, 401));
    res(LW(10, 0, 400),  32'h1234_FB78);
    res(LB(10, 0, 401),  32'hFFFF_FFFB);
    res(LHU(10, 0, 400), 32'h0000_FB78);
    p(SH(2, 0, 402));
    res(LW(10, 0, 400),  32'hFFFB_FB78);
    res(LH(10, 0, 402),  32'hFFFF_FFFB);
    // loop: sum 10..1
    p(ADDI(11, 0, 0)); p(ADDI(12, 0, 10));
    p(ADD(11, 11, 12)); p(ADDI(12, 12, -1)); p(BNE(12, 0, -8));
    res(ADDI(10, 11, 0), 55);
    // branches
    brt(BEQ(1, 1, 8), 1);  brt(BEQ(1, 2, 8), 0);  brt(BNE(1, 2, 8), 1);  brt(BNE(1, 1, 8), 0);
    brt(BLT(2, 1, 8), 1);  brt(BLT(1, 2, 8), 0);  brt(BGE(1, 2, 8), 1);  brt(BGE(2, 1, 8), 0);
    brt(BLTU(1, 2, 8), 1); brt(BLTU(2, 1, 8), 0); brt(BGEU(2, 1, 8), 1); brt(BGEU(1, 2, 8), 0);
    // jal / jalr
    p(ADDI(10, 0, 0)); p(JAL(13, 8)); p(ADDI(10, 0, 1));
    store_x(10, 0, 0); store_x(13, pc_of(n - 2), 0);
    p(ADDI(10, 0, 0)); p(AUIPC(14, 0)); p(JALR(15, 14, 12)); p(ADDI(10, 0, 1));
    store_x(10, 0, 0); store_x(15, pc_of(n - 2), 0);
    // CSRs
    p(CSRRS(10, 'hC00, 0)); store_x(10, 1, 1);                  // cycle counter runs
    res(CSRRS(10, 'h800, 0), 32'h1F);                           // hardening: all on at reset
    p(CSRRWI(0, 'h800, 5));
    res(CSRRS(10, 'h800, 0), 32'h5);
    p(ADDI(16, 0, 1));
    res(CSRRC(10, 'h800, 16), 32'h5);
    res(CSRRS(10, 'h800, 0), 32'h4);
    p(CSRRWI(0, 'h800, 31));
    p(CSRRW(0, 'h040, 1));
    res(CSRRS(10, 'h040, 0), x1v);
    res(CSRRS(10, 'hF13, 0), MIMPID_VALUE);
    res(CSRRS(10, 'hCCA, 0), 1);                                // reset cause: watchdog
    // traps: ecall, ebreak, illegal instruction, handled at HANDLER, fence is a no-op
    li(17, pc_of(HANDLER)); p(CSRRW(0, 'h005, 17));
    p(ADDI(20, 0, 0)); p(ADDI(21, 0, 0));
    p(ECALL());  p(ADDI(20, 20, 1)); store_x(22, 8, 0);
    p(EBREAK()); p(ADDI(20, 20, 1)); store_x(22, 3, 0);
    p(32'hFFFF_FFFF); p(ADDI(20, 20, 1)); store_x(22, 2, 0);
    p(FENCE());
    store_x(20, 3, 0); store_x(21, 3, 0);
    // fault injection 1: single flips in x1, in the PC and in a control copy
    sync_point(32'h200);
    res(ADD(10, 1, 0), x1v);
    res(CSRRS(10, 'hCC4, 0), 1);            // rs1 port single error
    res(ADD(10, 0, 1), x1v);
    res(CSRRS(10, 'hCC6, 0), 1);            // rs2 port single error
    res(CSRRS(10, 'hCC0, 0), 1);            // PC single error, scrubbed after one count
    res(CSRRS(10, 'hCC8, 0), 1);            // control TMR, repaired in one cycle
    // fault injection 2: double flip in x3, ALU copy forced, data memory error flag
    p(ADDI(3, 0, 100));
    sync_point(32'h208);
    p(ADD(10, 3, 0));
    res(CSRRS(10, 'hCC5, 0), 1);            // rs1 port double error
    p(CSRRS(10, 'hCC9, 0)); store_x(10, 1, 1);   // ALU TMR events
    p(CSRRS(10, 'hCC2, 0)); store_x(10, 1, 1);   // data memory single errors
    res(CSRRS(10, 'hCC3, 0), 0);
    // fault injection 3: hardening off, the flip reaches the result
    p(ADDI(4, 0, 16)); p(CSRRWI(0, 'h800, 0));
    sync_point(32'h210);
    res(ADD(10, 4, 0), 32'd16 ^ 32'd8);
    p(CSRRWI(0, 'h800, 31));
    res(ADD(10, 4, 0), 32'd16);
    // done
    p(ADDI(24, 0, 1)); p(SW(24, 0, 32'h3FC)); p(JAL(0, 0));

    // trap handler
    n = HANDLER;
    p(CSRRS(22, 'h042, 0)); p(CSRRS(23, 'h041, 0)); p(ADDI(23, 23, 4)); p(CSRRW(0, 'h041, 23));
    p(ADDI(21, 21, 1)); p(URET());

    repeat (3) @(posedge clk);
    por_rst_n = 1'b1; rst_n = 1'b1;

    // injection 1
    wait (dm[32'h200 >> 2] == 1);
    repeat (5) @(posedge clk);
    dut.u_rf.regs[1][9] = ~dut.u_rf.regs[1][9];
    @(posedge clk);
    wait (dut.ctrl.exec);   // flip the PC after an execute cycle, before its next update
    @(negedge clk);
    dut.u_pc.code_q[12] = ~dut.u_pc.code_q[12];
    repeat (7) @(posedge clk);
    @(negedge clk);
    dut.g_ctrl[1].u_ctrl.state_q = (dut.g_ctrl[1].u_ctrl.state_q == S_FETCH) ? S_EXEC : S_FETCH;
    repeat (5) @(posedge clk);
    dm[32'h204 >> 2] = 1;

    // injection 2
    wait (dm[32'h208 >> 2] == 1);
    repeat (5) @(posedge clk);
    dut.u_rf.regs[3][9]  = ~dut.u_rf.regs[3][9];
    dut.u_rf.regs[3][10] = ~dut.u_rf.regs[3][10];
    force dut.g_alu[2].y = 32'hDEAD_BEEF;
    inj_dm_err = 1'b1;
    repeat (20) @(posedge clk);
    release dut.g_alu[2].y;
    inj_dm_err = 1'b0;
    @(posedge clk);
    dm[32'h20C >> 2] = 1;

    // injection 3
    wait (dm[32'h210 >> 2] == 1);
    repeat (3) @(posedge clk);
    dut.u_rf.regs[4][7] = ~dut.u_rf.regs[4][7];     // code bit 7 holds data bit 3
    @(posedge clk);
    dm[32'h214 >> 2] = 1;

    wait (dm[32'h3FC >> 2] == 1);
    repeat (5) @(posedge clk);
    for (int i = 0; i < k; i++) begin
      logic [31:0] got;
      got = dm[(RES >> 2) + i];
      if (exp_kind[i] == 0)      check(got == exp_v[i], $sformatf("result %0d: got %h expected %h", i, got, exp_v[i]));
      else if (exp_kind[i] == 1) check(got >= 1, $sformatf("result %0d: got %h expected >= 1", i, got));
    end
    check(dmem_corr == 1'b1, "dmem correction enable follows the CSR");

    // timing: an ALU instruction with zero-wait fetch takes fetch (1 cycle) + execute (1 cycle)
    begin
      int c0, c1;
      force icnt = 0;
      @(posedge clk);
      wait (dut.ctrl.exec); @(posedge clk); c0 = 0;
      while (!dut.ctrl.exec) begin @(posedge clk); c0++; end
      @(posedge clk); c1 = 0;
      while (!dut.ctrl.exec) begin @(posedge clk); c1++; end
      release icnt;
      check(c0 == 1 && c1 == 1, $sformatf("jal loop: %0d/%0d cycles between executes, expected 1", c0, c1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

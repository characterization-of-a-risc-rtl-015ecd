// tb_rv_control: self-checking test of one control-unit copy (decoder and state machine).
//
// Walks instructions through fetch / execute / memory with and without grants and checks the
// state sequence and the decoded control fields against the RV32I encoding: ALU, immediate,
// load/store with the grant wait, branch, jal, lui, CSR, ecall/ebreak/illegal traps, uret and
// fence. Finally it checks that with use_voted a copy loads the voted next state instead of
// its own, which is how a copy with an upset state rejoins the other two.
`timescale 1ns/1ps
module tb_rv_control;
  import soc_pkg::*;
  import rv_asm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ig = 1'b0, dg = 1'b0, use_voted = 1'b0;
  logic [31:0] instr = 32'h13;
  core_state_e voted = S_FETCH, nxt;
  ctrl_t c;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rv_control dut (.clk, .rst_n, .instr, .imem_gnt(ig), .dmem_gnt(dg), .use_voted, .voted_next(voted),
                  .ctrl(c), .next_state(nxt));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // fetch instruction w (with one wait cycle), leave the copy in S_EXEC
  task automatic fetch(logic [31:0] w);
    @(negedge clk);
    check(dut.state_q == S_FETCH && c.imem_req && !c.ir_we, "fetch waits for the grant");
    ig = 1'b1; #1;
    check(c.ir_we && nxt == S_EXEC, "grant latches the instruction");
    @(negedge clk); ig = 1'b0; instr = w; #1;
    check(dut.state_q == S_EXEC && c.exec, "execute state");
  endtask

  initial begin
    #12 rst_n = 1'b1;
    fetch(ADD(3, 1, 2));
    check(c.rf_we && c.alu_op == ALU_ADD && c.use_rs1 && c.use_rs2 && !c.alu_b_imm && c.pc_we && nxt == S_FETCH, "add");
    fetch(SUB(3, 1, 2));
    check(c.alu_op == ALU_SUB && c.rf_we, "sub");
    fetch(SRAI(3, 1, 5));
    check(c.alu_op == ALU_SRA && c.alu_b_imm && c.imm[4:0] == 5, "srai");
    fetch(ADDI(3, 1, -7));
    check(c.imm == 32'hFFFF_FFF9 && c.alu_b_imm && !c.use_rs2, "addi immediate");
    fetch(LUI(3, 'hABCDE));
    check(c.alu_a == A_ZERO && c.imm == 32'hABCD_E000 && c.rf_we, "lui");
    fetch(LW(3, 1, 16));
    check(nxt == S_MEM && !c.pc_we && !c.rf_we, "load goes to memory state");
    @(negedge clk);
    check(dut.state_q == S_MEM && c.mem_req && !c.mem_we && !c.rf_we && nxt == S_MEM, "load waits for grant");
    @(negedge clk);
    check(c.mem_req && nxt == S_MEM, "load still waiting");
    dg = 1'b1; #1;
    check(c.rf_we && c.pc_we && c.wb_sel == WB_LOAD && c.mem_size == 2'd2 && nxt == S_FETCH, "load write-back on grant");
    @(negedge clk); dg = 1'b0;
    fetch(SB(3, 1, -1));
    check(nxt == S_MEM, "store goes to memory state");
    @(negedge clk); dg = 1'b1; #1;
    check(c.mem_we && c.mem_size == 2'd0 && c.imm == 32'hFFFF_FFFF && !c.rf_we && c.pc_we, "store");
    @(negedge clk); dg = 1'b0;
    fetch(BLTU(1, 2, -16));
    check(c.branch && c.cmp_op == CMP_LTU && c.alu_a == A_PC && c.imm == 32'hFFFF_FFF0 && !c.rf_we, "bltu");
    fetch(JAL(1, 2048));
    check(c.jump && c.wb_sel == WB_PC4 && c.imm == 32'd2048 && c.rf_we, "jal");
    fetch(CSRRWI(5, 'h800, 3));
    check(c.csr_op == CSR_RW && c.csr_imm && c.wb_sel == WB_CSR && c.rf_we, "csrrwi");
    fetch(ECALL());
    check(c.trap && c.trap_cause == CAUSE_ECALL && !c.rf_we, "ecall");
    fetch(EBREAK());
    check(c.trap && c.trap_cause == CAUSE_BREAK, "ebreak");
    fetch(32'hFFFF_FFFF);
    check(c.trap && c.trap_cause == CAUSE_ILLEGAL, "illegal");
    fetch(URET());
    check(c.uret && !c.trap, "uret");
    fetch(FENCE());
    check(!c.trap && !c.rf_we && c.pc_we, "fence is a no-op");
    // voted next state overrides the copy's own
    @(negedge clk);
    use_voted = 1'b1; voted = S_MEM;
    @(negedge clk);
    check(dut.state_q == S_MEM, "copy follows the voted next state");
    voted = S_FETCH;
    @(negedge clk);
    check(dut.state_q == S_FETCH, "copy follows the voted next state back");
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

// rv_control: one copy of the control unit, i.e. the instruction decoder plus the state
// machine that makes the core multi-cycle.
//
// States: S_FETCH asks for the instruction at the PC and latches it when imem_gnt arrives;
// S_EXEC decodes it, reads the registers, runs the ALU and finishes every instruction except
// loads and stores; S_MEM holds the data request until dmem_gnt (the grant signal of the
// document) and then writes back the load data. Every instruction therefore takes
// fetch + 1 cycle, plus the data access for loads and stores.
// Decoded: the whole RV32I set, CSR instructions, ecall/ebreak (trap to utvec), uret; fence is
// executed as a no-op and any other encoding traps as an illegal instruction.
// The document triplicates the control unit. Each copy keeps its own state register; with
// use_voted high it loads the voted next state, so a copy whose state was upset rejoins the
// other two on the next clock. With use_voted low each copy follows only its own next state.
module rv_control
  import soc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] instr,
  input  logic        imem_gnt,
  input  logic        dmem_gnt,
  input  logic        use_voted,
  input  core_state_e voted_next,
  output ctrl_t       ctrl,
  output core_state_e next_state
);
  core_state_e state_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state_q <= S_FETCH;
    else        state_q <= use_voted ? voted_next : next_state;

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [6:0] funct7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  always_comb begin
    opcode = instr[6:0];
    funct3 = instr[14:12];
    funct7 = instr[31:25];
    imm_i  = {{20{instr[31]}}, instr[31:20]};
    imm_s  = {{20{instr[31]}}, instr[31:25], instr[11:7]};
    imm_b  = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
    imm_u  = {instr[31:12], 12'b0};
    imm_j  = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

    ctrl = '0;
    ctrl.alu_op = ALU_ADD;
    ctrl.cmp_op = CMP_EQ;
    ctrl.alu_a  = A_RS1;
    ctrl.wb_sel = WB_ALU;
    ctrl.csr_op = CSR_NONE;
    next_state  = state_q;

    unique case (state_q)
      S_FETCH: begin
        ctrl.imem_req = 1'b1;
        ctrl.ir_we    = imem_gnt;
        if (imem_gnt) next_state = S_EXEC;
      end

      S_EXEC: begin
        next_state  = S_FETCH;
        ctrl.exec   = 1'b1;
        ctrl.pc_we  = 1'b1;
        unique case (opcode)
          7'b0110111: begin                               // lui
            ctrl.alu_a = A_ZERO; ctrl.alu_b_imm = 1'b1; ctrl.imm = imm_u; ctrl.rf_we = 1'b1;
          end
          7'b0010111: begin                               // auipc
            ctrl.alu_a = A_PC; ctrl.alu_b_imm = 1'b1; ctrl.imm = imm_u; ctrl.rf_we = 1'b1;
          end
          7'b1101111: begin                               // jal
            ctrl.alu_a = A_PC; ctrl.alu_b_imm = 1'b1; ctrl.imm = imm_j;
            ctrl.rf_we = 1'b1; ctrl.wb_sel = WB_PC4; ctrl.jump = 1'b1;
          end
          7'b1100111: begin                               // jalr
            if (funct3 == 3'b000) begin
              ctrl.use_rs1 = 1'b1; ctrl.alu_b_imm = 1'b1; ctrl.imm = imm_i;
              ctrl.rf_we = 1'b1; ctrl.wb_sel = WB_PC4; ctrl.jump = 1'b1;
            end else begin
              ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_ILLEGAL;
            end
          end
          7'b1100011: begin                               // branches
            if (funct3 == 3'b010 || funct3 == 3'b011) begin
              ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_ILLEGAL;
            end else begin
              ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1;
              ctrl.cmp_op = cmp_op_e'(funct3);
              ctrl.alu_a = A_PC; ctrl.alu_b_imm = 1'b1; ctrl.imm = imm_b; ctrl.branch = 1'b1;
            end
          end
          7'b0000011: begin                               // loads
            if (funct3 == 3'b011 || funct3 == 3'b110 || funct3 == 3'b111) begin
              ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_ILLEGAL;
            end else begin
              ctrl.use_rs1 = 1'b1; ctrl.alu_b_imm = 1'b1; ctrl.imm = imm_i;
              ctrl.pc_we = 1'b0; next_state = S_MEM;
            end
          end
          7'b0100011: begin                               // stores
            if (funct3[2] || funct3[1:0] == 2'b11) begin
              ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_ILLEGAL;
            end else begin
              ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1; ctrl.alu_b_imm = 1'b1; ctrl.imm = imm_s;
              ctrl.pc_we = 1'b0; next_state = S_MEM;
            end
          end
          7'b0010011: begin                               // op-imm
            ctrl.use_rs1 = 1'b1; ctrl.alu_b_imm = 1'b1; ctrl.imm = imm_i; ctrl.rf_we = 1'b1;
            unique case (funct3)
              3'b000: ctrl.alu_op = ALU_ADD;
              3'b010: ctrl.alu_op = ALU_SLT;
              3'b011: ctrl.alu_op = ALU_SLTU;
              3'b100: ctrl.alu_op = ALU_XOR;
              3'b110: ctrl.alu_op = ALU_OR;
              3'b111: ctrl.alu_op = ALU_AND;
              3'b001: ctrl.alu_op = ALU_SLL;
              default: ctrl.alu_op = instr[30] ? ALU_SRA : ALU_SRL;
            endcase
            if ((funct3 == 3'b001 && funct7 != 7'b0) ||
                (funct3 == 3'b101 && funct7 != 7'b0 && funct7 != 7'b0100000)) begin
              ctrl.rf_we = 1'b0; ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_ILLEGAL;
            end
          end
          7'b0110011: begin                               // op
            ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1; ctrl.rf_we = 1'b1;
            unique case (funct3)
              3'b000: ctrl.alu_op = instr[30] ? ALU_SUB : ALU_ADD;
              3'b001: ctrl.alu_op = ALU_SLL;
              3'b010: ctrl.alu_op = ALU_SLT;
              3'b011: ctrl.alu_op = ALU_SLTU;
              3'b100: ctrl.alu_op = ALU_XOR;
              3'b101: ctrl.alu_op = instr[30] ? ALU_SRA : ALU_SRL;
              3'b110: ctrl.alu_op = ALU_OR;
              default: ctrl.alu_op = ALU_AND;
            endcase
            if (!(funct7 == 7'b0 || (funct7 == 7'b0100000 && (funct3 == 3'b000 || funct3 == 3'b101)))) begin
              ctrl.rf_we = 1'b0; ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_ILLEGAL;
            end
          end
          7'b0001111: begin                               // fence, fence.i: no-op
          end
          7'b1110011: begin                               // system
            if (funct3 == 3'b000) begin
              if (instr == 32'h0000_0073) begin
                ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_ECALL;
              end else if (instr == 32'h0010_0073) begin
                ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_BREAK;
              end else if (instr == 32'h0020_0073) begin
                ctrl.uret = 1'b1;
              end else begin
                ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_ILLEGAL;
              end
            end else if (funct3 == 3'b100) begin
              ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_ILLEGAL;
            end else begin
              ctrl.use_rs1 = !funct3[2];
              ctrl.csr_imm = funct3[2];
              ctrl.csr_op  = csr_op_e'(funct3[1:0]);
              ctrl.rf_we   = 1'b1;
              ctrl.wb_sel  = WB_CSR;
            end
          end
          default: begin
            ctrl.trap = 1'b1; ctrl.trap_cause = CAUSE_ILLEGAL;
          end
        endcase
      end

      S_MEM: begin
        ctrl.use_rs1  = 1'b1;
        ctrl.alu_b_imm = 1'b1;
        ctrl.mem_req  = 1'b1;
        ctrl.mem_we   = (opcode == 7'b0100011);
        ctrl.mem_size = funct3[1:0];
        ctrl.mem_unsigned = funct3[2];
        ctrl.imm      = (opcode == 7'b0100011) ? imm_s : imm_i;
        ctrl.wb_sel   = WB_LOAD;
        if (dmem_gnt) begin
          ctrl.rf_we = (opcode == 7'b0000011);
          ctrl.pc_we = 1'b1;
          next_state = S_FETCH;
        end
      end

      default: next_state = S_FETCH;
    endcase
  end
endmodule

// rv_core: multi-cycle RV32I core hardened with SECDED registers and triplicated logic.
//
// The Program Counter (hamming_reg) and the register file (rv_regfile) are stored as 39-bit
// SECDED words; the ALU (rv_alu) and the control unit (rv_control, decoder plus state
// machine) are instantiated three times behind tmr_voter. Each protection can be switched
// between "correct" and "detect only" at run time through the hardening-configuration CSR, and
// every detected event is counted in one of ten error counters (rv_csr): single and double
// errors of the PC decoder, of the data-memory decoder and of each register-file read port, and
// disagreements of the control and ALU voters. The data-memory decoder sits outside the core;
// its flags arrive with the grant and its correction enable leaves on dmem_correct_en.
// When an event is counted: PC errors once per instruction, in the cycle the PC is updated
// (which also scrubs the PC, since the corrected value plus 4 is written back); register-file
// errors in the execute cycle, only for the ports the instruction uses; data-memory errors with
// the grant; voter disagreements in every cycle in which they occur (for the ALU only in the
// cycles its result is used).
//
// Timing: S_FETCH holds imem_req until imem_gnt (the instruction arrives with the grant);
// S_EXEC takes one cycle; loads and stores then hold dmem_req in S_MEM until dmem_gnt, the grant
// that the document adds so that memories and the bus can stall the core. Requests stay high,
// with stable address and data, up to and including the grant cycle.
// Misaligned loads and stores are not trapped: the low address bits select bytes inside the
// addressed word only (this design's choice; the document does not cover it).
// The instruction register is a plain register: the document lists no decoder for it.
module rv_core
  import soc_pkg::*;
#(
  parameter logic [31:0] RESET_VECTOR = RESET_VEC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        por_rst_n,
  // instruction fetch
  output logic        imem_req,
  output logic [31:0] imem_addr,
  input  logic        imem_gnt,
  input  logic [31:0] imem_rdata,
  // data access
  output logic        dmem_req,
  output logic        dmem_we,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic        dmem_gnt,
  input  logic [31:0] dmem_rdata,
  input  logic        dmem_err_single,
  input  logic        dmem_err_double,
  output logic        dmem_correct_en,
  // reset cause from the reset controller
  input  logic        wdt_reset_cause
);
  localparam int unsigned CW = $bits(ctrl_t) + $bits(core_state_e);

  harden_cfg_t cfg;
  ctrl_t       ctrl;
  core_state_e voted_next;
  logic [31:0] ir;
  logic [31:0] pc, pc_next, pc_plus4;
  logic        pc_s, pc_d;
  logic [31:0] rs1, rs2;
  logic        rs1_s, rs1_d, rs2_s, rs2_d;
  logic [31:0] alu_a, alu_b, alu_y;
  logic        alu_cmp;
  logic        ctrl_mismatch, alu_mismatch;
  logic [31:0] csr_rdata, utvec, uepc;
  logic [31:0] load_data, wb_data;
  logic [N_ERR_CNT-1:0] err_inc;

  // ------------------------------------------------------------ triplicated control
  ctrl_t       ctrl_c [3];
  core_state_e next_c [3];
  logic [CW-1:0] ctrl_vec [3];
  logic [CW-1:0] ctrl_voted;

  for (genvar i = 0; i < 3; i++) begin : g_ctrl
    rv_control u_ctrl (
      .clk, .rst_n, .instr(ir), .imem_gnt, .dmem_gnt,
      .use_voted(cfg.ctrl), .voted_next,
      .ctrl(ctrl_c[i]), .next_state(next_c[i])
    );
    assign ctrl_vec[i] = {ctrl_c[i], next_c[i]};
  end

  tmr_voter #(.WIDTH(CW)) u_ctrl_voter (
    .in0(ctrl_vec[0]), .in1(ctrl_vec[1]), .in2(ctrl_vec[2]), .correct_en(cfg.ctrl),
    .out(ctrl_voted), .mismatch(ctrl_mismatch)
  );
  assign ctrl       = ctrl_t'(ctrl_voted[CW-1:$bits(core_state_e)]);
  assign voted_next = core_state_e'(ctrl_voted[$bits(core_state_e)-1:0]);

  // ------------------------------------------------------------ PC and instruction register
  hamming_reg #(.RESET_VALUE(RESET_VECTOR)) u_pc (
    .clk, .rst_n, .we(ctrl.pc_we), .d(pc_next), .correct_en(cfg.pc),
    .q(pc), .err_single(pc_s), .err_double(pc_d)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          ir <= 32'h0000_0013;  // addi x0,x0,0
    else if (ctrl.ir_we) ir <= imem_rdata;

  assign imem_req  = ctrl.imem_req;
  assign imem_addr = pc;

  // ------------------------------------------------------------ register file
  rv_regfile u_rf (
    .clk, .correct_en(cfg.rf),
    .raddr1(ir[19:15]), .raddr2(ir[24:20]),
    .rdata1(rs1), .rdata2(rs2),
    .err1_single(rs1_s), .err1_double(rs1_d), .err2_single(rs2_s), .err2_double(rs2_d),
    .we(ctrl.rf_we), .waddr(ir[11:7]), .wdata(wb_data)
  );

  // ------------------------------------------------------------ triplicated ALU
  always_comb begin
    unique case (ctrl.alu_a)
      A_PC:    alu_a = pc;
      A_ZERO:  alu_a = '0;
      default: alu_a = rs1;
    endcase
    alu_b = ctrl.alu_b_imm ? ctrl.imm : rs2;
  end

  logic [32:0] alu_vec [3];
  logic [32:0] alu_voted;
  for (genvar i = 0; i < 3; i++) begin : g_alu
    logic [31:0] y;
    logic        c;
    rv_alu u_alu (.op(ctrl.alu_op), .cmp_op(ctrl.cmp_op), .a(alu_a), .b(alu_b),
                  .ca(rs1), .cb(rs2), .result(y), .cmp(c));
    assign alu_vec[i] = {y, c};
  end

  tmr_voter #(.WIDTH(33)) u_alu_voter (
    .in0(alu_vec[0]), .in1(alu_vec[1]), .in2(alu_vec[2]), .correct_en(cfg.alu),
    .out(alu_voted), .mismatch(alu_mismatch)
  );
  assign {alu_y, alu_cmp} = alu_voted;

  // ------------------------------------------------------------ CSRs
  rv_csr u_csr (
    .clk, .rst_n, .por_rst_n,
    .csr_en(ctrl.csr_op != CSR_NONE), .csr_op(ctrl.csr_op), .csr_addr(ir[31:20]),
    .csr_wdata(ctrl.csr_imm ? {27'b0, ir[19:15]} : rs1), .csr_rdata,
    .trap_en(ctrl.trap), .trap_cause(ctrl.trap_cause), .trap_pc(pc),
    .trap_val(ctrl.trap_cause == CAUSE_ILLEGAL ? ir : 32'h0),
    .uret_en(ctrl.uret), .utvec, .uepc,
    .harden_cfg(cfg), .err_inc, .wdt_reset_cause
  );

  // ------------------------------------------------------------ data access
  always_comb begin
    dmem_req   = ctrl.mem_req;
    dmem_we    = ctrl.mem_we;
    dmem_addr  = alu_y;
    unique case (ctrl.mem_size)
      2'd0:    dmem_be = 4'b0001 << alu_y[1:0];
      2'd1:    dmem_be = alu_y[1] ? 4'b1100 : 4'b0011;
      default: dmem_be = 4'b1111;
    endcase
    dmem_wdata = rs2 << {alu_y[1:0], 3'b000};
    dmem_correct_en = cfg.dmem;

    begin
      logic [31:0] sh;
      sh = dmem_rdata >> {alu_y[1:0], 3'b000};
      unique case (ctrl.mem_size)
        2'd0:    load_data = ctrl.mem_unsigned ? {24'b0, sh[7:0]}  : {{24{sh[7]}},  sh[7:0]};
        2'd1:    load_data = ctrl.mem_unsigned ? {16'b0, sh[15:0]} : {{16{sh[15]}}, sh[15:0]};
        default: load_data = sh;
      endcase
    end
  end

  // ------------------------------------------------------------ write-back and next PC
  always_comb begin
    pc_plus4 = pc + 32'd4;
    unique case (ctrl.wb_sel)
      WB_PC4:  wb_data = pc_plus4;
      WB_LOAD: wb_data = load_data;
      WB_CSR:  wb_data = csr_rdata;
      default: wb_data = alu_y;
    endcase
    if (ctrl.trap)                      pc_next = utvec;
    else if (ctrl.uret)                 pc_next = uepc;
    else if (ctrl.jump)                 pc_next = {alu_y[31:1], 1'b0};
    else if (ctrl.branch && alu_cmp)    pc_next = alu_y;
    else                                pc_next = pc_plus4;
  end

  // ------------------------------------------------------------ error counter events
  always_comb begin
    err_inc = '0;
    err_inc[ERR_PC_SINGLE]   = ctrl.pc_we && pc_s;
    err_inc[ERR_PC_DOUBLE]   = ctrl.pc_we && pc_d;
    err_inc[ERR_DMEM_SINGLE] = dmem_gnt && dmem_err_single;
    err_inc[ERR_DMEM_DOUBLE] = dmem_gnt && dmem_err_double;
    err_inc[ERR_RS1_SINGLE]  = ctrl.exec && ctrl.use_rs1 && rs1_s;
    err_inc[ERR_RS1_DOUBLE]  = ctrl.exec && ctrl.use_rs1 && rs1_d;
    err_inc[ERR_RS2_SINGLE]  = ctrl.exec && ctrl.use_rs2 && rs2_s;
    err_inc[ERR_RS2_DOUBLE]  = ctrl.exec && ctrl.use_rs2 && rs2_d;
    err_inc[ERR_CTRL_TMR]    = ctrl_mismatch;
    err_inc[ERR_ALU_TMR]     = alu_mismatch && (ctrl.exec || ctrl.mem_req);
  end
endmodule

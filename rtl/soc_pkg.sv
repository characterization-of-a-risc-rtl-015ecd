// soc_pkg: types and constants shared by the hardened RISC-V SoC.
//
// Holds the address map printed with the SoC block diagram (UART at 0x40000000, watchdog at
// 0x40000100, APB3 bridge to the flash at 0x60000000), the CSR numbers, the layout of the
// hardening-configuration CSR, the index of each of the ten error counters, the AXI4-lite
// request/response bundles and the control word that the triplicated control unit drives.
// The SECDED code helpers (32 data bits -> 39-bit code word) live here as functions so that the
// encoder, the decoder and the testbenches share one definition of the bit layout.
// Address of the data memory, CSR numbers of the custom registers and the bit layout of the
// code word are this design's choices; the document fixes only the peripheral addresses, the
// 32->39 bit widths and the number and meaning of the counters.
package soc_pkg;

  // ---------------------------------------------------------------- address map
  localparam logic [31:0] UART_BASE  = 32'h4000_0000;
  localparam logic [31:0] WDT_BASE   = 32'h4000_0100;
  localparam logic [31:0] APB_BASE   = 32'h6000_0000;
  localparam logic [31:0] RESET_VEC  = 32'h6000_0000;

  // Data memory: every address with addr[31:30] == 2'b00; everything else goes to AXI4-lite.
  function automatic logic is_dmem_addr(input logic [31:0] a);
    return a[31:30] == 2'b00;
  endfunction

  // ---------------------------------------------------------------- SECDED (39,32)
  // Code word bit 0 is the overall parity; bits 1..38 form a Hamming code whose check bits sit
  // at the power-of-two positions 1,2,4,8,16,32 and whose data bits fill the others in order.
  localparam int unsigned CODE_W = 39;
  localparam int unsigned DATA_W = 32;

  function automatic logic [CODE_W-1:0] secded_encode(input logic [DATA_W-1:0] d);
    logic [CODE_W-1:0] c;
    int unsigned k;
    c = '0;
    k = 0;
    for (int unsigned p = 1; p < CODE_W; p++) begin
      if ((p & (p - 1)) != 0) begin
        c[p] = d[k];
        k++;
      end
    end
    for (int unsigned b = 0; b < 6; b++) begin
      logic par;
      par = 1'b0;
      for (int unsigned p = 1; p < CODE_W; p++)
        if (((p >> b) & 1) == 1) par ^= c[p];
      c[1 << b] = par;
    end
    c[0] = ^c[CODE_W-1:1];
    return c;
  endfunction

  function automatic logic [DATA_W-1:0] secded_extract(input logic [CODE_W-1:0] c);
    logic [DATA_W-1:0] d;
    int unsigned k;
    d = '0;
    k = 0;
    for (int unsigned p = 1; p < CODE_W; p++) begin
      if ((p & (p - 1)) != 0) begin
        d[k] = c[p];
        k++;
      end
    end
    return d;
  endfunction

  // ---------------------------------------------------------------- hardening configuration
  typedef struct packed {
    logic ctrl;   // [4] correct with the control-unit TMR voter
    logic alu;    // [3] correct with the ALU TMR voter
    logic dmem;   // [2] correct with the data-memory SECDED decoder
    logic rf;     // [1] correct with the register-file SECDED decoders
    logic pc;     // [0] correct with the PC SECDED decoder
  } harden_cfg_t;

  localparam harden_cfg_t HARDEN_ALL = '{ctrl: 1'b1, alu: 1'b1, dmem: 1'b1, rf: 1'b1, pc: 1'b1};

  // ---------------------------------------------------------------- error counters
  typedef enum logic [3:0] {
    ERR_PC_SINGLE   = 4'd0,
    ERR_PC_DOUBLE   = 4'd1,
    ERR_DMEM_SINGLE = 4'd2,
    ERR_DMEM_DOUBLE = 4'd3,
    ERR_RS1_SINGLE  = 4'd4,
    ERR_RS1_DOUBLE  = 4'd5,
    ERR_RS2_SINGLE  = 4'd6,
    ERR_RS2_DOUBLE  = 4'd7,
    ERR_CTRL_TMR    = 4'd8,
    ERR_ALU_TMR     = 4'd9
  } err_idx_e;
  localparam int unsigned N_ERR_CNT = 10;

  // ---------------------------------------------------------------- CSR numbers
  localparam logic [11:0] CSR_USTATUS   = 12'h000;
  localparam logic [11:0] CSR_UIE       = 12'h004;
  localparam logic [11:0] CSR_UTVEC     = 12'h005;
  localparam logic [11:0] CSR_USCRATCH  = 12'h040;
  localparam logic [11:0] CSR_UEPC      = 12'h041;
  localparam logic [11:0] CSR_UCAUSE    = 12'h042;
  localparam logic [11:0] CSR_UTVAL     = 12'h043;
  localparam logic [11:0] CSR_UIP       = 12'h044;
  localparam logic [11:0] CSR_HARDEN    = 12'h800;  // custom, read/write
  localparam logic [11:0] CSR_CYCLE     = 12'hC00;
  localparam logic [11:0] CSR_CYCLEH    = 12'hC80;
  localparam logic [11:0] CSR_ERRCNT0   = 12'hCC0;  // custom, read-only, CC0..CC9
  localparam logic [11:0] CSR_RSTCAUSE  = 12'hCCA;  // custom, read-only
  localparam logic [11:0] CSR_MVENDORID = 12'hF11;
  localparam logic [11:0] CSR_MARCHID   = 12'hF12;
  localparam logic [11:0] CSR_MIMPID    = 12'hF13;
  localparam logic [11:0] CSR_MHARTID   = 12'hF14;

  localparam logic [31:0] MIMPID_VALUE  = 32'h0000_0002;

  // trap causes
  localparam logic [3:0] CAUSE_ILLEGAL = 4'd2;
  localparam logic [3:0] CAUSE_BREAK   = 4'd3;
  localparam logic [3:0] CAUSE_ECALL   = 4'd8;

  // ---------------------------------------------------------------- core control word
  typedef enum logic [1:0] {S_FETCH = 2'd0, S_EXEC = 2'd1, S_MEM = 2'd2} core_state_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR, ALU_AND
  } alu_op_e;

  typedef enum logic [2:0] {
    CMP_EQ = 3'b000, CMP_NE = 3'b001, CMP_LT = 3'b100, CMP_GE = 3'b101, CMP_LTU = 3'b110, CMP_GEU = 3'b111
  } cmp_op_e;

  typedef enum logic [1:0] {A_RS1, A_PC, A_ZERO} alu_a_e;
  typedef enum logic [1:0] {WB_ALU, WB_PC4, WB_LOAD, WB_CSR} wb_sel_e;
  typedef enum logic [1:0] {CSR_NONE, CSR_RW, CSR_RS, CSR_RC} csr_op_e;

  typedef struct packed {
    logic        imem_req;
    logic        ir_we;
    logic        exec;     // the single execute cycle of every instruction
    logic        use_rs1;
    logic        use_rs2;
    alu_op_e     alu_op;
    cmp_op_e     cmp_op;
    alu_a_e      alu_a;
    logic        alu_b_imm;
    logic [31:0] imm;
    logic        rf_we;
    wb_sel_e     wb_sel;
    logic        mem_req;
    logic        mem_we;
    logic [1:0]  mem_size;
    logic        mem_unsigned;
    logic        branch;
    logic        jump;     // jal / jalr: pc <- alu result
    csr_op_e     csr_op;
    logic        csr_imm;
    logic        trap;
    logic [3:0]  trap_cause;
    logic        uret;
    logic        pc_we;
  } ctrl_t;

  // ---------------------------------------------------------------- AXI4-lite
  typedef struct packed {
    logic [31:0] awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] RESP_DECERR = 2'b11;

endpackage

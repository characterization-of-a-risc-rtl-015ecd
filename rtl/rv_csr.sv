// rv_csr: control and status registers of the hardened core.
//
// From the RISC-V privileged specification: the 64-bit cycle counter (cycle/cycleh), the user
// trap registers (ustatus, uie, utvec, uscratch, uepc, ucause, utval, uip) and the machine
// information registers (mvendorid, marchid, mimpid, mhartid). Custom registers, as the
// document describes them:
//   0x800 hardening configuration (read/write, bits [4:0] = ctrl, alu, dmem, rf, pc correction
//         enables; reset value all ones, i.e. fully hardened until software changes it)
//   0xCC0..0xCC9 the ten 32-bit error counters, read-only, in the order of soc_pkg::err_idx_e
//   0xCCA reset cause, read-only: 1 when the last reset came from the watchdog
// The error counters are cleared only by the power-on reset, not by the SoC (watchdog) reset,
// so software can print them after a watchdog reset. CSR numbers and bit layouts of the
// custom registers are this design's choice.
// Access (csr_en) happens in the core's execute cycle: csr_rdata is the old value, the write
// (rw/rs/rc) takes effect at the clock edge. A trap (trap_en) saves epc, cause and tval and
// clears UIE; uret restores UIE. There are no interrupt sources, so uie/uip are plain storage.
module rv_csr
  import soc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        por_rst_n,
  // CSR instruction
  input  logic        csr_en,
  input  csr_op_e     csr_op,
  input  logic [11:0] csr_addr,
  input  logic [31:0] csr_wdata,
  output logic [31:0] csr_rdata,
  // traps
  input  logic        trap_en,
  input  logic [3:0]  trap_cause,
  input  logic [31:0] trap_pc,
  input  logic [31:0] trap_val,
  input  logic        uret_en,
  output logic [31:0] utvec,
  output logic [31:0] uepc,
  // hardening and observability
  output harden_cfg_t harden_cfg,
  input  logic [N_ERR_CNT-1:0] err_inc,
  input  logic        wdt_reset_cause
);
  logic [63:0] cycle_q;
  logic        uie_bit, upie_bit;
  logic [31:0] uie_q, uip_q, utvec_q, uscratch_q, uepc_q, ucause_q, utval_q;
  harden_cfg_t cfg_q;
  logic [31:0] err_cnt [N_ERR_CNT];
  logic        wr;
  logic [31:0] wval;

  assign utvec      = utvec_q;
  assign uepc       = uepc_q;
  assign harden_cfg = cfg_q;

  // read mux
  always_comb begin
    csr_rdata = '0;
    unique case (csr_addr)
      CSR_USTATUS:   csr_rdata = {27'b0, upie_bit, 3'b0, uie_bit};
      CSR_UIE:       csr_rdata = uie_q;
      CSR_UTVEC:     csr_rdata = utvec_q;
      CSR_USCRATCH:  csr_rdata = uscratch_q;
      CSR_UEPC:      csr_rdata = uepc_q;
      CSR_UCAUSE:    csr_rdata = ucause_q;
      CSR_UTVAL:     csr_rdata = utval_q;
      CSR_UIP:       csr_rdata = uip_q;
      CSR_HARDEN:    csr_rdata = {27'b0, cfg_q};
      CSR_CYCLE:     csr_rdata = cycle_q[31:0];
      CSR_CYCLEH:    csr_rdata = cycle_q[63:32];
      CSR_RSTCAUSE:  csr_rdata = {31'b0, wdt_reset_cause};
      CSR_MVENDORID: csr_rdata = 32'h0;
      CSR_MARCHID:   csr_rdata = 32'h0;
      CSR_MIMPID:    csr_rdata = MIMPID_VALUE;
      CSR_MHARTID:   csr_rdata = 32'h0;
      default: begin
        if (csr_addr >= CSR_ERRCNT0 && csr_addr < CSR_ERRCNT0 + 12'(N_ERR_CNT))
          csr_rdata = err_cnt[4'(csr_addr - CSR_ERRCNT0)];
      end
    endcase
  end

  // write value; rs/rc with a zero operand do not write, as the specification requires
  always_comb begin
    unique case (csr_op)
      CSR_RW:  wval = csr_wdata;
      CSR_RS:  wval = csr_rdata | csr_wdata;
      CSR_RC:  wval = csr_rdata & ~csr_wdata;
      default: wval = csr_rdata;
    endcase
    wr = csr_en && (csr_op == CSR_RW || csr_wdata != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle_q    <= '0;
      uie_bit    <= 1'b0;
      upie_bit   <= 1'b0;
      uie_q      <= '0;
      uip_q      <= '0;
      utvec_q    <= '0;
      uscratch_q <= '0;
      uepc_q     <= '0;
      ucause_q   <= '0;
      utval_q    <= '0;
      cfg_q      <= HARDEN_ALL;
    end else begin
      cycle_q <= cycle_q + 64'd1;
      if (trap_en) begin
        uepc_q   <= trap_pc;
        ucause_q <= {28'b0, trap_cause};
        utval_q  <= trap_val;
        upie_bit <= uie_bit;
        uie_bit  <= 1'b0;
      end else if (uret_en) begin
        uie_bit  <= upie_bit;
        upie_bit <= 1'b1;
      end else if (wr) begin
        unique case (csr_addr)
          CSR_USTATUS:  begin uie_bit <= wval[0]; upie_bit <= wval[4]; end
          CSR_UIE:      uie_q      <= wval;
          CSR_UTVEC:    utvec_q    <= {wval[31:2], 2'b00};
          CSR_USCRATCH: uscratch_q <= wval;
          CSR_UEPC:     uepc_q     <= {wval[31:2], 2'b00};
          CSR_UCAUSE:   ucause_q   <= wval;
          CSR_UTVAL:    utval_q    <= wval;
          CSR_UIP:      uip_q      <= wval;
          CSR_HARDEN:   cfg_q      <= harden_cfg_t'(wval[4:0]);
          default: ;
        endcase
      end
    end
  end

  // error counters: power-on reset only
  always_ff @(posedge clk or negedge por_rst_n) begin
    if (!por_rst_n) begin
      for (int i = 0; i < N_ERR_CNT; i++) err_cnt[i] <= '0;
    end else begin
      for (int i = 0; i < N_ERR_CNT; i++)
        if (err_inc[i]) err_cnt[i] <= err_cnt[i] + 32'd1;
    end
  end
endmodule

// rv_regfile: the 32 x 32-bit RV32I register file kept as 39-bit SECDED code words.
//
// Each register is stored encoded; each of the two read ports has its own SECDED decoder, so
// a flip is reported per port (the document counts single and double errors separately for
// both read ports). Reads are combinational (the array is small enough for flip-flops or LUT
// RAM); the write is synchronous on we. x0 is never written and always reads as zero with no
// error flags. A corrected error is only masked at the read port: the stored word keeps the
// flip until the register is written again, as the document describes no scrubbing.
// The array is not reset; the testbenches write each register before reading it.
module rv_regfile
  import soc_pkg::*;
(
  input  logic        clk,
  input  logic        correct_en,
  input  logic [4:0]  raddr1,
  input  logic [4:0]  raddr2,
  output logic [31:0] rdata1,
  output logic [31:0] rdata2,
  output logic        err1_single,
  output logic        err1_double,
  output logic        err2_single,
  output logic        err2_double,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata
);
  logic [CODE_W-1:0] regs [1:32-1];
  logic [CODE_W-1:0] wcode;
  logic [31:0]       d1, d2;
  logic              s1, s2, e1, e2;

  secded_enc u_enc (.data(wdata), .code(wcode));

  always_ff @(posedge clk)
    if (we && waddr != 5'd0) regs[waddr] <= wcode;

  secded_dec u_dec1 (.code(raddr1 == 5'd0 ? '0 : regs[raddr1]), .correct_en(correct_en),
                     .data(d1), .err_single(s1), .err_double(e1));
  secded_dec u_dec2 (.code(raddr2 == 5'd0 ? '0 : regs[raddr2]), .correct_en(correct_en),
                     .data(d2), .err_single(s2), .err_double(e2));

  always_comb begin
    rdata1 = d1;
    rdata2 = d2;
    err1_single = s1;
    err1_double = e1;
    err2_single = s2;
    err2_double = e2;
  end
endmodule

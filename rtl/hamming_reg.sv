// hamming_reg: a 32-bit register kept as a 39-bit SECDED code word (used for the PC).
//
// The document protects the Program Counter with a Hamming SECDED code. The value is encoded
// on the way in (secded_enc) and decoded on the way out (secded_dec), so a bit flip in the
// stored word is reported and, when correct_en is set, masked in q. Because the core writes
// the decoded-and-updated value back on every instruction, a corrected flip is also scrubbed
// from the register at the next write. Write is synchronous on we; q is combinational from
// the stored code word. Reset loads the encoded RESET_VALUE.
module hamming_reg
  import soc_pkg::*;
#(
  parameter logic [31:0] RESET_VALUE = RESET_VEC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [31:0] d,
  input  logic        correct_en,
  output logic [31:0] q,
  output logic        err_single,
  output logic        err_double
);
  logic [CODE_W-1:0] code_q, code_d;

  secded_enc u_enc (.data(d), .code(code_d));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  code_q <= secded_encode(RESET_VALUE);
    else if (we) code_q <= code_d;

  secded_dec u_dec (.code(code_q), .correct_en(correct_en), .data(q),
                    .err_single(err_single), .err_double(err_double));
endmodule

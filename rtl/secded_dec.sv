// secded_dec: Hamming SECDED decoder, 39-bit code word to 32 data bits.
//
// Recomputes the six Hamming check bits into a syndrome and checks the overall parity:
//   syndrome != 0, parity wrong  -> single error at position <syndrome>   (err_single)
//   syndrome == 0, parity wrong  -> single error in the overall parity bit (err_single)
//   syndrome != 0, parity right  -> double error, not correctable          (err_double)
// A syndrome pointing past bit 38 with wrong parity cannot be a single error and is also
// reported as a double error. Detection is always on; the flipped bit is repaired in the output
// only while correct_en is high. correct_en is the per-decoder bit of the hardening
// configuration CSR, so the same hardware can run hardened and unhardened, as in the document.
// Combinational, no latency.
module secded_dec
  import soc_pkg::*;
(
  input  logic [CODE_W-1:0] code,
  input  logic              correct_en,
  output logic [DATA_W-1:0] data,
  output logic              err_single,
  output logic              err_double
);
  logic [5:0]        syndrome;
  logic              parity_bad;
  logic [CODE_W-1:0] fixed;

  always_comb begin
    syndrome = '0;
    for (int unsigned b = 0; b < 6; b++)
      for (int unsigned p = 1; p < CODE_W; p++)
        if (((p >> b) & 1) == 1) syndrome[b] ^= code[p];
    parity_bad = ^code;

    err_single = 1'b0;
    err_double = 1'b0;
    fixed      = code;
    if (parity_bad) begin
      if (syndrome < 6'(CODE_W)) begin
        err_single = 1'b1;
        if (correct_en) fixed[syndrome] = ~code[syndrome];
      end else begin
        err_double = 1'b1;
      end
    end else if (syndrome != '0) begin
      err_double = 1'b1;
    end
    data = secded_extract(fixed);
  end
endmodule

// secded_enc: Hamming SECDED encoder, 32 data bits to a 39-bit code word.
//
// The document widens each protected word from 32 to 39 bits; this encoder computes the six
// Hamming check bits and the overall parity bit that make up the extra seven. The bit layout
// (check bits at positions 1,2,4,8,16,32, overall parity at bit 0) is this design's choice and is
// defined once in soc_pkg::secded_encode. Purely combinational, no latency.
module secded_enc
  import soc_pkg::*;
(
  input  logic [DATA_W-1:0] data,
  output logic [CODE_W-1:0] code
);
  always_comb code = secded_encode(data);
endmodule

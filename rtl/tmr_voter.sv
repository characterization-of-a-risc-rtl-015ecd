// tmr_voter: bitwise two-out-of-three majority voter with correction enable.
//
// Triple modular redundancy as the document applies it to the ALU and the control unit: three
// copies compute the same word and the voter passes on the majority of each bit. mismatch is
// high whenever the copies disagree; the core counts it in the TMR error counter. With
// correct_en low (hardening switched off in the configuration CSR) the voter passes copy 0
// unchanged, so a faulty copy 0 reaches the datapath, while mismatch still reports the
// disagreement. Combinational.
module tmr_voter #(
  parameter int unsigned WIDTH = 33
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic             correct_en,
  output logic [WIDTH-1:0] out,
  output logic             mismatch
);
  always_comb begin
    out      = correct_en ? ((in0 & in1) | (in0 & in2) | (in1 & in2)) : in0;
    mismatch = (in0 != in1) || (in0 != in2);
  end
endmodule

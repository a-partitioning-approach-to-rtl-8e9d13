// tmr_voter: W-bit voter, the bitwise 2-out-of-3 majority of three words.
// Each output bit equals the value that at least two of the three inputs
// agree on, so any error confined to one input word is masked.
// Interface: in0, in1, in2 (W bits) in; out (W bits). Combinational.
module tmr_voter
  import ftarith_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] out
);
  always_comb
    for (int i = 0; i < W; i++) out[i] = maj3(in0[i], in1[i], in2[i]);
endmodule

// cla4: 4-bit carry-lookahead adder with carry-in and carry-out.
//
// Per bit, generate g = a&b and propagate p = a^b are formed; all four
// internal carries and the carry-out are then computed in parallel as
// two-level sums of products of g, p and ci (no gate has more than five
// inputs). Wider adders chain these blocks so that the carry ripples from
// block to block while each block looks ahead inside itself, the standard
// cell style of carry-lookahead adder. The gate-level form is this design's
// own; only the block's function and the chaining come from the design.
// Purely combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co
);
  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = ci;
    c[1] = g[0] | (p[0] & ci);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & ci);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & ci);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & ci);
    s  = p ^ c[3:0];
    co = c[4];
  end
endmodule

// cas_cell: controlled add/subtract cell of the nonrestoring array divider.
// The divisor bit d is XORed with the row's control p (p = 1: subtract, the
// row adds the complemented divisor with p as the row's carry-in; p = 0: add)
// and then added to the partial-remainder bit a with the carry ci.
// Interface: a, d, p, ci in; s, co out. Combinational.
module cas_cell (
  input  logic a,
  input  logic d,
  input  logic p,
  input  logic ci,
  output logic s,
  output logic co
);
  logic b;
  always_comb begin
    b  = d ^ p;
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule

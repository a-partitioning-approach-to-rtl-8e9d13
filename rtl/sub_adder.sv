// sub_adder: W-bit adder with carry-in and carry-out, one of the three
// replicated (n/m)-bit adders of the partitioned fault-tolerant adder.
//
// KIND = ADD_RCA builds it as a ripple-carry chain of W full adders;
// KIND = ADD_CLA builds it as a ripple chain of W/4 4-bit carry-lookahead
// blocks (W must then be a multiple of 4). Either way the carry enters at the
// least significant bit and leaves at the most significant one, which is what
// lets the partitioned adder pass the carry from one step to the next.
// Interface: a, b (W bits), ci in; s (W bits), co out. Combinational.
module sub_adder
  import ftarith_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter add_kind_e   KIND = ADD_RCA
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  if (KIND == ADD_CLA) begin : g_cla
    localparam int unsigned NB = W / 4;
    logic [NB:0] c;
    assign c[0] = ci;
    for (genvar k = 0; k < NB; k++) begin : g_blk
      cla4 u_cla (
        .a (a[4*k +: 4]),
        .b (b[4*k +: 4]),
        .ci(c[k]),
        .s (s[4*k +: 4]),
        .co(c[k+1])
      );
    end
    assign co = c[NB];
    initial assert (W % 4 == 0) else $error("sub_adder: W must be a multiple of 4 for ADD_CLA");
  end else begin : g_rca
    logic [W:0] c;
    assign c[0] = ci;
    for (genvar i = 0; i < W; i++) begin : g_bit
      full_adder u_fa (
        .a (a[i]),
        .b (b[i]),
        .ci(c[i]),
        .s (s[i]),
        .co(c[i+1])
      );
    end
    assign co = c[W];
  end
endmodule

// ft_adder: N-bit fault-tolerant adder built by partitioning.
//
// The N-bit addition is split into M slices of R = N/M bits and done in M
// steps on three identical R-bit sub-adders. In step k each sub-adder's own
// M-to-1 multiplexer selects operand slice k (bits k*R .. k*R+R-1).
// The three (R+1)-bit results (sum and carry-out) go to one (R+1)-bit
// majority voter. The voted carry-out is stored and, through a 2-to-1
// multiplexer, becomes the carry-in of the next step; in step 0 the
// multiplexer passes the external carry-in. The voted R-bit sum of steps
// 0 .. M-2 is stored in M-1 result registers; the sum of the last step goes
// straight from the voter to the output, next to the stored slices. Any
// error confined to one of the three sub-adders is therefore outvoted in
// every step, the same fault coverage as triple modular redundancy at about
// a third of its adder hardware. M = 1 degenerates to plain triple modular
// redundancy of the whole adder.
//
// The slicing, the voted and stored carry, the 2-to-1 carry multiplexer and
// the direct path of the last slice follow the design. Storage elements are
// edge-triggered registers and one step takes one clock cycle (this design's
// choice); the sub-adder kind (ripple or 4-bit lookahead) is a parameter.
//
// Interface and timing: start at a clock edge begins an addition; steps run
// in the next M cycles (busy high) and sum/cout are valid in the last of
// them, flagged by done. a, b and cin are read during the M step cycles, so
// they may change just after the start edge and must then hold until the
// done cycle ends (an assertion checks this); a new start may be raised in
// the done cycle. flip is a fault-emulation input, zero in normal use:
// flip[r] is XORed onto the {carry, sum} output of sub-adder replica r, so
// a test can make one replica faulty.
module ft_adder
  import ftarith_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter int unsigned M    = 4,
  parameter add_kind_e   KIND = ADD_RCA,
  localparam int unsigned R   = N / M,
  localparam int unsigned SW  = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  input  logic                 cin,
  input  logic [NREP-1:0][R:0] flip,
  output logic                 busy,
  output logic                 done,
  output logic [N-1:0]         sum,
  output logic                 cout
);
  logic [SW-1:0] step;
  logic          first, last;

  step_ctrl #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .busy, .step, .first, .last, .done
  );

  // 2-to-1 carry multiplexer: external carry in step 0, stored carry later.
  logic carry_q, c_in;
  assign c_in = first ? cin : carry_q;

  logic [NREP-1:0][R:0] rep_out;
  for (genvar r = 0; r < NREP; r++) begin : g_rep
    // This replica's own m-to-1 operand multiplexers.
    logic [R-1:0] a_sel, b_sel;
    always_comb begin
      a_sel = '0;
      b_sel = '0;
      for (int k = 0; k < M; k++)
        if (step == SW'(k)) begin
          a_sel = a[k*R +: R];
          b_sel = b[k*R +: R];
        end
    end

    logic [R-1:0] s;
    logic         co;
    sub_adder #(.W(R), .KIND(KIND)) u_add (
      .a(a_sel), .b(b_sel), .ci(c_in), .s(s), .co(co)
    );
    assign rep_out[r] = {co, s} ^ flip[r];
  end

  logic [R:0] voted;
  tmr_voter #(.W(R + 1)) u_vote (
    .in0(rep_out[0]), .in1(rep_out[1]), .in2(rep_out[2]), .out(voted)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    carry_q <= 1'b0;
    else if (busy) carry_q <= voted[R];
  end

  if (M > 1) begin : g_part
    logic [(M-1)*R-1:0] res_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) res_q <= '0;
      else if (busy)
        for (int k = 0; k < M - 1; k++)
          if (step == SW'(k)) res_q[k*R +: R] <= voted[R-1:0];
    end
    assign sum = {voted[R-1:0], res_q};
  end else begin : g_tmr
    assign sum = voted[R-1:0];
  end
  assign cout = voted[R];

  initial assert (N % M == 0) else $error("ft_adder: N must be a multiple of M");

  // Operands must stay put while an addition is in progress.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (busy && !last) |=> ($stable(a) && $stable(b) && $stable(cin)));
endmodule

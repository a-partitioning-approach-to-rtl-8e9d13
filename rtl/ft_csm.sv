// ft_csm: N-by-N unsigned fault-tolerant carry-save array multiplier built by
// partitioning.
//
// The N carry-save rows of the (modified) array multiplier are cut into M
// groups of R = N/M rows. Three replicas of one group (csm_slice, which also
// holds the final ripple-carry row) run the M groups one after the other in
// M computation steps. Each replica forms all N*N partial products x_i*y_j
// with AND gates, and its M-to-1 multiplexer picks the R rows of the current
// step. Between steps every replica keeps its own 2N-3 carry-save sums and
// carries in its own registers; a 2-to-1 multiplexer feeds the first group
// with zeros in step 0 and with those registers afterwards. The intermediate
// state is not voted, so the steps do not pay for a voter each; an error in
// one replica stays inside that replica and is outvoted where results leave
// the replicas: the R product bits made in each step go through an R-bit
// voter (the first M-1 groups into M-1 registers), and in the last step the
// N high product bits from the ripple-carry row go through an N-bit voter.
//
// The modified array, the 2N-3 per-replica latched values, the N*N AND gates
// and M-to-1 multiplexers, and a single voter delay on the critical path
// follow the design. Where the low product bits are voted (once per step,
// like the quotient bits of the fault-tolerant divider) is this design's
// reading; one step per clock cycle and registers for latches are its choice.
//
// Interface and timing: start at a clock edge begins a multiplication;
// steps run in the next M cycles (busy high) and prod is valid in the last
// of them, flagged by done. x and y are read during the M step cycles, so
// they may change just after the start edge and must then hold until the
// done cycle ends (an assertion checks this); a new start may be raised in
// the done cycle. flip is a fault-emulation input, zero in normal use:
// flip[r] is XORed onto replica r's outputs {p_hi, s_out, c_out, p_lo}, so
// a test can make one replica faulty, including the state it carries
// between steps.
module ft_csm
  import ftarith_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter int unsigned M   = 4,
  localparam int unsigned R  = N / M,
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned FW = N + (N - 2) + (N - 1) + R
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [N-1:0]          x,
  input  logic [N-1:0]          y,
  input  logic [NREP-1:0][FW-1:0] flip,
  output logic                  busy,
  output logic                  done,
  output logic [2*N-1:0]        prod
);
  logic [SW-1:0] step;
  logic          first, last;

  step_ctrl #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .busy, .step, .first, .last, .done
  );

  logic [NREP-1:0][R-1:0] rep_lo;
  logic [NREP-1:0][N-1:0] rep_hi;

  for (genvar r = 0; r < NREP; r++) begin : g_rep
    // All N*N partial products of this replica.
    logic [N-1:0][N-1:0] pp_all;
    always_comb
      for (int j = 0; j < N; j++) pp_all[j] = x & {N{y[j]}};

    // M-to-1 row multiplexer and the leftmost sum of the row above.
    logic [R-1:0][N-1:0] pp_sel;
    logic                pp_msb;
    always_comb begin
      pp_sel = '0;
      pp_msb = 1'b0;
      for (int k = 0; k < M; k++)
        if (step == SW'(k)) begin
          for (int t = 0; t < R; t++) pp_sel[t] = pp_all[k*R + t];
          if (k > 0) pp_msb = pp_all[k*R - 1][N-1];
        end
    end

    // Per-replica state between steps, and the 2-to-1 input multiplexer.
    logic [N-2:1] s_q, s_in, s_out;
    logic [N-2:0] c_q, c_in, c_out;
    logic [R-1:0] p_lo;
    logic [N-1:0] p_hi;
    assign s_in = first ? '0 : s_q;
    assign c_in = first ? '0 : c_q;

    csm_slice #(.N(N), .R(R)) u_slice (
      .pp(pp_sel), .pp_msb(pp_msb), .s_in(s_in), .c_in(c_in),
      .p_lo(p_lo), .s_out(s_out), .c_out(c_out), .p_hi(p_hi)
    );

    // Replica outputs, with the fault-emulation mask applied.
    logic [N-2:1] s_f;
    logic [N-2:0] c_f;
    assign {rep_hi[r], s_f, c_f, rep_lo[r]} = {p_hi, s_out, c_out, p_lo} ^ flip[r];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_q <= '0;
        c_q <= '0;
      end else if (busy) begin
        s_q <= s_f;
        c_q <= c_f;
      end
    end
  end

  logic [R-1:0] lo_v;
  logic [N-1:0] hi_v;
  tmr_voter #(.W(R)) u_vote_lo (
    .in0(rep_lo[0]), .in1(rep_lo[1]), .in2(rep_lo[2]), .out(lo_v)
  );
  tmr_voter #(.W(N)) u_vote_hi (
    .in0(rep_hi[0]), .in1(rep_hi[1]), .in2(rep_hi[2]), .out(hi_v)
  );

  if (M > 1) begin : g_part
    logic [(M-1)*R-1:0] lo_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) lo_q <= '0;
      else if (busy)
        for (int k = 0; k < M - 1; k++)
          if (step == SW'(k)) lo_q[k*R +: R] <= lo_v;
    end
    assign prod = {hi_v, lo_v, lo_q};
  end else begin : g_tmr
    assign prod = {hi_v, lo_v};
  end

  initial assert (N % M == 0 && N >= 4) else $error("ft_csm: N must be a multiple of M and at least 4");

  xy_hold: assert property (@(posedge clk) disable iff (!rst_n)
                            (busy && !last) |=> ($stable(x) && $stable(y)));
endmodule

// ft_nrd: N-by-N fault-tolerant nonrestoring array divider built by
// partitioning.
//
// The divider array has N rows of N controlled add/subtract cells; it divides
// a (2N-1)-bit dividend w by an N-bit divisor d and yields an N-bit quotient
// and an N-bit final partial remainder. The rows are cut into M groups of
// R = N/M rows and three replicas of one group (nrd_slice) run the groups in
// M computation steps. In step k each replica's own M-to-1 multiplexer
// hands it the R dividend bits that enter rows k*R .. k*R+R-1 from the
// bottom; a 2-to-1 multiplexer gives the first row either the dividend's upper N-1 bits with
// control 1 (subtract), in step 0, or the replica's own N-bit register,
// which holds the last row's remainder (upper N-1 bits, shifted) and
// quotient bit (next control). The remainder travels between steps inside
// each replica, unvoted. The R quotient bits of every step pass an R-bit
// voter; steps 0 .. M-2 store theirs in M-1 registers, the last step's go
// straight to the output. In the last step the N-bit remainder passes an
// N-bit voter.
//
// Number format (as in the classic nonrestoring array): both operands are
// non-negative with a zero top bit, d[N-1] = 0, and w < d * 2^(N-1) so that
// the quotient fits; then quo = w / d (quo[N-1], from the first row, is 0)
// and rem, read as an N-bit two's complement number, is either w mod d or
// (w mod d) - d. The final correction of a negative remainder is not part of
// the array and is left to the user. Vector bit i has weight 2^i: the first
// step produces the most significant quotient bits.
//
// The row structure, the per-replica remainder register, the two
// multiplexers and the two voters follow the design; one step per clock
// cycle and registers for latches are this design's choice.
//
// Interface and timing: start at a clock edge begins a division; steps run
// in the next M cycles (busy high) and quo/rem are valid in the last of
// them, flagged by done. w and d are read during the M step cycles, so they
// may change just after the start edge and must then hold until the done
// cycle ends (an assertion checks this); a new start may be raised in the
// done cycle. flip is a fault-emulation input, zero in normal use: flip[r]
// is XORed onto replica r's outputs {rem_out, q}, which also reach that
// replica's own register.
module ft_nrd
  import ftarith_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter int unsigned M   = 4,
  localparam int unsigned R  = N / M,
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [2*N-2:0]           w,
  input  logic [N-1:0]             d,
  input  logic [NREP-1:0][N+R-1:0] flip,
  output logic                     busy,
  output logic                     done,
  output logic [N-1:0]             quo,
  output logic [N-1:0]             rem
);
  logic [SW-1:0] step;
  logic          first, last;

  step_ctrl #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .busy, .step, .first, .last, .done
  );

  logic [NREP-1:0][R-1:0] rep_q;
  logic [NREP-1:0][N-1:0] rep_rem;

  for (genvar r = 0; r < NREP; r++) begin : g_rep
    logic [N-2:0] rem_q, rem_in;
    logic         p_q, p_in;
    logic [R-1:0] q;
    logic [N-1:0] rem_out;

    // This replica's own M-to-1 multiplexer of the dividend bits entering
    // at the bottom of the rows: global row g takes w[N-1-g].
    logic [R-1:0] w_sel;
    always_comb begin
      w_sel = '0;
      for (int k = 0; k < M; k++)
        if (step == SW'(k))
          for (int t = 0; t < R; t++) w_sel[t] = w[N-1-(k*R+t)];
    end

    // 2-to-1 multiplexer: dividend top bits and "subtract" in step 0.
    assign rem_in = first ? w[2*N-2:N] : rem_q;
    assign p_in   = first ? 1'b1 : p_q;

    nrd_slice #(.N(N), .R(R)) u_slice (
      .rem_in(rem_in), .p_in(p_in), .w_in(w_sel), .d(d),
      .q(q), .rem_out(rem_out)
    );

    assign {rep_rem[r], rep_q[r]} = {rem_out, q} ^ flip[r];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rem_q <= '0;
        p_q   <= 1'b0;
      end else if (busy) begin
        rem_q <= rep_rem[r][N-2:0];
        p_q   <= rep_q[r][R-1];
      end
    end
  end

  logic [R-1:0] q_v;
  tmr_voter #(.W(R)) u_vote_q (
    .in0(rep_q[0]), .in1(rep_q[1]), .in2(rep_q[2]), .out(q_v)
  );
  tmr_voter #(.W(N)) u_vote_r (
    .in0(rep_rem[0]), .in1(rep_rem[1]), .in2(rep_rem[2]), .out(rem)
  );

  // Row t of a step yields quotient bit N-1-(k*R+t); reverse into weight order.
  logic [R-1:0] q_rev;
  always_comb
    for (int t = 0; t < R; t++) q_rev[R-1-t] = q_v[t];

  if (M > 1) begin : g_part
    // q_hi[(M-2-k)*R +: R] holds step k's bits, i.e. quotient bits
    // N-1-k*R .. N-R-k*R.
    logic [(M-1)*R-1:0] q_hi;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q_hi <= '0;
      else if (busy)
        for (int k = 0; k < M - 1; k++)
          if (step == SW'(k)) q_hi[(M-2-k)*R +: R] <= q_rev;
    end
    assign quo = {q_hi, q_rev};
  end else begin : g_tmr
    assign quo = q_rev;
  end

  initial assert (N % M == 0 && N >= 2) else $error("ft_nrd: N must be a multiple of M");

  wd_hold: assert property (@(posedge clk) disable iff (!rst_n)
                            (busy && !last) |=> ($stable(w) && $stable(d)));
endmodule

// csm_slice: one replica's share of the partitioned carry-save array
// multiplier (n-by-n, unsigned).
//
// The multiplier array has N carry-save rows, one per multiplier bit y_j,
// each made of N-1 full adders, followed by a ripple-carry row of N-1 full
// adders. Row j's adder in column i adds the partial product x_i*y_j, the sum
// coming down from column i+1 of the row above and the carry coming down from
// column i of the row above; its sum bit in column 0 is product bit P_j. The
// leftmost sum input of a row is the partial product x_{N-1}*y_{j-1}, which
// needs no adder. The first row receives zeros in place of sums and carries
// (the extra carry-save row of the modified array), so the array has N
// carry-save rows, not N-1.
//
// This slice holds R = N/M of those rows plus the ripple-carry row. It
// evaluates rows k*R .. k*R+R-1 in computation step k, given:
//   pp       the R selected partial-product rows, pp[t][i] = x_i*y_{kR+t}
//   pp_msb   x_{N-1}*y_{kR-1}, the leftmost sum entering the first row
//            (0 in step 0)
//   s_in     sums s[1..N-2] and c_in carries c[0..N-2] left by the row above
//            (zeros in step 0; otherwise what the previous step latched)
// and returns
//   p_lo     the R product bits P_{kR} .. P_{kR+R-1} (p_lo[t] from row t)
//   s_out, c_out  the last row's sums s[1..N-2] and carries c[0..N-2]
//            (the 2N-3 values latched between steps)
//   p_hi     the ripple-carry row's result on the last row's outputs,
//            product bits P_N .. P_{2N-1}; meaningful in the last step.
// The row structure, the latched 2N-3 values and the ripple row follow the
// design. Combinational.
module csm_slice #(
  parameter int unsigned N = 32,
  parameter int unsigned R = 8
) (
  input  logic [R-1:0][N-1:0] pp,
  input  logic                pp_msb,
  input  logic [N-2:1]        s_in,
  input  logic [N-2:0]        c_in,
  output logic [R-1:0]        p_lo,
  output logic [N-2:1]        s_out,
  output logic [N-2:0]        c_out,
  output logic [N-1:0]        p_hi
);
  // s_row[t] / c_row[t]: sums (N bits, bit N-1 = leftmost partial product)
  // and carries (N-1 bits) leaving carry-save row t; index 0 is the input.
  logic [R:0][N-1:0] s_row;
  logic [R:0][N-2:0] c_row;

  assign s_row[0] = {pp_msb, s_in, 1'b0};
  assign c_row[0] = c_in;

  for (genvar t = 0; t < R; t++) begin : g_row
    assign s_row[t+1][N-1] = pp[t][N-1];
    for (genvar i = 0; i < N - 1; i++) begin : g_col
      full_adder u_fa (
        .a (pp[t][i]),
        .b (s_row[t][i+1]),
        .ci(c_row[t][i]),
        .s (s_row[t+1][i]),
        .co(c_row[t+1][i])
      );
    end
    assign p_lo[t] = s_row[t+1][0];
  end

  assign s_out = s_row[R][N-2:1];
  assign c_out = c_row[R];

  // Final ripple-carry row: P_{N+k} = s[k+1] + c[k] + ripple carry.
  logic [N-1:0] rc;
  assign rc[0] = 1'b0;
  for (genvar k = 0; k < N - 1; k++) begin : g_rca
    full_adder u_fa (
      .a (s_row[R][k+1]),
      .b (c_row[R][k]),
      .ci(rc[k]),
      .s (p_hi[k]),
      .co(rc[k+1])
    );
  end
  assign p_hi[N-1] = rc[N-1];

  // s_row[0][0] has no reader: the sum of column 0 leaves the array as a
  // product bit, so nothing enters column -1.
  logic unused_ok;
  assign unused_ok = s_row[0][0];
endmodule

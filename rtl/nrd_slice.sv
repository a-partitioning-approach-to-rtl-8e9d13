// nrd_slice: one replica's share of the partitioned nonrestoring array
// divider: R rows of N controlled add/subtract (CAS) cells.
//
// Every row adds (control p = 0) or subtracts (p = 1) the N-bit divisor d to
// or from an N-bit partial remainder. The row's carry chain ripples from the
// least significant cell (carry-in = p) to the most significant one; its
// carry-out is the row's quotient bit and the next row's control, so a row
// that leaves a non-negative remainder makes the next row subtract and one
// that leaves a negative remainder makes it add back. The operand of a row is
// the previous row's result without its top bit, shifted up by one place,
// with the next dividend bit entering at the bottom.
//
// Interface (combinational): rem_in, the upper N-1 bits of the first row's
// operand; p_in, the first row's control; w_in[t], the dividend bit entering
// row t at the bottom; d, the divisor. Outputs: q[t], the quotient bit of
// row t; rem_out, the N-bit result of the last row. The cell array and the
// control chaining follow the design.
module nrd_slice #(
  parameter int unsigned N = 32,
  parameter int unsigned R = 8
) (
  input  logic [N-2:0] rem_in,
  input  logic         p_in,
  input  logic [R-1:0] w_in,
  input  logic [N-1:0] d,
  output logic [R-1:0] q,
  output logic [N-1:0] rem_out
);
  logic [R:0][N-1:0] row_res;  // row_res[0][N-2:0] = rem_in; top bit unused
  logic [R:0]        p_row;

  assign row_res[0] = {1'b0, rem_in};
  assign p_row[0]   = p_in;

  for (genvar t = 0; t < R; t++) begin : g_row
    logic [N-1:0] opnd;
    logic [N:0]   c;
    assign opnd = {row_res[t][N-2:0], w_in[t]};
    assign c[0] = p_row[t];
    for (genvar i = 0; i < N; i++) begin : g_cell
      cas_cell u_cas (
        .a (opnd[i]),
        .d (d[i]),
        .p (p_row[t]),
        .ci(c[i]),
        .s (row_res[t+1][i]),
        .co(c[i+1])
      );
    end
    assign q[t]         = c[N];
    assign p_row[t+1]   = c[N];
  end

  assign rem_out = row_res[R];

  logic unused_ok;
  assign unused_ok = ^{row_res[0][N-1], p_row[R]};
endmodule

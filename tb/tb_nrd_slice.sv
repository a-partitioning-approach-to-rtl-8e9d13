// tb_nrd_slice: self-checking test of the nonrestoring divider slice.
// A 6-by-6 array (11-bit dividend, 6-bit divisor) is built as one 6-row
// slice and as two chained 3-row slices. For every divisor 1..31 and many
// dividends below d*2^5 the quotient bits must equal w/d and the final
// remainder (two's complement) must equal w mod d, or w mod d - d.
module tb_nrd_slice;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic [2*N-2:0] w;
  logic [N-1:0]   d;

  // bottom bits entering row g: w[N-1-g]
  logic [N-1:0] wb;
  always_comb for (int g = 0; g < N; g++) wb[g] = w[N-1-g];

  logic [N-1:0] q_f, r_f;
  nrd_slice #(.N(N), .R(N)) dut_full (
    .rem_in(w[2*N-2:N]), .p_in(1'b1), .w_in(wb), .d(d), .q(q_f), .rem_out(r_f)
  );

  logic [2:0]   q_1, q_2;
  logic [N-1:0] r_1, r_2;
  nrd_slice #(.N(N), .R(3)) dut_s1 (
    .rem_in(w[2*N-2:N]), .p_in(1'b1), .w_in(wb[2:0]), .d(d), .q(q_1), .rem_out(r_1)
  );
  nrd_slice #(.N(N), .R(3)) dut_s2 (
    .rem_in(r_1[N-2:0]), .p_in(q_1[2]), .w_in(wb[5:3]), .d(d), .q(q_2), .rem_out(r_2)
  );

  function automatic logic [N-1:0] rev(input logic [N-1:0] v);
    for (int i = 0; i < N; i++) rev[N-1-i] = v[i];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dv = 1; dv < 32; dv++) begin
      for (int n = 0; n < 120; n++) begin
        int wv, qe, re, rgot;
        wv = (n == 0) ? dv * 32 - 1 : int'($urandom % (dv * 32));
        w = (2*N-1)'(wv);
        d = N'(dv);
        #1;
        qe = wv / dv;
        re = wv % dv;
        rgot = int'($signed(r_f));
        checks += 2;
        if (int'(rev(q_f)) != qe || !(rgot == re || rgot == re - dv)) begin
          failures++;
          if (failures < 10) $display("FAIL full %0d/%0d -> q=%0d r=%0d", wv, dv, rev(q_f), rgot);
        end
        rgot = int'($signed(r_2));
        if (int'(rev({q_2, q_1})) != qe || !(rgot == re || rgot == re - dv)) begin
          failures++;
          if (failures < 10) $display("FAIL 2-step %0d/%0d -> q=%0d r=%0d", wv, dv, rev({q_2, q_1}), rgot);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_csm_slice: self-checking test of the carry-save multiplier slice.
// A 6-bit array is built twice: once as one slice holding all six rows, and
// once as two chained 3-row slices (the two computation steps of the
// partitioned multiplier, the second fed with the first's sums and carries
// and with x_5*y_2). For all 4096 operand pairs both must give x*y: the low
// product bits from the rows, the high ones from the ripple row.
module tb_csm_slice;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic [N-1:0] x, y;

  logic [N-1:0][N-1:0] pp;
  always_comb for (int j = 0; j < N; j++) pp[j] = x & {N{y[j]}};

  // one slice with all rows
  logic [N-1:0] lo_f, hi_f;
  logic [N-2:1] s_f;
  logic [N-2:0] c_f;
  csm_slice #(.N(N), .R(N)) dut_full (
    .pp(pp), .pp_msb(1'b0), .s_in('0), .c_in('0),
    .p_lo(lo_f), .s_out(s_f), .c_out(c_f), .p_hi(hi_f)
  );

  // two steps of three rows
  logic [2:0]   lo_1, lo_2;
  logic [N-1:0] hi_1, hi_2;
  logic [N-2:1] s_1, s_2;
  logic [N-2:0] c_1, c_2;
  csm_slice #(.N(N), .R(3)) dut_s1 (
    .pp(pp[2:0]), .pp_msb(1'b0), .s_in('0), .c_in('0),
    .p_lo(lo_1), .s_out(s_1), .c_out(c_1), .p_hi(hi_1)
  );
  csm_slice #(.N(N), .R(3)) dut_s2 (
    .pp(pp[5:3]), .pp_msb(pp[2][N-1]), .s_in(s_1), .c_in(c_1),
    .p_lo(lo_2), .s_out(s_2), .c_out(c_2), .p_hi(hi_2)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4096; n++) begin
      logic [2*N-1:0] exp_p;
      {x, y} = 12'(n);
      #1;
      exp_p = (2*N)'(x) * (2*N)'(y);
      checks += 2;
      if ({hi_f, lo_f} !== exp_p) begin
        failures++;
        if (failures < 10) $display("FAIL full %0d*%0d -> %0d", x, y, {hi_f, lo_f});
      end
      if ({hi_2, lo_2, lo_1} !== exp_p) begin
        failures++;
        if (failures < 10) $display("FAIL 2-step %0d*%0d -> %0d", x, y, {hi_2, lo_2, lo_1});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

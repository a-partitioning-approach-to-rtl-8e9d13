// tb_sub_adder: self-checking test of the sub-adder in both forms, a 16-bit
// ripple-carry chain and a 16-bit chain of 4-bit lookahead blocks, against
// integer addition with random operands and corner cases (all ones, carry
// through the whole word).
module tb_sub_adder;
  import ftarith_pkg::*;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b, s_r, s_c;
  logic         ci, co_r, co_c;

  sub_adder #(.W(W), .KIND(ADD_RCA)) dut_rca (.a, .b, .ci, .s(s_r), .co(co_r));
  sub_adder #(.W(W), .KIND(ADD_CLA)) dut_cla (.a, .b, .ci, .s(s_c), .co(co_c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tci);
    logic [W:0] exp_v;
    a = ta; b = tb_; ci = tci;
    #1;
    exp_v = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tci);
    checks += 2;
    if ({co_r, s_r} !== exp_v) begin
      failures++;
      $display("FAIL rca %h+%h+%0d -> %h want %h", ta, tb_, tci, {co_r, s_r}, exp_v);
    end
    if ({co_c, s_c} !== exp_v) begin
      failures++;
      $display("FAIL cla %h+%h+%0d -> %h want %h", ta, tb_, tci, {co_c, s_c}, exp_v);
    end
  endtask

  initial begin
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b1);
    check_one('0, '0, 1'b0);
    check_one(16'h8000, 16'h8000, 1'b0);
    for (int n = 0; n < 3000; n++) check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

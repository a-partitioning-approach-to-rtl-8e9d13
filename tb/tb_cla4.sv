// tb_cla4: exhaustive self-checking test of the 4-bit carry-lookahead adder
// against integer addition (all 512 combinations of a, b and ci).
module tb_cla4;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s;
  logic       ci, co;

  cla4 dut (.a, .b, .ci, .s, .co);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 512; n++) begin
      int exp_v;
      {ci, a, b} = 9'(n);
      #1;
      exp_v = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} !== 5'(exp_v)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d", a, b, ci, {co, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

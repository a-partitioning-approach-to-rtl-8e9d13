// tb_ft_csm: self-checking test of the partitioned fault-tolerant carry-save
// array multiplier. Three instances run the same products: 32-bit with
// M = 4 (the default), 32-bit with M = 8, and 32-bit with M = 1 (triple
// modular redundancy). Every product is checked against x*y and done must
// come exactly M cycles after the start edge. In two thirds of the
// operations one replica has random bits of its outputs flipped, including
// the sums and carries it carries from step to step; the voters must still
// deliver the correct product.
module tb_ft_csm;
  import ftarith_pkg::*;
  localparam int N  = 32;
  localparam int NC = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start = 1'b0;
  logic [N-1:0] x = '0, y = '0;
  logic [2:0][191:0] flip_all = '0;

  logic [NC-1:0]          done_o, busy_o;
  logic [NC-1:0][2*N-1:0] prod_o;

  for (genvar g = 0; g < NC; g++) begin : g_dut
    localparam int MC = (g == 1) ? 8 : (g == 2) ? 1 : 4;
    localparam int FW = N + (N - 2) + (N - 1) + N / MC;
    logic [2:0][FW-1:0] fl;
    for (genvar r = 0; r < 3; r++) begin : g_fl
      assign fl[r] = flip_all[r][FW-1:0];
    end
    ft_csm #(.N(N), .M(MC)) dut (
      .clk, .rst_n, .start, .x, .y, .flip(fl),
      .busy(busy_o[g]), .done(done_o[g]), .prod(prod_o[g])
    );
  end

  localparam int MS [NC] = '{4, 8, 1};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_mul(input logic [N-1:0] tx, input logic [N-1:0] ty, input int faulty);
    logic [2*N-1:0] exp_p;
    int             seen [NC];
    exp_p = {32'b0, tx} * {32'b0, ty};
    @(negedge clk);
    x = tx; y = ty;
    flip_all = '0;
    if (faulty >= 0)
      for (int k = 0; k < 6; k++) flip_all[faulty][k*32 +: 32] = $urandom;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int g = 0; g < NC; g++) seen[g] = 0;
    for (int cyc = 1; cyc <= 9; cyc++) begin
      for (int g = 0; g < NC; g++) begin
        if (done_o[g]) begin
          checks += 2;
          seen[g]++;
          if (cyc != MS[g]) begin
            failures++;
            $display("FAIL inst %0d: done after %0d cycles, want %0d", g, cyc, MS[g]);
          end
          if (prod_o[g] !== exp_p) begin
            failures++;
            $display("FAIL inst %0d: %h*%h (faulty %0d) -> %h want %h",
                     g, tx, ty, faulty, prod_o[g], exp_p);
          end
        end
      end
      if (cyc < 9) @(negedge clk);
    end
    for (int g = 0; g < NC; g++) begin
      checks++;
      if (seen[g] != 1) begin
        failures++;
        $display("FAIL inst %0d: done seen %0d times", g, seen[g]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_mul('1, '1, -1);
    run_mul('1, '1, 0);
    run_mul(32'h8000_0001, 32'hFFFF_FFFF, 1);
    run_mul('0, 32'h1234_5678, 2);
    for (int n = 0; n < 300; n++)
      run_mul($urandom, $urandom, (n % 3 == 0) ? -1 : int'($urandom % 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

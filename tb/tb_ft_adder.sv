// tb_ft_adder: self-checking test of the partitioned fault-tolerant adder.
// Four 32-bit instances run the same additions side by side: M = 4 with
// ripple sub-adders (the default), M = 4 with lookahead sub-adders, M = 8,
// and M = 1 (plain triple modular redundancy). Each addition checks
// {cout, sum} against integer addition and checks that done comes exactly
// M cycles after the start edge. One third of the additions run fault-free;
// in the others one replica, chosen at random, has random bits of its
// outputs flipped in every step, which the voters must mask. Operands
// include long carry chains across slice boundaries.
module tb_ft_adder;
  import ftarith_pkg::*;
  localparam int N  = 32;
  localparam int NC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic         cin = 1'b0;
  logic [2:0][N:0] flip_all = '0;   // per replica, truncated per instance

  logic [NC-1:0]        done_o, busy_o;
  logic [NC-1:0][N-1:0] sum_o;
  logic [NC-1:0]        cout_o;

  for (genvar g = 0; g < NC; g++) begin : g_dut
    localparam int          MC = (g == 2) ? 8 : (g == 3) ? 1 : 4;
    localparam add_kind_e   KC = (g == 1) ? ADD_CLA : ADD_RCA;
    localparam int          RC = N / MC;
    logic [2:0][RC:0] fl;
    for (genvar r = 0; r < 3; r++) begin : g_fl
      assign fl[r] = flip_all[r][RC:0];
    end
    ft_adder #(.N(N), .M(MC), .KIND(KC)) dut (
      .clk, .rst_n, .start, .a, .b, .cin, .flip(fl),
      .busy(busy_o[g]), .done(done_o[g]), .sum(sum_o[g]), .cout(cout_o[g])
    );
  end

  localparam int MS [NC] = '{4, 4, 8, 1};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_add(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tci,
                         input int faulty);
    logic [N:0] exp_v;
    int         seen [NC];
    exp_v = {1'b0, ta} + {1'b0, tb_} + (N+1)'(tci);
    @(negedge clk);
    a = ta; b = tb_; cin = tci;
    flip_all = '0;
    if (faulty >= 0) flip_all[faulty] = {$urandom, $urandom};
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
          if ({cout_o[g], sum_o[g]} !== exp_v) begin
            failures++;
            $display("FAIL inst %0d: %h+%h+%0d (faulty %0d) -> %h want %h",
                     g, ta, tb_, tci, faulty, {cout_o[g], sum_o[g]}, exp_v);
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
    run_add('1, 32'h1, 1'b0, -1);          // carry through every slice
    run_add('1, '0, 1'b1, 0);
    run_add(32'h00FF_FF00, 32'h0000_0100, 1'b0, 1);
    run_add('1, '1, 1'b1, 2);
    for (int n = 0; n < 300; n++)
      run_add({$urandom}, {$urandom}, 1'($urandom), (n % 3 == 0) ? -1 : int'($urandom % 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

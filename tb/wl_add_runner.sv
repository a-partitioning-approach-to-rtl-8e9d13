// wl_add_runner: drives one ft_adder instance of a given size through NOPS
// random additions (two thirds of them with one replica made faulty) and
// counts checks and failures: {cout, sum} against integer addition and a
// latency of exactly M cycles. Used by tb_workloads to cover every word
// length and partition count of the adder cost evaluation.
module wl_add_runner
  import ftarith_pkg::*;
#(
  parameter int        N    = 32,
  parameter int        M    = 4,
  parameter add_kind_e KIND = ADD_RCA,
  parameter int        NOPS = 40
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int R = N / M;
  logic          start = 1'b0, busy, done, cin = 1'b0, cout;
  logic [N-1:0]  a = '0, b = '0, sum;
  logic [2:0][R:0] flip = '0;

  ft_adder #(.N(N), .M(M), .KIND(KIND)) dut (.*);

  function automatic logic [N-1:0] rnd();
    logic [127:0] v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return N'(v);
  endfunction

  initial begin
    logic [N:0] exp_v;
    int lat, faulty;
    checks = 0; failures = 0; finished = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    for (int n = 0; n < NOPS; n++) begin
      a = (n == 0) ? '1 : rnd();
      b = (n == 0) ? N'(1) : rnd();
      cin = 1'($urandom);
      faulty = (n % 3 == 0) ? -1 : int'($urandom % 3);
      flip = '0;
      if (faulty >= 0) for (int i = 0; i <= R; i++) flip[faulty][i] = 1'($urandom);
      exp_v = {1'b0, a} + {1'b0, b} + (N+1)'(cin);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      checks += 2;
      if (lat != M) begin
        failures++;
        $display("FAIL adder N=%0d M=%0d kind=%0d: latency %0d", N, M, KIND, lat);
      end
      if ({cout, sum} !== exp_v) begin
        failures++;
        $display("FAIL adder N=%0d M=%0d kind=%0d: %h+%h -> %h want %h", N, M, KIND, a, b, {cout, sum}, exp_v);
      end
      @(negedge clk);
    end
    finished = 1'b1;
  end
endmodule

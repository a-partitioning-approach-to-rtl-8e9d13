// wl_mul_runner: drives one ft_csm instance of a given size through NOPS
// random multiplications (two thirds of them with one replica made faulty)
// and counts checks and failures: the product against x*y and a latency of
// exactly M cycles. Used by tb_workloads.
module wl_mul_runner #(
  parameter int N    = 32,
  parameter int M    = 4,
  parameter int NOPS = 40
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int R  = N / M;
  localparam int FW = N + (N - 2) + (N - 1) + R;
  logic            start = 1'b0, busy, done;
  logic [N-1:0]    x = '0, y = '0;
  logic [2*N-1:0]  prod;
  logic [2:0][FW-1:0] flip = '0;

  ft_csm #(.N(N), .M(M)) dut (.*);

  function automatic logic [N-1:0] rnd();
    logic [127:0] v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return N'(v);
  endfunction

  initial begin
    logic [2*N-1:0] exp_p;
    int lat, faulty;
    checks = 0; failures = 0; finished = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    for (int n = 0; n < NOPS; n++) begin
      x = (n == 0) ? '1 : rnd();
      y = (n == 0) ? '1 : rnd();
      faulty = (n % 3 == 0) ? -1 : int'($urandom % 3);
      flip = '0;
      if (faulty >= 0) for (int i = 0; i < FW; i++) flip[faulty][i] = ($urandom % 4 == 0);
      exp_p = (2*N)'(x) * (2*N)'(y);
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
        $display("FAIL mult N=%0d M=%0d: latency %0d", N, M, lat);
      end
      if (prod !== exp_p) begin
        failures++;
        $display("FAIL mult N=%0d M=%0d: %h*%h -> %h want %h", N, M, x, y, prod, exp_p);
      end
      @(negedge clk);
    end
    finished = 1'b1;
  end
endmodule

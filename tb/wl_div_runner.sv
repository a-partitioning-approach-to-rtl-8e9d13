// wl_div_runner: drives one ft_nrd instance of a given size through NOPS
// random divisions (divisor top bit 0, dividend below d*2^(N-1); two thirds
// with one replica made faulty) and counts checks and failures: quotient
// w/d, remainder w mod d or (w mod d) - d modulo 2^N, latency of exactly M
// cycles. Used by tb_workloads.
module wl_div_runner #(
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
  localparam int R = N / M;
  logic            start = 1'b0, busy, done;
  logic [2*N-2:0]  w = '0;
  logic [N-1:0]    d = N'(1), quo, rem;
  logic [2:0][N+R-1:0] flip = '0;

  ft_nrd #(.N(N), .M(M)) dut (.*);

  initial begin
    logic [2*N-2:0] wide, lim, qe, re;
    int lat, faulty;
    checks = 0; failures = 0; finished = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    for (int n = 0; n < NOPS; n++) begin
      wide = (2*N-1)'({$urandom, $urandom, $urandom, $urandom});
      d = wide[N-1:0];
      d[N-1] = 1'b0;
      if (n % 2 == 1) d = d >> ($urandom % (N - 1));
      if (d == '0) d = N'(1);
      wide = (2*N-1)'({$urandom, $urandom, $urandom, $urandom});
      lim = (2*N-1)'(d) << (N - 1);
      w = (n == 0) ? lim - 1'b1 : wide % lim;
      qe = w / (2*N-1)'(d);
      re = w % (2*N-1)'(d);
      faulty = (n % 3 == 0) ? -1 : int'($urandom % 3);
      flip = '0;
      if (faulty >= 0) for (int i = 0; i < N + R; i++) flip[faulty][i] = 1'($urandom);
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
        $display("FAIL div N=%0d M=%0d: latency %0d", N, M, lat);
      end
      if (quo !== N'(qe) || !(rem === N'(re) || rem === N'(re) - d)) begin
        failures++;
        $display("FAIL div N=%0d M=%0d: %h/%h -> q=%h r=%h want q=%h r=%h", N, M, w, d, quo, rem, N'(qe), N'(re));
      end
      @(negedge clk);
    end
    finished = 1'b1;
  end
endmodule

// tb_ft_nrd: self-checking test of the partitioned fault-tolerant
// nonrestoring array divider. Three instances run the same divisions:
// 32-bit with M = 4 (the default), M = 8 and M = 1 (triple modular
// redundancy). Divisors are random 31-bit values (top bit zero), dividends
// random below d*2^31 so that the quotient fits. The quotient must equal w/d
// and the remainder w mod d or w mod d - d; done must come exactly M cycles
// after the start edge. In two thirds of the divisions one replica has random
// bits of its outputs flipped (including the remainder it carries from step
// to step); the voters must mask it.
module tb_ft_nrd;
  import ftarith_pkg::*;
  localparam int N  = 32;
  localparam int NC = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           start = 1'b0;
  logic [2*N-2:0] w = '0;
  logic [N-1:0]   d = '0;
  logic [2:0][63:0] flip_all = '0;

  logic [NC-1:0]        done_o, busy_o;
  logic [NC-1:0][N-1:0] quo_o, rem_o;

  for (genvar g = 0; g < NC; g++) begin : g_dut
    localparam int MC = (g == 1) ? 8 : (g == 2) ? 1 : 4;
    localparam int FW = N + N / MC;
    logic [2:0][FW-1:0] fl;
    for (genvar r = 0; r < 3; r++) begin : g_fl
      assign fl[r] = flip_all[r][FW-1:0];
    end
    ft_nrd #(.N(N), .M(MC)) dut (
      .clk, .rst_n, .start, .w, .d, .flip(fl),
      .busy(busy_o[g]), .done(done_o[g]), .quo(quo_o[g]), .rem(rem_o[g])
    );
  end

  localparam int MS [NC] = '{4, 8, 1};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_div(input logic [2*N-2:0] tw, input logic [N-1:0] td, input int faulty);
    longint qe, re, rg;
    int     seen [NC];
    qe = longint'(tw) / longint'(td);
    re = longint'(tw) % longint'(td);
    @(negedge clk);
    w = tw; d = td;
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
          rg = longint'($signed(rem_o[g]));
          if (longint'(quo_o[g]) != qe || !(rg == re || rg == re - longint'(td))) begin
            failures++;
            $display("FAIL inst %0d: %0d/%0d (faulty %0d) -> q=%0d r=%0d want q=%0d r=%0d",
                     g, tw, td, faulty, quo_o[g], rg, qe, re);
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

  function automatic logic [2*N-2:0] rand_dividend(input logic [N-1:0] td);
    logic [2*N-2:0] v;
    v = {$urandom, $urandom};
    return v % ({31'b0, td} << (N - 1));
  endfunction

  initial begin
    logic [N-1:0] td;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_div(63'd100, 32'd7, -1);
    run_div(({31'b0, 32'h7FFF_FFFF} << 31) - 1, 32'h7FFF_FFFF, 0);
    run_div(63'd5, 32'd1, 1);
    run_div(63'd0, 32'd3, 2);
    for (int n = 0; n < 300; n++) begin
      td = {1'b0, 31'($urandom)};
      if (n % 4 == 0) td = N'($urandom % 1000);
      if (td == 0) td = 1;
      run_div(rand_dividend(td), td, (n % 3 == 0) ? -1 : int'($urandom % 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ft_arith_top: end-to-end self-checking test of the three fault-tolerant
// units at their default size (32 bits, 4 partitions), running concurrently.
//
// Each unit is driven by its own process issuing operations back to back:
// the next start is raised in the cycle the previous result is flagged done.
// Every result is checked against integer arithmetic and every latency must
// be exactly M = 4 cycles. Operations cycle through fault-free runs and runs
// where one replica (0, 1 or 2) has random output bits flipped in every step.
// The test counts how often each mechanism of the design occurred and counts
// a failure for any that never did: a voted carry handed from one adder slice
// to the next, an error masked in each replica of each unit, a back-to-back
// start on each unit, all three units busy at once, a divider step boundary
// where the next step starts by adding the divisor back, and a negative
// final partial remainder from the divider.
module tb_ft_arith_top;
  import ftarith_pkg::*;
  localparam int N   = 32;
  localparam int M   = 4;
  localparam int R   = N / M;
  localparam int MFW = N + (N - 2) + (N - 1) + R;
  localparam int NOPS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                     add_start = 0, add_cin = 0, add_busy, add_done, add_cout;
  logic [N-1:0]             add_a = '0, add_b = '0, add_sum;
  logic [2:0][R:0]          add_flip = '0;
  logic                     mul_start = 0, mul_busy, mul_done;
  logic [N-1:0]             mul_x = '0, mul_y = '0;
  logic [2:0][MFW-1:0]      mul_flip = '0;
  logic [2*N-1:0]           mul_prod;
  logic                     div_start = 0, div_busy, div_done;
  logic [2*N-2:0]           div_w = '0;
  logic [N-1:0]             div_d = 1, div_quo, div_rem;
  logic [2:0][N+R-1:0]      div_flip = '0;

  ft_arith_top dut (.*);

  // mechanism counters
  int n_add_carry = 0, n_concurrent = 0, n_div_addback = 0, n_div_negrem = 0;
  int n_add_fault [3] = '{0, 0, 0};
  int n_mul_fault [3] = '{0, 0, 0};
  int n_div_fault [3] = '{0, 0, 0};
  int n_b2b [3] = '{0, 0, 0};

  initial begin
    repeat (NOPS * (M + 2) * 2 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    if (add_busy && mul_busy && div_busy) n_concurrent++;

  // Wait for done after the start edge; returns the latency in cycles.
  task automatic wait_done(ref logic dn, output int lat);
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (!dn && lat < 20);
  endtask

  task automatic check_lat(input string unit, input int lat);
    checks++;
    if (lat != M) begin
      failures++;
      $display("FAIL %s: latency %0d, want %0d", unit, lat, M);
    end
  endtask

  task automatic adder_proc();
    logic [N:0] exp_v;
    int lat, faulty;
    @(negedge clk);
    for (int n = 0; n < NOPS; n++) begin
      // Raise start now (idle, or the previous operation's done cycle);
      // the operands are read from just after the start edge.
      add_start = 1'b1;
      if (n > 0) n_b2b[0]++;
      @(posedge clk);
      #1;
      add_a = (n % 7 == 0) ? '1 : $urandom;
      add_b = (n % 7 == 0) ? N'(n) : $urandom;
      add_cin = 1'($urandom);
      faulty = (n % 4 == 3) ? -1 : n % 4;
      add_flip = '0;
      if (faulty >= 0) add_flip[faulty] = (R+1)'($urandom | 1);
      exp_v = {1'b0, add_a} + {1'b0, add_b} + (N+1)'(add_cin);
      for (int k = 0; k < M - 1; k++)
        if ((((N+1)'(add_a) & ((N+1)'(1) << ((k+1)*R)) - 1)
            + ((N+1)'(add_b) & ((N+1)'(1) << ((k+1)*R)) - 1) + (N+1)'(add_cin))
            >> ((k+1)*R) != 0) begin
          n_add_carry++;
          break;
        end
      @(negedge clk);
      add_start = 1'b0;
      lat = 1;
      while (!add_done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      check_lat("adder", lat);
      checks++;
      if ({add_cout, add_sum} !== exp_v) begin
        failures++;
        $display("FAIL adder %h+%h+%0d -> %h want %h", add_a, add_b, add_cin, {add_cout, add_sum}, exp_v);
      end else if (faulty >= 0) n_add_fault[faulty]++;
    end
  endtask

  task automatic mul_proc();
    logic [2*N-1:0] exp_p;
    int lat, faulty;
    @(negedge clk);
    for (int n = 0; n < NOPS; n++) begin
      mul_start = 1'b1;
      if (n > 0) n_b2b[1]++;
      @(posedge clk);
      #1;
      mul_x = $urandom;
      mul_y = (n % 5 == 0) ? '1 : $urandom;
      faulty = (n % 4 == 3) ? -1 : n % 4;
      mul_flip = '0;
      if (faulty >= 0)
        for (int k = 0; k < MFW; k++) mul_flip[faulty][k] = ($urandom % 8 == 0);
      exp_p = {32'b0, mul_x} * {32'b0, mul_y};
      @(negedge clk);
      mul_start = 1'b0;
      lat = 1;
      while (!mul_done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      check_lat("multiplier", lat);
      checks++;
      if (mul_prod !== exp_p) begin
        failures++;
        $display("FAIL mul %h*%h -> %h want %h", mul_x, mul_y, mul_prod, exp_p);
      end else if (faulty >= 0) n_mul_fault[faulty]++;
    end
  endtask

  task automatic div_proc();
    longint qe, re, rg;
    int lat, faulty;
    logic [N-1:0] td;
    @(negedge clk);
    for (int n = 0; n < NOPS; n++) begin
      div_start = 1'b1;
      if (n > 0) n_b2b[2]++;
      @(posedge clk);
      #1;
      td = (n % 3 == 0) ? N'($urandom % 5000 + 1) : {1'b0, 31'($urandom)};
      if (td == 0) td = 1;
      div_d = td;
      div_w = {$urandom, $urandom};
      div_w = div_w % ({31'b0, td} << (N - 1));
      faulty = (n % 4 == 3) ? -1 : n % 4;
      div_flip = '0;
      if (faulty >= 0) div_flip[faulty] = (N+R)'({$urandom, $urandom});
      qe = longint'(div_w) / longint'(td);
      re = longint'(div_w) % longint'(td);
      for (int k = 1; k < M; k++)
        if (qe[N-k*R] == 1'b0) begin
          n_div_addback++;
          break;
        end
      @(negedge clk);
      div_start = 1'b0;
      lat = 1;
      while (!div_done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      check_lat("divider", lat);
      checks++;
      rg = longint'($signed(div_rem));
      if (longint'(div_quo) != qe || !(rg == re || rg == re - longint'(td))) begin
        failures++;
        $display("FAIL div %0d/%0d -> q=%0d r=%0d want q=%0d r=%0d", div_w, td, div_quo, rg, qe, re);
      end else begin
        if (rg < 0) n_div_negrem++;
        if (faulty >= 0) n_div_fault[faulty]++;
      end
    end
  endtask

  task automatic need(input string what, input int cnt);
    checks++;
    $display("  %-28s %0d", what, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      adder_proc();
      mul_proc();
      div_proc();
    join
    $display("mechanism counts:");
    need("adder carry between slices", n_add_carry);
    for (int r = 0; r < 3; r++) begin
      need($sformatf("adder fault masked, rep %0d", r), n_add_fault[r]);
      need($sformatf("mult fault masked, rep %0d", r), n_mul_fault[r]);
      need($sformatf("div fault masked, rep %0d", r), n_div_fault[r]);
      need($sformatf("back-to-back start, unit %0d", r), n_b2b[r]);
    end
    need("all three units busy", n_concurrent);
    need("div add-back at step edge", n_div_addback);
    need("div negative remainder", n_div_negrem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

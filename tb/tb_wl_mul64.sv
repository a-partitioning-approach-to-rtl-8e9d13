// tb_wl_mul64: runs the 64-bit fault-tolerant multiplier with M = 4, 8
// (its best area-time partition count) and 32.
// Every runner checks each result against integer arithmetic, checks a
// latency of exactly M cycles and makes one replica faulty in two thirds of
// the operations.
module tb_wl_mul64;
  import ftarith_pkg::*;
  localparam int NI = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int            ck [NI];
  int            fl [NI];
  logic [NI-1:0] fin;

  wl_mul_runner #(.N(64), .M(4)) u0 (
    .clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  wl_mul_runner #(.N(64), .M(8)) u1 (
    .clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  wl_mul_runner #(.N(64), .M(32)) u2 (
    .clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&fin);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NI; i++) begin
      checks += ck[i];
      failures += fl[i];
      if (ck[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wl_div: runs the fault-tolerant nonrestoring divider over the
// evaluated range of sizes: N = 16 with M = 2, 4, 16; N = 32 with M = 2, 32;
// N = 64 with M = 8, 64.
// Every runner checks each result against integer arithmetic, checks a
// latency of exactly M cycles and makes one replica faulty in two thirds of
// the operations.
module tb_wl_div;
  import ftarith_pkg::*;
  localparam int NI = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int            ck [NI];
  int            fl [NI];
  logic [NI-1:0] fin;

  wl_div_runner #(.N(16), .M(2)) u0 (
    .clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  wl_div_runner #(.N(16), .M(4)) u1 (
    .clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  wl_div_runner #(.N(16), .M(16)) u2 (
    .clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  wl_div_runner #(.N(32), .M(2)) u3 (
    .clk, .rst_n, .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));
  wl_div_runner #(.N(32), .M(32)) u4 (
    .clk, .rst_n, .checks(ck[4]), .failures(fl[4]), .finished(fin[4]));
  wl_div_runner #(.N(64), .M(8)) u5 (
    .clk, .rst_n, .checks(ck[5]), .failures(fl[5]), .finished(fin[5]));
  wl_div_runner #(.N(64), .M(64)) u6 (
    .clk, .rst_n, .checks(ck[6]), .failures(fl[6]), .finished(fin[6]));

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

// tb_wl_adder: runs the fault-tolerant adder in every partitioned
// configuration of its cost evaluation: N = 16, 32 and 64 bits with
// M = 2, 4, 8 and 16, ripple-carry sub-adders throughout and 4-bit
// lookahead sub-adders wherever a slice holds at least 4 bits.
// Every runner checks each result against integer arithmetic, checks a
// latency of exactly M cycles and makes one replica faulty in two thirds of
// the operations.
module tb_wl_adder;
  import ftarith_pkg::*;
  localparam int NI = 21;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int            ck [NI];
  int            fl [NI];
  logic [NI-1:0] fin;

  wl_add_runner #(.N(16), .M(2), .KIND(ADD_RCA)) u0 (
    .clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  wl_add_runner #(.N(16), .M(2), .KIND(ADD_CLA)) u1 (
    .clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  wl_add_runner #(.N(16), .M(4), .KIND(ADD_RCA)) u2 (
    .clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  wl_add_runner #(.N(16), .M(4), .KIND(ADD_CLA)) u3 (
    .clk, .rst_n, .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));
  wl_add_runner #(.N(16), .M(8), .KIND(ADD_RCA)) u4 (
    .clk, .rst_n, .checks(ck[4]), .failures(fl[4]), .finished(fin[4]));
  wl_add_runner #(.N(16), .M(16), .KIND(ADD_RCA)) u5 (
    .clk, .rst_n, .checks(ck[5]), .failures(fl[5]), .finished(fin[5]));
  wl_add_runner #(.N(32), .M(2), .KIND(ADD_RCA)) u6 (
    .clk, .rst_n, .checks(ck[6]), .failures(fl[6]), .finished(fin[6]));
  wl_add_runner #(.N(32), .M(2), .KIND(ADD_CLA)) u7 (
    .clk, .rst_n, .checks(ck[7]), .failures(fl[7]), .finished(fin[7]));
  wl_add_runner #(.N(32), .M(4), .KIND(ADD_RCA)) u8 (
    .clk, .rst_n, .checks(ck[8]), .failures(fl[8]), .finished(fin[8]));
  wl_add_runner #(.N(32), .M(4), .KIND(ADD_CLA)) u9 (
    .clk, .rst_n, .checks(ck[9]), .failures(fl[9]), .finished(fin[9]));
  wl_add_runner #(.N(32), .M(8), .KIND(ADD_RCA)) u10 (
    .clk, .rst_n, .checks(ck[10]), .failures(fl[10]), .finished(fin[10]));
  wl_add_runner #(.N(32), .M(8), .KIND(ADD_CLA)) u11 (
    .clk, .rst_n, .checks(ck[11]), .failures(fl[11]), .finished(fin[11]));
  wl_add_runner #(.N(32), .M(16), .KIND(ADD_RCA)) u12 (
    .clk, .rst_n, .checks(ck[12]), .failures(fl[12]), .finished(fin[12]));
  wl_add_runner #(.N(64), .M(2), .KIND(ADD_RCA)) u13 (
    .clk, .rst_n, .checks(ck[13]), .failures(fl[13]), .finished(fin[13]));
  wl_add_runner #(.N(64), .M(2), .KIND(ADD_CLA)) u14 (
    .clk, .rst_n, .checks(ck[14]), .failures(fl[14]), .finished(fin[14]));
  wl_add_runner #(.N(64), .M(4), .KIND(ADD_RCA)) u15 (
    .clk, .rst_n, .checks(ck[15]), .failures(fl[15]), .finished(fin[15]));
  wl_add_runner #(.N(64), .M(4), .KIND(ADD_CLA)) u16 (
    .clk, .rst_n, .checks(ck[16]), .failures(fl[16]), .finished(fin[16]));
  wl_add_runner #(.N(64), .M(8), .KIND(ADD_RCA)) u17 (
    .clk, .rst_n, .checks(ck[17]), .failures(fl[17]), .finished(fin[17]));
  wl_add_runner #(.N(64), .M(8), .KIND(ADD_CLA)) u18 (
    .clk, .rst_n, .checks(ck[18]), .failures(fl[18]), .finished(fin[18]));
  wl_add_runner #(.N(64), .M(16), .KIND(ADD_RCA)) u19 (
    .clk, .rst_n, .checks(ck[19]), .failures(fl[19]), .finished(fin[19]));
  wl_add_runner #(.N(64), .M(16), .KIND(ADD_CLA)) u20 (
    .clk, .rst_n, .checks(ck[20]), .failures(fl[20]), .finished(fin[20]));

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

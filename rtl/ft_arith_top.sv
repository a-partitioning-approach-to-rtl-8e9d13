// ft_arith_top: the three partitioned fault-tolerant arithmetic units side by
// side: an N-bit adder (ft_adder), an N-by-N unsigned carry-save array
// multiplier (ft_csm) and an N-by-N nonrestoring array divider (ft_nrd). All
// three use the same scheme: the array is cut into M parts, three copies of
// one part compute the M parts in M steps, and majority voters correct any
// error confined to one copy. The units share clock and reset and are
// otherwise independent, each with its own start/busy/done handshake, its
// operands, results and fault-emulation mask (see the unit modules).
// Defaults N = 32, M = 4 are the word length and partition count the design
// finds best for the 32-bit adder and multiplier; ADD_KIND selects ripple or
// 4-bit lookahead sub-adders for the adder.
module ft_arith_top
  import ftarith_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned M        = 4,
  parameter add_kind_e   ADD_KIND = ADD_RCA,
  localparam int unsigned R       = N / M,
  localparam int unsigned MFW     = N + (N - 2) + (N - 1) + R
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // adder
  input  logic                      add_start,
  input  logic [N-1:0]              add_a,
  input  logic [N-1:0]              add_b,
  input  logic                      add_cin,
  input  logic [NREP-1:0][R:0]      add_flip,
  output logic                      add_busy,
  output logic                      add_done,
  output logic [N-1:0]              add_sum,
  output logic                      add_cout,
  // multiplier
  input  logic                      mul_start,
  input  logic [N-1:0]              mul_x,
  input  logic [N-1:0]              mul_y,
  input  logic [NREP-1:0][MFW-1:0]  mul_flip,
  output logic                      mul_busy,
  output logic                      mul_done,
  output logic [2*N-1:0]            mul_prod,
  // divider
  input  logic                      div_start,
  input  logic [2*N-2:0]            div_w,
  input  logic [N-1:0]              div_d,
  input  logic [NREP-1:0][N+R-1:0]  div_flip,
  output logic                      div_busy,
  output logic                      div_done,
  output logic [N-1:0]              div_quo,
  output logic [N-1:0]              div_rem
);
  ft_adder #(.N(N), .M(M), .KIND(ADD_KIND)) u_add (
    .clk, .rst_n, .start(add_start), .a(add_a), .b(add_b), .cin(add_cin),
    .flip(add_flip), .busy(add_busy), .done(add_done), .sum(add_sum), .cout(add_cout)
  );

  ft_csm #(.N(N), .M(M)) u_mul (
    .clk, .rst_n, .start(mul_start), .x(mul_x), .y(mul_y), .flip(mul_flip),
    .busy(mul_busy), .done(mul_done), .prod(mul_prod)
  );

  ft_nrd #(.N(N), .M(M)) u_div (
    .clk, .rst_n, .start(div_start), .w(div_w), .d(div_d), .flip(div_flip),
    .busy(div_busy), .done(div_done), .quo(div_quo), .rem(div_rem)
  );
endmodule

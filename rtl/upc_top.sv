// upc_top: unary positional arithmetic unit with binary conversion at both
// ends.
//
// Two operands enter either as binary numbers, turned into K-position unary
// positional (UP) form by two generators, or directly as UP streams
// (up_sel = 1), which may use any arrangement of ones and up to N ones per
// stream.  The multiplier / adder (upc_arith) combines them into a 2K
// position UP result, brought out as streams and, through a converter, as a
// binary number.  The binary result equals the exact product or sum unless
// overflow is set; it then equals the true result modulo N**(2K).
//
// The UP datapath follows the published design; the generators, converter,
// input select and the binary ports are this design's framing of it.
//
// Timing: as upc_arith.  Operands and op are sampled in the cycle where
// start is high and busy is low; done pulses once the result is final, and
// result_up / result_bin / overflow hold until the next start.
module upc_top
  import upc_pkg::*;
#(
  parameter int unsigned N  = DEFAULT_N,
  parameter int unsigned K  = DEFAULT_K,
  localparam int unsigned WN = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned WR = 2 * K * WN + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  upc_op_e               op,
  input  logic                  up_sel,      // 1: use a_up_in / b_up_in
  input  logic [K*WN-1:0]       a_bin,
  input  logic [K*WN-1:0]       b_bin,
  input  logic [K-1:0][N-1:0]   a_up_in,
  input  logic [K-1:0][N-1:0]   b_up_in,
  output logic                  busy,
  output logic                  done,
  output logic                  stall,
  output logic                  overflow,
  output logic [2*K-1:0][N-1:0] result_up,
  output logic [WR-1:0]         result_bin
);

  logic [K-1:0][N-1:0] a_gen, b_gen, a_up, b_up;

  upc_generator #(.N(N), .K(K)) u_gen_a (.bin(a_bin), .up(a_gen));
  upc_generator #(.N(N), .K(K)) u_gen_b (.bin(b_bin), .up(b_gen));

  assign a_up = up_sel ? a_up_in : a_gen;
  assign b_up = up_sel ? b_up_in : b_gen;

  upc_arith #(.N(N), .K(K)) u_arith (
    .clk, .rst_n, .start, .op, .a_up, .b_up,
    .busy, .done, .stall, .overflow, .result(result_up));

  upc_converter #(.N(N), .POS(2*K)) u_conv (.up(result_up), .bin(result_bin));

endmodule

// upc_mul_runner: testbench helper that drives one upc_arith instance of a
// given size (N, K) through NOPS multiplications and checks them.
//
// Operands are random unary positional numbers (random arrangements of
// 0..N ones per stream); the first operation uses the largest generated
// form (N-1 ones in every stream) for both operands.  Values are computed
// here with 128-bit arithmetic by counting ones, and the result must equal
// the exact product modulo N**(2K), with overflow flagged when the product
// reaches N**(2K).  The latency must be K*N*N steps plus one cycle per stall
// plus one.  "finished" rises when all operations are done; "checks",
// "failures", "stalls" and "min_latency" report the outcome.
module upc_mul_runner
  import upc_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 3,
  parameter int unsigned NOPS = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   min_latency
);
  localparam int unsigned P = 2 * K;

  logic start, busy, done, stall, overflow;
  upc_op_e op;
  logic [K-1:0][N-1:0] a_up, b_up;
  logic [P-1:0][N-1:0] result;

  upc_arith #(.N(N), .K(K)) dut (.*);

  function automatic logic [127:0] up_value(logic [K-1:0][N-1:0] v);
    logic [127:0] s = '0, w = 128'd1;
    for (int p = 0; p < K; p++) begin
      s += 128'($countones(v[p])) * w;
      w *= 128'(N);
    end
    return s;
  endfunction

  initial begin
    logic [K-1:0][N-1:0] a, b;
    logic [127:0] av, bv, full, lim, got, w;
    int edges, st;
    finished = 1'b0; checks = 0; failures = 0; stalls = 0; min_latency = 0;
    start = 1'b0; op = OP_MUL; a_up = '0; b_up = '0;
    lim = 128'd1;
    for (int p = 0; p < P; p++) lim *= 128'(N);
    @(posedge rst_n);
    for (int i = 0; i < NOPS; i++) begin
      for (int p = 0; p < K; p++) begin
        if (i == 0) begin
          a[p] = N'((1 << (N - 1)) - 1);
          b[p] = a[p];
        end else begin
          a[p] = '0; b[p] = '0;
          for (int t = 0; t < N; t++) begin
            a[p][t] = ($urandom_range(0, 1) == 1);
            b[p][t] = ($urandom_range(0, 1) == 1);
          end
        end
      end
      av = up_value(a); bv = up_value(b); full = av * bv;
      @(negedge clk);
      a_up = a; b_up = b; start = 1'b1;
      @(posedge clk);
      @(negedge clk);
      start = 1'b0;
      edges = 0; st = 0;
      while (!done) begin
        if (stall) st++;
        @(negedge clk);
        edges++;
      end
      stalls += st;
      got = '0; w = 128'd1;
      for (int p = 0; p < P; p++) begin
        got += 128'($countones(result[p])) * w;
        w *= 128'(N);
      end
      checks++;
      if (got != full % lim) begin
        failures++;
        $display("N=%0d K=%0d: got %0d expected %0d", N, K, got, full % lim);
      end
      checks++;
      if (overflow !== (full >= lim)) begin
        failures++;
        $display("N=%0d K=%0d: overflow %b wrong", N, K, overflow);
      end
      checks++;
      if (edges != int'(K * N * N) + st + 1) begin
        failures++;
        $display("N=%0d K=%0d: latency %0d, expected %0d + %0d + 1", N, K, edges, K * N * N, st);
      end
      if (i == 0 || edges < min_latency) min_latency = edges;
    end
    finished = 1'b1;
  end
endmodule

// tb_upc_arith: self-checking test of the unary positional multiplier /
// adder at N = 8, K = 3.
//
// Operands are random unary positional numbers whose streams hold 0..8 ones
// in random places (a full stream is legal and worth one unit of the next
// position).  Their values are worked out here by counting ones; the
// expected result is the exact product or sum modulo 8**6, and overflow is
// expected exactly when the true result reaches 8**6.  Each result stream
// must be a thermometer code of 0..7 ones.  The latency is checked against
// K*N*N (multiply) or 2N (add) operand steps plus one cycle per stall plus
// one.  The test also requires that carries, rippling carries (stall for two
// or more consecutive cycles) and overflow were all seen.
module tb_upc_arith;
  import upc_pkg::*;
  localparam int unsigned N = 8, K = 3, P = 2 * K;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, stall, overflow;
  upc_op_e op;
  logic [K-1:0][N-1:0] a_up, b_up;
  logic [P-1:0][N-1:0] result;
  int checks = 0, failures = 0;
  int n_mul = 0, n_add = 0, n_stall = 0, n_ripple = 0, n_ovf = 0;

  upc_arith #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint up_value(logic [K-1:0][N-1:0] v);
    longint s = 0;
    for (int p = 0; p < K; p++) s += longint'($countones(v[p])) * (longint'(N) ** p);
    return s;
  endfunction

  // random stream with c ones in random positions
  function automatic logic [N-1:0] rand_stream(int c);
    logic [N-1:0] s = '0;
    int placed = 0;
    while (placed < c) begin
      int i = $urandom_range(0, N - 1);
      if (!s[i]) begin s[i] = 1'b1; placed++; end
    end
    return s;
  endfunction

  task automatic run_op(upc_op_e o, logic [K-1:0][N-1:0] a, logic [K-1:0][N-1:0] b);
    longint av, bv, full, lim, got;
    int edges, stalls, run_len, ops;
    logic ok;
    av = up_value(a); bv = up_value(b);
    full = (o == OP_MUL) ? av * bv : av + bv;
    lim = longint'(N) ** P;
    ops = (o == OP_MUL) ? K * N * N : 2 * N;
    @(negedge clk);
    op = o; a_up = a; b_up = b; start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0; a_up = '0; b_up = '0;
    edges = 0; stalls = 0; run_len = 0;
    while (!done) begin
      if (stall) begin
        stalls++; run_len++;
        if (run_len == 2) n_ripple++;
      end else run_len = 0;
      @(negedge clk);
      edges++;
    end
    n_stall += stalls;
    // value and form of the result
    got = 0; ok = 1'b1;
    for (int p = 0; p < P; p++) begin
      int c = $countones(result[p]);
      got += longint'(c) * (longint'(N) ** p);
      if (result[p] !== N'((1 << c) - 1) || c >= N) ok = 1'b0;
    end
    checks++;
    if (got != full % lim || !ok) begin
      failures++;
      if (failures < 10) $display("%s a=%0d b=%0d got %0d expected %0d (form ok %b)",
                                  o.name(), av, bv, got, full % lim, ok);
    end
    checks++;
    if (overflow !== (full >= lim)) begin
      failures++;
      $display("overflow=%b for full result %0d", overflow, full);
    end
    if (overflow) n_ovf++;
    checks++;
    if (edges != ops + stalls + 1) begin
      failures++;
      if (failures < 10) $display("latency %0d, expected %0d + %0d stalls + 1", edges, ops, stalls);
    end
    if (o == OP_MUL) n_mul++; else n_add++;
  endtask

  initial begin
    logic [K-1:0][N-1:0] a, b;
    start = 0; op = OP_MUL; a_up = '0; b_up = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // worked example value 340 times 1, and all-ones operands (overflow)
    a = '0; a[2] = 8'b00011111; a[1] = 8'b00000011; a[0] = 8'b00001111;
    b = '0; b[0] = 8'b00100000;
    run_op(OP_MUL, a, b);
    run_op(OP_ADD, a, a);
    run_op(OP_MUL, '1, '1);
    run_op(OP_ADD, '1, '1);
    run_op(OP_MUL, '0, '1);
    for (int i = 0; i < 150; i++) begin
      for (int p = 0; p < K; p++) begin
        a[p] = rand_stream($urandom_range(0, N));
        b[p] = rand_stream($urandom_range(0, N));
      end
      run_op(($urandom_range(0, 2) == 0) ? OP_ADD : OP_MUL, a, b);
    end
    $display("mul=%0d add=%0d stall cycles=%0d ripples=%0d overflows=%0d",
             n_mul, n_add, n_stall, n_ripple, n_ovf);
    checks++;
    if (n_stall == 0 || n_ripple == 0 || n_ovf == 0 || n_add == 0 || n_mul == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

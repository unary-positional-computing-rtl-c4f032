// tb_upc_top: end-to-end test of the unary positional arithmetic unit at its
// default size (N = 8, K = 3: operands 0..511, results up to 18 bits).
//
// Binary operands go through the generators, the multiplier / adder and the
// converter; result_bin must equal the exact product or sum.  Directly
// supplied unary positional operands (any arrangement of ones, up to 8 per
// stream) are also run, including all-ones operands whose product exceeds
// 8**6 and must raise overflow with the result modulo 8**6.  The latency of
// every operation is checked (K*N*N or 2N steps, plus one cycle per stall,
// plus one).  Counted mechanisms, each required at least once: multiply,
// add, carry stall, rippling carry (two or more stall cycles in a row),
// multiplier with more than one non-zero position (multiplicand shifted),
// direct unary positional input, and overflow.
module tb_upc_top;
  import upc_pkg::*;
  localparam int unsigned N = DEFAULT_N, K = DEFAULT_K, WN = $clog2(N);
  localparam int unsigned P = 2 * K, WR = 2 * K * WN + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, up_sel, busy, done, stall, overflow;
  upc_op_e op;
  logic [K*WN-1:0]     a_bin, b_bin;
  logic [K-1:0][N-1:0] a_up_in, b_up_in;
  logic [P-1:0][N-1:0] result_up;
  logic [WR-1:0]       result_bin;
  int checks = 0, failures = 0;
  int n_mul = 0, n_add = 0, n_stall = 0, n_ripple = 0, n_ovf = 0, n_shift = 0, n_raw = 0;

  upc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  task automatic run_op(upc_op_e o, logic raw, longint av, longint bv,
                        logic [K-1:0][N-1:0] au, logic [K-1:0][N-1:0] bu);
    longint full, lim;
    int edges, stalls, run_len, ops;
    if (raw) begin av = up_value(au); bv = up_value(bu); end
    full = (o == OP_MUL) ? av * bv : av + bv;
    lim  = longint'(N) ** P;
    ops  = (o == OP_MUL) ? K * N * N : 2 * N;
    @(negedge clk);
    op = o; up_sel = raw; a_bin = (K*WN)'(av); b_bin = (K*WN)'(bv);
    a_up_in = au; b_up_in = bu; start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0; a_bin = '0; b_bin = '0; a_up_in = '0; b_up_in = '0;
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
    checks++;
    if (longint'(result_bin) != full % lim) begin
      failures++;
      if (failures < 10) $display("%s %0d, %0d: got %0d expected %0d", o.name(), av, bv,
                                  result_bin, full % lim);
    end
    checks++;
    if (overflow !== (full >= lim)) begin
      failures++;
      $display("overflow=%b for full result %0d", overflow, full);
    end
    checks++;
    if (edges != ops + stalls + 1) begin
      failures++;
      if (failures < 10) $display("latency %0d, expected %0d + %0d stalls + 1", edges, ops, stalls);
    end
    if (overflow) n_ovf++;
    if (raw) n_raw++;
    if (o == OP_MUL) begin
      n_mul++;
      if (bv >= longint'(N) && av != 0) n_shift++;
    end else n_add++;
  endtask

  initial begin
    logic [K-1:0][N-1:0] au, bu;
    start = 0; up_sel = 0; op = OP_MUL; a_bin = '0; b_bin = '0; a_up_in = '0; b_up_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // worked example value 340
    run_op(OP_MUL, 1'b0, 340, 3, '0, '0);
    run_op(OP_ADD, 1'b0, 340, 171, '0, '0);
    run_op(OP_MUL, 1'b0, 511, 511, '0, '0);
    run_op(OP_ADD, 1'b0, 511, 511, '0, '0);
    run_op(OP_MUL, 1'b0, 0, 0, '0, '0);
    // full streams everywhere: 584 * 584 does not fit in six positions
    run_op(OP_MUL, 1'b1, 0, 0, '1, '1);
    run_op(OP_ADD, 1'b1, 0, 0, '1, '1);
    for (int i = 0; i < 120; i++) begin
      if ($urandom_range(0, 3) == 0) begin
        for (int p = 0; p < K; p++) begin au[p] = N'($urandom); bu[p] = N'($urandom); end
        run_op(($urandom_range(0, 1) == 0) ? OP_ADD : OP_MUL, 1'b1, 0, 0, au, bu);
      end else begin
        run_op(($urandom_range(0, 2) == 0) ? OP_ADD : OP_MUL, 1'b0,
               longint'($urandom_range(0, 511)), longint'($urandom_range(0, 511)), '0, '0);
      end
    end
    $display("mul=%0d add=%0d stalls=%0d ripples=%0d shifted=%0d direct=%0d overflows=%0d",
             n_mul, n_add, n_stall, n_ripple, n_shift, n_raw, n_ovf);
    checks++;
    if (n_mul == 0 || n_add == 0 || n_stall == 0 || n_ripple == 0 || n_shift == 0 ||
        n_raw == 0 || n_ovf == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// upc_arith: two-input unary positional multiplier / adder.
//
// Operands are K-position unary positional numbers: K streams of N bits,
// stream p worth (number of ones) * N**p.  The result has 2K positions, each
// held by a carry unit (upc_carry_unit) as a thermometer code of 0..N-1 ones.
//
// Multiplication.  2K pairs of operand registers sit in front of 2K AND
// gates.  The "a" column holds the multiplicand, position p in register p;
// every "b" register holds the same multiplier position j.  AND gate p feeds
// carry unit p, which therefore collects a(p-j) * b(j) ones at weight N**p.
// To get the exact product of two N-bit streams each bit of one must meet
// each bit of the other once: the a registers rotate every step, the b
// registers every step but the last of each N-step round, so round r pairs
// bit s of a with bit s-r of b, and N rounds (N*N steps) cover all pairs.
// After N*N steps the whole multiplicand moves up one position and the next
// multiplier position is loaded into the b registers; K such passes give
// K*N*N steps.  Three counters sequence this: bit (mod N), rotation (mod N)
// and multiplier position (mod K).
//
// Addition.  The two operands' streams are not ANDed but sent one after the
// other: N steps of a(p) then N steps of b(p) into carry unit p (2N steps).
//
// Carries.  When a carry unit holds N ones it raises carry_out; the unit
// above takes the carry as an extra 1 and the full unit empties in the next
// clock.  While any carry_out is high "iterate" is low: counters, operand
// registers and all inputs to the carry units pause, so no product bit is
// lost.  Each pending carry therefore costs one stall cycle (a ripple over
// several positions costs one per position).  A carry out of the top
// position sets the sticky overflow flag and is dropped.
//
// Follows the published design: the operand register pairs, AND gates,
// carry units, carry chain, the pause on any carry, the three counters and
// their widths, shifting the multiplicand one position per multiplier
// position, and concatenation for addition.  This design's own choices: the
// start/busy/done handshake, a K-entry store that holds the multiplier
// positions still to be applied, the bit-rotation schedule (which register
// holds at the end of a round), the drain state that resolves carries left
// after the last step, and the overflow flag.
//
// Interface and timing: pulse start for one cycle while busy is low, with
// op, a_up and b_up valid in that cycle.  busy rises in the next cycle.
// done pulses for one cycle when the result is final; result, overflow stay
// valid until the next start.  Latency from the start edge to done high is
// OPS + STALLS + 1 clock edges, OPS = K*N*N (multiply) or 2N (add), STALLS
// the number of cycles with stall high.
module upc_arith
  import upc_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  parameter int unsigned K = DEFAULT_K
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  upc_op_e                  op,
  input  logic [K-1:0][N-1:0]      a_up,      // multiplicand / addend
  input  logic [K-1:0][N-1:0]      b_up,      // multiplier / addend
  output logic                     busy,
  output logic                     done,
  output logic                     stall,     // a carry is being resolved
  output logic                     overflow,  // carry out of position 2K-1
  output logic [2*K-1:0][N-1:0]    result
);

  localparam int unsigned P  = 2 * K;
  localparam int unsigned WN = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned WK = (K > 1) ? $clog2(K) : 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e  state;
  upc_op_e op_q;

  logic [P-1:0]  cout, cin, din, a_bit, b_bit;
  logic [P-1:0][N-1:0] a_q, b_q, a_ld, b_ld;
  logic [K-1:0][N-1:0] b_store;
  logic          any_carry, iterate, launch, step_pos, ops_end;
  logic          a_rot, b_rot, load_all;

  logic [WN-1:0] bit_cnt, rot_cnt;
  logic [WK-1:0] pos_cnt;
  logic          bit_last, rot_last, pos_last;
  logic [WN:0]   rot_limit;
  logic [WK:0]   pos_limit;

  // ---------------------------------------------------------------- control
  assign launch    = start && (state == S_IDLE);
  assign any_carry = |cout;
  assign iterate   = (state == S_RUN) && !any_carry;
  assign stall     = (state != S_IDLE) && any_carry;
  assign busy      = (state != S_IDLE);

  assign rot_limit = (op_q == OP_MUL) ? (WN+1)'(N) : (WN+1)'(2);
  assign pos_limit = (op_q == OP_MUL) ? (WK+1)'(K) : (WK+1)'(1);

  upc_counter #(.MOD(N)) u_bit_cnt (
    .clk, .rst_n, .clear(launch), .en(iterate), .limit((WN+1)'(N)),
    .count(bit_cnt), .last(bit_last));

  upc_counter #(.MOD(N)) u_rot_cnt (
    .clk, .rst_n, .clear(launch), .en(iterate && bit_last), .limit(rot_limit),
    .count(rot_cnt), .last(rot_last));

  upc_counter #(.MOD(K)) u_pos_cnt (
    .clk, .rst_n, .clear(launch), .en(iterate && bit_last && rot_last),
    .limit(pos_limit), .count(pos_cnt), .last(pos_last));

  assign ops_end  = iterate && bit_last && rot_last && pos_last;
  assign step_pos = iterate && bit_last && rot_last && !pos_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      op_q     <= OP_MUL;
      done     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      done <= 1'b0;
      if (launch) overflow <= 1'b0;
      else if (cout[P-1]) overflow <= 1'b1;
      unique case (state)
        S_IDLE:  if (start) begin
                   state <= S_RUN;
                   op_q  <= op;
                 end
        S_RUN:   if (ops_end) state <= S_DRAIN;
        S_DRAIN: if (!any_carry) begin
                   state <= S_IDLE;
                   done  <= 1'b1;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------- multiplier position store
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        b_store <= '0;
    else if (launch)   b_store <= b_up;
    else if (step_pos) b_store <= {{N{1'b0}}, b_store[K-1:1]};
  end

  // ------------------------------------------------------ operand registers
  assign load_all = launch || step_pos;
  assign a_rot    = iterate;
  assign b_rot    = iterate && ((op_q == OP_ADD) || !bit_last);

  always_comb begin
    for (int p = 0; p < P; p++) begin
      if (launch) begin
        a_ld[p] = (p < K) ? a_up[p] : '0;
        if (op == OP_MUL) b_ld[p] = b_up[0];
        else              b_ld[p] = (p < K) ? b_up[p] : '0;
      end else begin
        // next multiplier position: multiplicand moves up one position
        a_ld[p] = (p == 0) ? '0 : a_q[p-1];
        b_ld[p] = (K > 1) ? b_store[1] : '0;
      end
    end
  end

  for (genvar p = 0; p < P; p++) begin : g_pos
    upc_operand_reg #(.N(N)) u_a (
      .clk, .rst_n, .load(load_all), .load_data(a_ld[p]), .rotate(a_rot),
      .bit0(a_bit[p]), .q(a_q[p]));

    upc_operand_reg #(.N(N)) u_b (
      .clk, .rst_n, .load(load_all), .load_data(b_ld[p]), .rotate(b_rot),
      .bit0(b_bit[p]), .q(b_q[p]));

    // product bit, or the concatenated addend streams
    assign din[p] = (op_q == OP_MUL) ? (a_bit[p] & b_bit[p])
                                     : ((rot_cnt == '0) ? a_bit[p] : b_bit[p]);

    assign cin[p] = (p == 0) ? 1'b0 : cout[(p == 0) ? 0 : p-1];

    upc_carry_unit #(.N(N)) u_cu (
      .clk, .rst_n, .clear(launch), .iterate(iterate), .din(din[p]),
      .carry_in(cin[p]), .carry_out(cout[p]), .value(result[p]));
  end

  // The pause rule: a carry unit only accepts operand bits when no carry is
  // pending anywhere.
  a_no_input_during_carry: assert property (@(posedge clk) disable iff (!rst_n)
    any_carry |-> !iterate);

  // The position counter only changes during multiplication.
  a_pos_mul_only: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN && op_q == OP_ADD) |-> (pos_cnt == '0));

endmodule

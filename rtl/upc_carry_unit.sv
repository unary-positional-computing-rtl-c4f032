// upc_carry_unit: one result position of the unary positional datapath.
//
// An N-bit shift register stacks 1 bits: every cycle in which the unit is
// enabled a 1 enters bit 0 and the contents move one place towards bit N-1.
// The enable is (iterate AND din) OR carry_in, so result bits that are 1 are
// stacked and bits that are 0 are dropped, and a carry arriving from the
// position below is always taken.  When bit N-1 (the last bit) holds a 1 the
// register holds N ones, a full group worth one unit of the next position:
// carry_out is that last bit.  In the following clock the register
// parallel-loads {N-1 zeroes, carry_in}, i.e. it empties but keeps a carry
// that arrives from below in the same cycle.  While any carry_out is high the
// controller drops iterate, so every other position pauses.
//
// Taken from the published carry unit: the shift / parallel-load register,
// its inputs (iterate, the product or sum bit, carry in), the constant 1 at
// its data input, the carry taken from its last bit and the load of a carry
// in followed by N-1 zeroes.  That ones and carries enable the register and
// that a carry pauses all other positions is stated for it in words; the
// enable equation above is this design's reading of that.  The synchronous
// clear, the active-low reset and the shift direction are this design's
// choices.
//
// Timing: value and carry_out are registered state; carry_out is valid in
// the cycle after the N-th one was stacked.
module upc_carry_unit #(
  parameter int unsigned N = upc_pkg::DEFAULT_N
) (
  input  logic         clk,
  input  logic         rst_n,      // asynchronous, active low: empties the stack
  input  logic         clear,      // synchronous: empties the stack
  input  logic         iterate,    // no carry is pending anywhere: accept din
  input  logic         din,        // product or sum bit for this position
  input  logic         carry_in,   // carry_out of the position below
  output logic         carry_out,  // the stack is full
  output logic [N-1:0] value       // thermometer code, count = number of ones
);

  logic enable;

  assign enable    = (iterate & din) | carry_in;
  assign carry_out = value[N-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value <= '0;
    end else if (clear) begin
      value <= '0;
    end else if (carry_out) begin
      // load-zeroes: keep only a carry arriving from below
      value <= {{(N-1){1'b0}}, carry_in};
    end else if (enable) begin
      value <= {value[N-2:0], 1'b1};
    end
  end

endmodule

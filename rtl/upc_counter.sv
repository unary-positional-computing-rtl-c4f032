// upc_counter: modulo-MOD up counter used to sequence the arithmetic unit.
//
// Three of these are chained in the arithmetic unit: a bit counter (which
// bit of a stream is presented), a rotation counter (which relative rotation
// of the two operand streams is in use, or which operand when adding) and a
// position counter (which multiplier position is being applied).  Each has
// ceil(log2(MOD)) bits, matching the log2 n and log2 k counter widths of the
// published multiplier drawing.  The counter advances when "en" is high;
// "last" is high while it holds MOD-1, so en & last is the cycle in which it
// wraps to 0 and is the enable of the next counter of the chain.  "clear"
// returns it to 0 synchronously.  The run-time limit input lets one counter
// serve as an N-step counter for multiplication and a 2-step one for
// addition; it must lie in 1..MOD.
module upc_counter #(
  parameter int unsigned MOD = upc_pkg::DEFAULT_N,
  localparam int unsigned W  = (MOD > 1) ? $clog2(MOD) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W:0]   limit,      // wraps after limit-1 (1..MOD)
  output logic [W-1:0] count,
  output logic         last        // count == limit-1
);

  assign last = ({1'b0, count} == limit - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count <= '0;
    else if (clear)      count <= '0;
    else if (en) begin
      if (last)          count <= '0;
      else               count <= count + 1'b1;
    end
  end

endmodule

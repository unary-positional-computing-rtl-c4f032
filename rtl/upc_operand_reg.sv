// upc_operand_reg: N-bit rotate / parallel-load register for one position of
// an operand.
//
// The register feeds its bit 0 to the product AND gate (or straight to the
// carry unit when adding).  "rotate" moves every bit down one place and bit 0
// round to bit N-1, so over N rotations every bit of the stream is presented
// once.  "load" replaces the contents with load_data and has priority over
// rotate.  Because only the number of ones in a stream carries meaning, the
// rotation never changes the value held.
//
// Rotation direction, load priority and reset value are this design's
// choices; the register's role (shift / parallel load, one per operand
// position) follows the published multiplier drawing.
//
// Timing: one cycle per load or rotate; bit0 is registered.
module upc_operand_reg #(
  parameter int unsigned N = upc_pkg::DEFAULT_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,       // parallel load (wins over rotate)
  input  logic [N-1:0] load_data,
  input  logic         rotate,     // rotate by one bit
  output logic         bit0,       // bit presented this cycle
  output logic [N-1:0] q           // whole stream
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (load)   q <= load_data;
    else if (rotate) q <= {q[0], q[N-1:1]};
  end

  assign bit0 = q[0];

endmodule

// upc_pkg: shared defaults and types for the unary positional arithmetic unit.
//
// A unary positional (UP) number is K bit streams of N bits each.  Inside a
// stream only the number of 1s matters (its "count"); stream p is weighted by
// N**p.  The defaults N = 8 and K = 3 are the worked example used to present
// the representation (00011111 00000011 00001111 = 5*64 + 2*8 + 4 = 340).
// The operation encoding below is this design's own choice.
package upc_pkg;

  localparam int unsigned DEFAULT_N = 8;  // stream length, also the base
  localparam int unsigned DEFAULT_K = 3;  // positions per operand

  // Operation selected at start.
  typedef enum logic {
    OP_MUL = 1'b0,   // bit-pair products through an AND gate
    OP_ADD = 1'b1    // the two operands' streams fed one after the other
  } upc_op_e;

endpackage

// upc_converter: unary positional to binary conversion.
//
// Counts the ones of each of the POS input streams and adds the counts with
// weights N**p: bin = sum over p of popcount(stream p) * N**p.  A stream may
// hold anywhere from 0 to N ones (a full stream equals one unit of the next
// position), so the output has one bit more than POS base-N digits need.
// The circuit (popcounts and a weighted sum) is this design's choice: only
// the function of the conversion is given.  N must be a power of two, so the
// weights are shifts.
//
// Purely combinational, no clock.
module upc_converter #(
  parameter int unsigned N   = upc_pkg::DEFAULT_N,
  parameter int unsigned POS = upc_pkg::DEFAULT_K,
  localparam int unsigned WN = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned WB = POS * WN + 1
) (
  input  logic [POS-1:0][N-1:0] up,
  output logic [WB-1:0]         bin
);

  always_comb begin
    logic [WB-1:0] sum;
    logic [WN:0]   cnt;
    sum = '0;
    for (int p = 0; p < POS; p++) begin
      cnt = '0;
      for (int t = 0; t < N; t++) cnt = cnt + (WN+1)'(up[p][t]);
      sum = sum + (WB'(cnt) << (p * WN));
    end
    bin = sum;
  end

endmodule

// upc_generator: binary to unary positional conversion.
//
// The binary input is read as K base-N digits (N a power of two, so digit p
// is simply bits [p*log2(N) +: log2(N)]).  Digit p becomes stream p with as
// many ones as the digit's value: bit t of the stream is 1 when t < digit,
// a thermometer code.  Any arrangement of the ones would be an equally valid
// stream, since only their number counts; the thermometer form is this
// design's choice, as is the whole circuit: only the existence and cost of
// this conversion are given for the representation.  Generated streams hold
// 0..N-1 ones, so every value 0..N**K-1 has exactly one generated form.
//
// Purely combinational, no clock.
module upc_generator #(
  parameter int unsigned N  = upc_pkg::DEFAULT_N,
  parameter int unsigned K  = upc_pkg::DEFAULT_K,
  localparam int unsigned WN = (N > 1) ? $clog2(N) : 1
) (
  input  logic [K*WN-1:0]     bin,
  output logic [K-1:0][N-1:0] up
);

  always_comb begin
    for (int p = 0; p < K; p++) begin
      for (int t = 0; t < N; t++) begin
        up[p][t] = (WN'(t) < bin[p*WN +: WN]);
      end
    end
  end

endmodule

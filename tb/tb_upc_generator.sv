// tb_upc_generator: exhaustive test of binary to unary positional
// generation for N = 8, K = 3 (all 512 inputs).  Each stream must hold as
// many ones as its base-8 digit, packed at the low end (thermometer).
module tb_upc_generator;
  localparam int unsigned N = 8, K = 3;

  logic [K*3-1:0]     bin;
  logic [K-1:0][N-1:0] up;
  int checks = 0, failures = 0;

  upc_generator #(.N(N), .K(K)) dut (.*);

  initial begin
    for (int v = 0; v < N ** K; v++) begin
      bin = (K*3)'(v);
      #1;
      for (int p = 0; p < K; p++) begin
        int digit;
        logic [N-1:0] expect_s;
        digit = (v / (N ** p)) % N;
        expect_s = N'((1 << digit) - 1);
        checks++;
        if (up[p] !== expect_s) begin
          failures++;
          if (failures < 10) $display("v=%0d p=%0d got %b expected %b", v, p, up[p], expect_s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_upc_converter: test of unary positional to binary conversion for
// N = 8 and 6 positions.  Random streams with random arrangements of 0..8
// ones, plus the worked example 00011111 00000011 00001111 = 340 and the
// all-ones extreme, are compared with sum(ones in stream p) * 8**p.
module tb_upc_converter;
  localparam int unsigned N = 8, POS = 6, WB = POS * 3 + 1;

  logic [POS-1:0][N-1:0] up;
  logic [WB-1:0]         bin;
  int checks = 0, failures = 0;

  upc_converter #(.N(N), .POS(POS)) dut (.*);

  task automatic check();
    longint expect_v = 0;
    #1;
    for (int p = 0; p < POS; p++) expect_v += longint'($countones(up[p])) * (longint'(N) ** p);
    checks++;
    if (longint'(bin) != expect_v) begin
      failures++;
      if (failures < 10) $display("up=%h got %0d expected %0d", up, bin, expect_v);
    end
  endtask

  initial begin
    // worked example, most significant stream first: 5*64 + 2*8 + 4
    up = '0;
    up[2] = 8'b00011111; up[1] = 8'b00000011; up[0] = 8'b00001111;
    check();
    checks++;
    if (bin != 340) begin failures++; $display("example gave %0d", bin); end
    up = '1;
    check();
    for (int i = 0; i < 3000; i++) begin
      for (int p = 0; p < POS; p++) up[p] = N'($urandom);
      check();
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

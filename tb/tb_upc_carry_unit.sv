// tb_upc_carry_unit: self-checking test of one carry unit (N = 8).
//
// Drives random iterate, din, carry_in and occasional clears, and keeps a
// reference count of stacked ones: +1 when (iterate & din) | carry_in, and
// when the count has reached N (carry_out) the next count is just carry_in.
// Every cycle it checks that the register is the thermometer code of the
// reference count and that carry_out is high exactly when the count is N.
module tb_upc_carry_unit;
  localparam int unsigned N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, iterate, din, carry_in, carry_out;
  logic [N-1:0] value;
  int checks = 0, failures = 0, carries = 0, count_ref = 0;

  upc_carry_unit #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] thermo(int c);
    logic [N-1:0] v = '0;
    for (int i = 0; i < N; i++) v[i] = (i < c);
    return v;
  endfunction

  initial begin
    clear = 0; iterate = 0; din = 0; carry_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // check registered state
      checks++;
      if (value !== thermo(count_ref) || carry_out !== (count_ref == N)) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: value=%b carry_out=%b expected count %0d", cyc, value,
                   carry_out, count_ref);
      end
      clear    = ($urandom_range(0, 199) == 0);
      iterate  = $urandom_range(0, 3) != 0;
      din      = ($urandom_range(0, 1) == 1);
      carry_in = ($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (count_ref == N) carries++;
      if (clear)               count_ref = 0;
      else if (count_ref == N) count_ref = int'(carry_in);
      else if ((iterate && din) || carry_in) count_ref++;
    end
    checks++;
    if (carries < 10) begin
      failures++;
      $display("too few carries: %0d", carries);
    end
    $display("carry events: %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_upc_counter: self-checking test of the modulo counter (MOD = 8).
// Random enables and clears with the limit set to 8, then 2, then 5; a
// reference count wraps at limit-1 and "last" must be high exactly there.
module tb_upc_counter;
  localparam int unsigned MOD = 8;
  localparam int unsigned W   = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, en, last;
  logic [W:0]   limit;
  logic [W-1:0] count;
  int checks = 0, failures = 0, wraps = 0, ref_c = 0;

  upc_counter #(.MOD(MOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; en = 0; limit = 4'(MOD);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 3; phase++) begin
      @(negedge clk);           // new limit, counter cleared
      limit = (phase == 0) ? 4'd8 : (phase == 1) ? 4'd2 : 4'd5;
      en    = 1'b0;
      clear = 1'b1;
      @(posedge clk);
      ref_c = 0;
      for (int cyc = 0; cyc < 1000; cyc++) begin
        @(negedge clk);
        checks++;
        if (int'(count) != ref_c || last !== (ref_c == int'(limit) - 1)) begin
          failures++;
          if (failures < 10)
            $display("limit %0d: count=%0d last=%b expected %0d", limit, count, last, ref_c);
        end
        en    = $urandom_range(0, 3) != 0;
        clear = ($urandom_range(0, 99) == 0);
        @(posedge clk);
        if (clear) ref_c = 0;
        else if (en) begin
          if (ref_c == int'(limit) - 1) begin ref_c = 0; wraps++; end
          else ref_c++;
        end
      end
      clear = 1'b0;
    end
    checks++;
    if (wraps < 30) begin failures++; $display("too few wraps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

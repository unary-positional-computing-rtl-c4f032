// tb_upc_operand_reg: self-checking test of the rotate / parallel-load
// operand register (N = 8).  Random loads and rotations are applied and the
// register is compared every cycle with a reference copy that rotates bit 0
// round to bit N-1; bit0 must equal the reference's lowest bit.
module tb_upc_operand_reg;
  localparam int unsigned N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, rotate, bit0;
  logic [N-1:0] load_data, q, ref_q;
  int checks = 0, failures = 0;

  upc_operand_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; rotate = 0; load_data = '0; ref_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      checks++;
      if (q !== ref_q || bit0 !== ref_q[0]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: q=%b expected %b", cyc, q, ref_q);
      end
      load      = ($urandom_range(0, 7) == 0);
      rotate    = ($urandom_range(0, 1) == 1);
      load_data = N'($urandom);
      @(posedge clk);
      if (load)        ref_q = load_data;
      else if (rotate) ref_q = {ref_q[0], ref_q[N-1:1]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

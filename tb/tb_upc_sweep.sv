// tb_upc_sweep: two-input multiplication across the sizes of the
// time-area comparison, n = 2, 4, 8, 16 (stream length, powers of two
// only) and k = 2, 4, 6, 8 positions: sixteen multiplier instances run
// side by side, each checked for exact products, overflow and a latency of
// k*n*n steps plus one cycle per carry stall plus one.  It prints the
// latency of each size.
module tb_upc_sweep;
  localparam int NS [4] = '{2, 4, 8, 16};
  localparam int KS [4] = '{2, 4, 6, 8};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] fin;
  int ch [16], fl [16], st [16], lat [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < 4; i++) begin : g_n
    for (genvar j = 0; j < 4; j++) begin : g_k
      upc_mul_runner #(.N(NS[i]), .K(KS[j]), .NOPS(3)) u_run (
        .clk, .rst_n, .finished(fin[i*4+j]), .checks(ch[i*4+j]),
        .failures(fl[i*4+j]), .stalls(st[i*4+j]), .min_latency(lat[i*4+j]));
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&fin);
    for (int i = 0; i < 16; i++) begin
      $display("n=%0d k=%0d: shortest latency %0d cycles (k*n*n = %0d), %0d stall cycles in 3 products",
               NS[i/4], KS[i%4], lat[i], KS[i%4] * NS[i/4] * NS[i/4], st[i]);
      checks += ch[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

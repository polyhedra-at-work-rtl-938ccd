// tb_sm_table1: runs every configuration of the results table of the two
// engines: full engine at orders 3, 7 and 13 (latency 8 + 2N = 14, 22 and
// 34 cycles) and optimised engine at orders 10 and 16 (latency 4 cycles),
// each on a random problem checked element by element. It also runs the
// smaller problems zero-padded in the default-size engines (order 3 and 7
// in the order-13 full engine, order 10 in the order-16 optimised engine),
// where the latency is that of the engine's own order.
module tb_sm_table1;
  localparam int NR = 8;

  logic clk = 0, rst_n = 0, go = 0;
  logic fin [NR];
  int   c [NR], f [NR];

  always #5 clk = ~clk;

  tb_full_runner #(.N(3),  .K(3),  .LAT(14)) r0 (.clk, .rst_n, .go, .fin(fin[0]), .checks(c[0]), .failures(f[0]));
  tb_full_runner #(.N(7),  .K(7),  .LAT(22)) r1 (.clk, .rst_n, .go, .fin(fin[1]), .checks(c[1]), .failures(f[1]));
  tb_full_runner #(.N(13), .K(13), .LAT(34)) r2 (.clk, .rst_n, .go, .fin(fin[2]), .checks(c[2]), .failures(f[2]));
  tb_full_runner #(.N(13), .K(3),  .LAT(34)) r3 (.clk, .rst_n, .go, .fin(fin[3]), .checks(c[3]), .failures(f[3]));
  tb_full_runner #(.N(13), .K(7),  .LAT(34)) r4 (.clk, .rst_n, .go, .fin(fin[4]), .checks(c[4]), .failures(f[4]));
  tb_opt_runner  #(.N(10), .K(10), .LAT(4))  r5 (.clk, .rst_n, .go, .fin(fin[5]), .checks(c[5]), .failures(f[5]));
  tb_opt_runner  #(.N(16), .K(16), .LAT(4))  r6 (.clk, .rst_n, .go, .fin(fin[6]), .checks(c[6]), .failures(f[6]));
  tb_opt_runner  #(.N(16), .K(10), .LAT(4))  r7 (.clk, .rst_n, .go, .fin(fin[7]), .checks(c[7]), .failures(f[7]));

  int checks, failures;

  initial begin
    repeat (3000) @(posedge clk);
    checks = 0; failures = 1;
    for (int k = 0; k < NR; k++) begin checks += c[k]; failures += f[k]; end
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    go = 1;
    for (int k = 0; k < NR; k++) wait (fin[k]);
    checks = 0; failures = 0;
    for (int k = 0; k < NR; k++) begin checks += c[k]; failures += f[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_opt_runner: testbench helper. Owns one optimised engine of order N;
// when go rises it loads a random matrix whose leading K x K block is
// non-zero, applies two switch updates between nodes inside that block,
// compares the stored matrix with a model computed here after each, and
// checks that done follows the start edge by LAT edges.
module tb_opt_runner #(
  parameter int N   = 10,
  parameter int K   = 10,
  parameter int LAT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int W  = 32;
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  typedef logic signed [W-1:0] word_t;

  logic ld_en = 0, start = 0, busy, done;
  logic [IW-1:0] ld_row = 0, idx_i = 0, idx_j = 0;
  word_t ld_data [N], u_i, u_j, v_i, v_j, sigma, ainv [N][N];
  int cyc = 0;

  sm_opt #(.N(N), .W(W), .FRAC(0)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL N=%0d K=%0d %s", N, K, what);
    end
  endtask

  initial begin
    word_t m [N][N], l [N], r [N];
    int t0;
    fin = 0; checks = 0; failures = 0;
    u_i = 0; u_j = 0; v_i = -1; v_j = 1; sigma = 1;
    for (int q = 0; q < N; q++) ld_data[q] = 0;
    wait (go && rst_n);
    @(negedge clk);
    for (int p = 0; p < N; p++) begin
      for (int q = 0; q < N; q++) begin
        m[p][q] = (p < K && q < K) ? word_t'($signed($urandom_range(0, 2000)) - 1000) : '0;
        ld_data[q] = m[p][q];
      end
      ld_en = 1;
      ld_row = IW'(p);
      @(negedge clk);
    end
    ld_en = 0;
    for (int k = 0; k < 2; k++) begin
      int ii, jj;
      ii = $urandom_range(0, K - 1);
      jj = (ii + 1 + $urandom_range(0, K - 2)) % K;
      idx_i = IW'(ii); idx_j = IW'(jj);
      u_i = word_t'($signed($urandom_range(0, 20)) - 10);
      u_j = -word_t'($signed($urandom_range(0, 20)) - 10);
      for (int p = 0; p < N; p++) begin
        l[p] = u_i * m[p][ii] + u_j * m[p][jj];
        r[p] = v_i * m[ii][p] + v_j * m[jj][p];
      end
      for (int p = 0; p < N; p++)
        for (int q = 0; q < N; q++) m[p][q] -= sigma * l[p] * r[q];
      start = 1;
      @(negedge clk);
      t0 = cyc;
      start = 0;
      while (!done && cyc - t0 < 20) @(negedge clk);
      chk(cyc - t0 == LAT, $sformatf("latency %0d expected %0d", cyc - t0, LAT));
      for (int p = 0; p < N; p++)
        for (int q = 0; q < N; q++)
          chk(ainv[p][q] == m[p][q], $sformatf("A[%0d][%0d] update %0d", p, q, k));
      $display("optimised engine N=%0d problem K=%0d: latency %0d cycles", N, K, cyc - t0);
    end
    fin = 1;
  end
endmodule

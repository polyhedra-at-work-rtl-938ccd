// tb_full_runner: testbench helper. Owns one full engine of order N and,
// when go rises, runs one update of a random problem of order K <= N (the
// rest of B, u and v zero), checks every streamed element against a model
// computed here, checks that the padding stays zero and that done follows
// the start edge by LAT edges. Reports its check and failure counts.
module tb_full_runner #(
  parameter int N   = 3,
  parameter int K   = 3,
  parameter int LAT = 14
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

  logic start = 0, busy, done, col_valid;
  logic [IW-1:0] col_idx;
  word_t b [N][N], u [N], v [N], sigma, col [N], d;
  int cyc = 0;

  sm_full #(.N(N), .W(W), .FRAC(0)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL N=%0d K=%0d %s", N, K, what);
    end
  endtask

  initial begin
    word_t r [N], l [N], ed;
    int t0, ncol;
    fin = 0; checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++)
        b[i][j] = (i < K && j < K) ? word_t'($signed($urandom_range(0, 2000)) - 1000) : '0;
      u[i] = (i < K) ? word_t'($signed($urandom_range(0, 2000)) - 1000) : '0;
      v[i] = (i < K) ? word_t'($signed($urandom_range(0, 2000)) - 1000) : '0;
    end
    sigma = 1;
    for (int i = 0; i < K; i++) begin
      r[i] = 0; l[i] = 0;
      for (int j = 0; j < K; j++) begin
        r[i] += b[i][j] * u[j];
        l[i] += b[j][i] * v[j];
      end
    end
    ed = 0;
    for (int j = 0; j < K; j++) ed += l[j] * u[j];
    wait (go && rst_n);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    t0 = cyc;
    start = 0;
    ncol = 0;
    while (!done && cyc - t0 < 4 * N + 40) begin
      if (col_valid) begin
        for (int p = 0; p < N; p++) begin
          word_t e;
          e = (p < K && ncol < K) ? b[p][ncol] - r[p] * l[ncol] : '0;
          chk(col[p] == e, $sformatf("newB[%0d][%0d]", p, ncol));
        end
        ncol++;
      end
      @(negedge clk);
    end
    chk(cyc - t0 == LAT, $sformatf("latency %0d expected %0d", cyc - t0, LAT));
    chk(ncol == N, "column count");
    chk(d == ed, "d");
    $display("full engine N=%0d problem K=%0d: latency %0d cycles", N, K, cyc - t0);
    fin = 1;
  end
endmodule

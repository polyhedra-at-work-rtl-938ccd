// tb_sm_full: end-to-end test of the full Sherman-Morrison engine at a
// small order. Each operation draws a random B, u, v and sigma, streams
// newB out and compares every column with
//   newB = B - sigma * (B u)(B^T v)^T,   d = (B^T v) . u
// computed here, checks that the columns come out in order in N
// consecutive cycles and that done follows the start edge by 8 + 2N edges.
// Operations run both with gaps and back to back (start in the done cycle).
// Runs at integer data (FRAC = 0) and with 12 fraction bits.
module tb_sm_full;
  localparam int N  = 5;
  localparam int W  = 32;
  localparam int IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] fx(input logic signed [W-1:0] a, b, input int frac);
    logic signed [2*W-1:0] p;
    p = (2*W)'(a) * (2*W)'(b);
    p = p >>> frac;
    return p[W-1:0];
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic start;
  logic signed [W-1:0] b [N][N];
  logic signed [W-1:0] u [N], v [N];
  logic signed [W-1:0] sigma;
  logic busy0, done0, cv0, busy1, done1, cv1;
  logic [IW-1:0] ci0, ci1;
  logic signed [W-1:0] col0 [N], col1 [N];
  logic signed [W-1:0] d0, d1;

  sm_full #(.N(N), .W(W), .FRAC(0)) dut0 (
    .clk, .rst_n, .start, .b, .u, .v, .sigma, .busy(busy0), .done(done0),
    .col_valid(cv0), .col_idx(ci0), .col(col0), .d(d0));
  sm_full #(.N(N), .W(W), .FRAC(12)) dut1 (
    .clk, .rst_n, .start, .b, .u, .v, .sigma, .busy(busy1), .done(done1),
    .col_valid(cv1), .col_idx(ci1), .col(col1), .d(d1));

  task automatic run_op(input int frac_sel, input logic unit_sigma, input logic back_to_back);
    logic signed [W-1:0] r [N], l [N], exp_d, one;
    int frac, t0, ncol;
    frac = frac_sel ? 12 : 0;
    one  = 32'sd1 <<< frac;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) b[i][j] = W'($signed($urandom_range(0, 4000)) - 2000);
      u[i] = W'($signed($urandom_range(0, 4000)) - 2000);
      v[i] = W'($signed($urandom_range(0, 4000)) - 2000);
    end
    sigma = unit_sigma ? one : W'($signed($urandom_range(0, 4000)) - 2000);
    for (int i = 0; i < N; i++) begin
      r[i] = 0; l[i] = 0;
      for (int j = 0; j < N; j++) begin
        r[i] += fx(b[i][j], u[j], frac);
        l[i] += fx(b[j][i], v[j], frac);
      end
    end
    exp_d = 0;
    for (int j = 0; j < N; j++) exp_d += fx(l[j], u[j], frac);
    if (!back_to_back) repeat ($urandom_range(1, 3)) @(negedge clk);
    start = 1;
    @(negedge clk);
    t0 = cyc;          // edges counted up to and including the start edge
    start = 0;
    ncol = 0;
    while (1) begin
      logic cv, dn;
      logic [IW-1:0] cix;
      cv  = frac_sel ? cv1 : cv0;
      dn  = frac_sel ? done1 : done0;
      cix = frac_sel ? ci1 : ci0;
      if (cv) begin
        chk(int'(cix) == ncol, $sformatf("column order %0d", ncol));
        for (int p = 0; p < N; p++) begin
          logic signed [W-1:0] e, g;
          e = b[p][ncol] - fx(sigma, fx(r[p], l[ncol], frac), frac);
          g = frac_sel ? col1[p] : col0[p];
          chk(g == e, $sformatf("newB[%0d][%0d] got %0d exp %0d frac=%0d", p, ncol, g, e, frac));
        end
        ncol++;
      end
      if (dn) begin
        chk(cyc - t0 == 2 * N + 8, $sformatf("latency %0d", cyc - t0));
        chk(ncol == N, "all columns streamed");
        chk((frac_sel ? d1 : d0) == exp_d, "d = l.u");
        break;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    start = 0;
    sigma = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) run_op(k % 2, k < 4, k == 5 || k == 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sm_opt: tests the optimised switch-update engine at a small order.
// It loads a random inverse matrix row by row, then applies a chain of
// updates with random node pairs (i, j), coefficients and sigma, including
// the switch form u_i = d_i, u_j = -d_j, v_i = -1, v_j = +1 and i = j.
// After each update the whole stored matrix is compared with
//   M - sigma * (u_i M[:,i] + u_j M[:,j]) (v_i M[i,:] + v_j M[j,:])
// computed here, and done must follow the start edge by 4 edges. The
// inputs are scrambled right after start to show they are sampled once.
module tb_sm_opt;
  localparam int N  = 6;
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

  function automatic logic signed [W-1:0] fx(input logic signed [W-1:0] a, b);
    logic signed [2*W-1:0] p;
    p = (2*W)'(a) * (2*W)'(b);
    return p[W-1:0];
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic ld_en, start, busy, done;
  logic [IW-1:0] ld_row, idx_i, idx_j;
  logic signed [W-1:0] ld_data [N];
  logic signed [W-1:0] u_i, u_j, v_i, v_j, sigma;
  logic signed [W-1:0] ainv [N][N];
  logic signed [W-1:0] m [N][N];

  sm_opt #(.N(N), .W(W), .FRAC(0)) dut (.*);

  task automatic compare(input string what);
    for (int p = 0; p < N; p++)
      for (int q = 0; q < N; q++)
        chk(ainv[p][q] == m[p][q], $sformatf("%s A[%0d][%0d] got %0d exp %0d", what, p, q, ainv[p][q], m[p][q]));
  endtask

  initial begin
    logic signed [W-1:0] l [N], r [N];
    int t0, ii, jj;
    ld_en = 0; start = 0; ld_row = 0; idx_i = 0; idx_j = 0;
    u_i = 0; u_j = 0; v_i = 0; v_j = 0; sigma = 0;
    for (int q = 0; q < N; q++) ld_data[q] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // row-wise load
    for (int p = 0; p < N; p++) begin
      for (int q = 0; q < N; q++) begin
        m[p][q] = W'($signed($urandom_range(0, 200)) - 100);
        ld_data[q] = m[p][q];
      end
      ld_row = IW'(p);
      ld_en = 1;
      @(negedge clk);
    end
    ld_en = 0;
    compare("load");
    for (int k = 0; k < 12; k++) begin
      ii = $urandom_range(0, N - 1);
      jj = (k == 3) ? ii : $urandom_range(0, N - 1);
      if (k % 2 == 0) begin      // switch form
        u_i = W'($signed($urandom_range(0, 20)) - 10);
        u_j = -W'($signed($urandom_range(0, 20)) - 10);
        v_i = -32'sd1;
        v_j = 32'sd1;
      end else begin
        u_i = W'($signed($urandom_range(0, 20)) - 10);
        u_j = W'($signed($urandom_range(0, 20)) - 10);
        v_i = W'($signed($urandom_range(0, 20)) - 10);
        v_j = W'($signed($urandom_range(0, 20)) - 10);
      end
      sigma = (k < 4) ? 32'sd1 : W'($signed($urandom_range(0, 6)) - 3);
      for (int p = 0; p < N; p++) begin
        l[p] = fx(u_i, m[p][ii]) + fx(u_j, m[p][jj]);
        r[p] = fx(v_i, m[ii][p]) + fx(v_j, m[jj][p]);
      end
      for (int p = 0; p < N; p++)
        for (int q = 0; q < N; q++)
          m[p][q] -= fx(fx(sigma, l[p]), r[q]);
      idx_i = IW'(ii);
      idx_j = IW'(jj);
      start = 1;
      @(negedge clk);
      t0 = cyc;
      start = 0;
      u_i = 32'sd55; u_j = 32'sd7; v_i = 32'sd3; v_j = 32'sd9; sigma = 32'sd99;
      idx_i = IW'(N - 1 - ii); idx_j = IW'(N - 1 - jj);
      while (!done) begin
        chk(busy, "busy during update");
        if (cyc - t0 > 10) break;
        @(negedge clk);
      end
      chk(cyc - t0 == 4, $sformatf("latency %0d", cyc - t0));
      compare($sformatf("update %0d", k));
      @(negedge clk);
      chk(!busy, "idle after done");
      compare("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

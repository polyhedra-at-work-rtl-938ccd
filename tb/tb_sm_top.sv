// tb_sm_top: end-to-end test of both engines through the top level.
//
// Two instances at order 6: one with integer data, one with 16 fraction
// bits.
//  1. Integer instance: random B is loaded into the optimised engine and
//     the same B, with u and v zero outside two positions, is given to the
//     full engine. Both results are compared with a model computed here
//     and with each other; the optimised engine's matrix is then updated
//     again without reloading (successive updates). sigma = 1 and sigma
//     != 1 are both used, and full-engine operations run back to back.
//  2. Fixed-point instance, the use the engines are meant for: a nodal
//     admittance matrix A with a switch between two nodes. A^-1 is
//     computed here in floating point and loaded. For each switch change
//     the full engine computes d = v^T A^-1 u; sigma = 1/(1 + d) is then
//     formed here (the role of a sigma table) and the optimised engine
//     updates its stored inverse, which must match the true inverse of the
//     modified A within a small tolerance. Switches are toggled on and off
//     several times in a row.
// Every mechanism is counted and a mechanism that never happened is a
// failure. Latencies (8 + 2N and 4) are checked on every operation.
module tb_sm_top;
  localparam int N  = 6;
  localparam int W  = 32;
  localparam int IW = $clog2(N);
  localparam int FR = 16;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic signed [W-1:0] fx(input logic signed [W-1:0] a, b, input int frac);
    logic signed [2*W-1:0] p;
    p = (2*W)'(a) * (2*W)'(b);
    p = p >>> frac;
    return p[W-1:0];
  endfunction

  // ---------------------------------------------------------------- ports
  typedef logic signed [W-1:0] word_t;
  typedef struct {
    logic  full_start;
    word_t full_b [N][N];
    word_t full_u [N];
    word_t full_v [N];
    word_t full_sigma;
    logic  opt_ld_en;
    logic [IW-1:0] opt_ld_row;
    word_t opt_ld_data [N];
    logic  opt_start;
    logic [IW-1:0] opt_idx_i, opt_idx_j;
    word_t opt_u_i, opt_u_j, opt_v_i, opt_v_j, opt_sigma;
  } drive_t;

  drive_t di, dx;   // integer instance, fixed-point instance
  logic  i_full_busy, i_full_done, i_full_cv, i_opt_busy, i_opt_done;
  logic [IW-1:0] i_full_ci;
  word_t i_full_col [N], i_full_d, i_ainv [N][N];
  logic  x_full_busy, x_full_done, x_full_cv, x_opt_busy, x_opt_done;
  logic [IW-1:0] x_full_ci;
  word_t x_full_col [N], x_full_d, x_ainv [N][N];

  sm_top #(.N_FULL(N), .N_OPT(N), .W(W), .FRAC(0)) dut_int (
    .clk, .rst_n,
    .full_start(di.full_start), .full_b(di.full_b), .full_u(di.full_u), .full_v(di.full_v),
    .full_sigma(di.full_sigma), .full_busy(i_full_busy), .full_done(i_full_done),
    .full_col_valid(i_full_cv), .full_col_idx(i_full_ci), .full_col(i_full_col), .full_d(i_full_d),
    .opt_ld_en(di.opt_ld_en), .opt_ld_row(di.opt_ld_row), .opt_ld_data(di.opt_ld_data),
    .opt_start(di.opt_start), .opt_idx_i(di.opt_idx_i), .opt_idx_j(di.opt_idx_j),
    .opt_u_i(di.opt_u_i), .opt_u_j(di.opt_u_j), .opt_v_i(di.opt_v_i), .opt_v_j(di.opt_v_j),
    .opt_sigma(di.opt_sigma), .opt_busy(i_opt_busy), .opt_done(i_opt_done), .opt_ainv(i_ainv));

  sm_top #(.N_FULL(N), .N_OPT(N), .W(W), .FRAC(FR)) dut_fx (
    .clk, .rst_n,
    .full_start(dx.full_start), .full_b(dx.full_b), .full_u(dx.full_u), .full_v(dx.full_v),
    .full_sigma(dx.full_sigma), .full_busy(x_full_busy), .full_done(x_full_done),
    .full_col_valid(x_full_cv), .full_col_idx(x_full_ci), .full_col(x_full_col), .full_d(x_full_d),
    .opt_ld_en(dx.opt_ld_en), .opt_ld_row(dx.opt_ld_row), .opt_ld_data(dx.opt_ld_data),
    .opt_start(dx.opt_start), .opt_idx_i(dx.opt_idx_i), .opt_idx_j(dx.opt_idx_j),
    .opt_u_i(dx.opt_u_i), .opt_u_j(dx.opt_u_j), .opt_v_i(dx.opt_v_i), .opt_v_j(dx.opt_v_j),
    .opt_sigma(dx.opt_sigma), .opt_busy(x_opt_busy), .opt_done(x_opt_done), .opt_ainv(x_ainv));

  // ------------------------------------------------------- mechanism counts
  int n_full_ops = 0, n_full_b2b = 0, n_full_sigma_ne1 = 0, n_cols = 0;
  int n_opt_load_rows = 0, n_opt_updates = 0, n_opt_switch_form = 0;
  int n_opt_successive = 0, n_cross_equal = 0, n_sigma_from_d = 0, n_true_inverse = 0;

  always @(posedge clk) begin
    if (i_full_cv) n_cols++;
    if (x_full_cv) n_cols++;
    if (di.opt_ld_en && !i_opt_busy) n_opt_load_rows++;
    if (dx.opt_ld_en && !x_opt_busy) n_opt_load_rows++;
  end

  // ------------------------------------------------------------- helpers
  task automatic idle_all();
    di.full_start = 0; di.opt_ld_en = 0; di.opt_start = 0;
    dx.full_start = 0; dx.opt_ld_en = 0; dx.opt_start = 0;
  endtask

  // Integer instance: run the full engine; returns the streamed matrix.
  task automatic full_int(input logic b2b, output word_t nb [N][N], output word_t d);
    int t0;
    if (!b2b) @(negedge clk);
    di.full_start = 1;
    @(negedge clk);
    t0 = cyc;
    di.full_start = 0;
    while (!i_full_done) begin
      if (i_full_cv) for (int p = 0; p < N; p++) nb[p][i_full_ci] = i_full_col[p];
      @(negedge clk);
      if (cyc - t0 > 100) break;
    end
    chk(cyc - t0 == 2 * N + 8, $sformatf("full latency %0d", cyc - t0));
    d = i_full_d;
    n_full_ops++;
    if (b2b) n_full_b2b++;
    if (di.full_sigma != 1) n_full_sigma_ne1++;
  endtask

  task automatic opt_int();
    int t0;
    di.opt_start = 1;
    @(negedge clk);
    t0 = cyc;
    di.opt_start = 0;
    while (!i_opt_done && cyc - t0 < 20) @(negedge clk);
    chk(cyc - t0 == 4, $sformatf("opt latency %0d", cyc - t0));
    n_opt_updates++;
  endtask

  task automatic opt_fx();
    int t0;
    dx.opt_start = 1;
    @(negedge clk);
    t0 = cyc;
    dx.opt_start = 0;
    while (!x_opt_done && cyc - t0 < 20) @(negedge clk);
    chk(cyc - t0 == 4, $sformatf("opt latency %0d", cyc - t0));
    n_opt_updates++;
  endtask

  task automatic full_fx(output word_t d);
    int t0;
    dx.full_start = 1;
    @(negedge clk);
    t0 = cyc;
    dx.full_start = 0;
    while (!x_full_done && cyc - t0 < 100) @(negedge clk);
    chk(cyc - t0 == 2 * N + 8, $sformatf("full latency %0d", cyc - t0));
    d = x_full_d;
    n_full_ops++;
  endtask

  // Gauss-Jordan inverse in floating point.
  task automatic inv(input real a [N][N], output real ai [N][N]);
    real m [N][2*N];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < 2 * N; j++)
        m[i][j] = (j < N) ? a[i][j] : ((j - N == i) ? 1.0 : 0.0);
    for (int c = 0; c < N; c++) begin
      int piv;
      real pv, f;
      piv = c;
      for (int r = c + 1; r < N; r++) if ((m[r][c] < 0 ? -m[r][c] : m[r][c]) > (m[piv][c] < 0 ? -m[piv][c] : m[piv][c])) piv = r;
      for (int j = 0; j < 2 * N; j++) begin
        real tmp;
        tmp = m[c][j]; m[c][j] = m[piv][j]; m[piv][j] = tmp;
      end
      pv = m[c][c];
      for (int j = 0; j < 2 * N; j++) m[c][j] = m[c][j] / pv;
      for (int r = 0; r < N; r++) if (r != c) begin
        f = m[r][c];
        for (int j = 0; j < 2 * N; j++) m[r][j] = m[r][j] - f * m[c][j];
      end
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) ai[i][j] = m[i][j + N];
  endtask

  function automatic word_t to_fx(input real x);
    return word_t'($rtoi(x * real'(1 << FR) + (x >= 0 ? 0.5 : -0.5)));
  endfunction

  function automatic real from_fx(input word_t x);
    return real'(x) / real'(1 << FR);
  endfunction

  // ---------------------------------------------------------------- test
  initial begin
    word_t b [N][N], nb [N][N], m [N][N], d;
    word_t l [N], r [N];
    idle_all();
    di.full_sigma = 1; di.opt_sigma = 1; dx.full_sigma = 32'sd1 <<< FR; dx.opt_sigma = 32'sd1 <<< FR;
    di.opt_ld_row = 0; dx.opt_ld_row = 0;
    di.opt_idx_i = 0; di.opt_idx_j = 0; dx.opt_idx_i = 0; dx.opt_idx_j = 0;
    di.opt_u_i = 0; di.opt_u_j = 0; di.opt_v_i = 0; di.opt_v_j = 0;
    dx.opt_u_i = 0; dx.opt_u_j = 0; dx.opt_v_i = 0; dx.opt_v_j = 0;
    for (int i = 0; i < N; i++) begin
      di.full_u[i] = 0; di.full_v[i] = 0; dx.full_u[i] = 0; dx.full_v[i] = 0;
      di.opt_ld_data[i] = 0; dx.opt_ld_data[i] = 0;
      for (int j = 0; j < N; j++) begin di.full_b[i][j] = 0; dx.full_b[i][j] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------- part 1: integer instance, both engines on one B
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) b[i][j] = word_t'($signed($urandom_range(0, 200)) - 100);
    for (int p = 0; p < N; p++) begin
      di.opt_ld_en = 1;
      di.opt_ld_row = IW'(p);
      di.opt_ld_data = b[p];
      @(negedge clk);
    end
    di.opt_ld_en = 0;
    m = b;
    for (int k = 0; k < 6; k++) begin
      int ii, jj;
      ii = $urandom_range(0, N - 1);
      jj = (ii + 1 + $urandom_range(0, N - 2)) % N;
      di.full_b = m;
      for (int q = 0; q < N; q++) begin di.full_u[q] = 0; di.full_v[q] = 0; end
      di.opt_u_i = word_t'($signed($urandom_range(0, 10)) - 5);
      di.opt_u_j = -word_t'($signed($urandom_range(0, 10)) - 5);
      di.opt_v_i = -1;
      di.opt_v_j = 1;
      di.full_u[ii] = di.opt_u_i; di.full_u[jj] = di.opt_u_j;
      di.full_v[ii] = di.opt_v_i; di.full_v[jj] = di.opt_v_j;
      di.opt_idx_i = IW'(ii); di.opt_idx_j = IW'(jj);
      di.full_sigma = (k < 3) ? 32'sd1 : word_t'($urandom_range(2, 4));
      di.opt_sigma = di.full_sigma;
      for (int p = 0; p < N; p++) begin
        l[p] = m[p][ii] * di.opt_u_i + m[p][jj] * di.opt_u_j;
        r[p] = m[ii][p] * di.opt_v_i + m[jj][p] * di.opt_v_j;
      end
      full_int(k == 4, nb, d);
      begin
        word_t ed;
        ed = 0;
        for (int q = 0; q < N; q++) ed += r[q] * di.full_u[q];
        chk(d == ed, $sformatf("d got %0d exp %0d", d, ed));
      end
      opt_int();
      n_opt_switch_form++;
      if (k > 0) n_opt_successive++;
      for (int p = 0; p < N; p++)
        for (int q = 0; q < N; q++) m[p][q] -= di.full_sigma * l[p] * r[q];
      begin
        logic same;
        same = 1;
        for (int p = 0; p < N; p++)
          for (int q = 0; q < N; q++) begin
            chk(i_ainv[p][q] == m[p][q], $sformatf("opt A[%0d][%0d] got %0d exp %0d", p, q, i_ainv[p][q], m[p][q]));
            chk(nb[p][q] == m[p][q], $sformatf("full newB[%0d][%0d] got %0d exp %0d", p, q, nb[p][q], m[p][q]));
            if (nb[p][q] != i_ainv[p][q]) same = 0;
          end
        if (same) n_cross_equal++;
      end
    end

    // ---------------- part 2: fixed-point instance, switch workload
    begin
      real a [N][N], ai [N][N], g_on, g_off, gsw, dg, sig, maxerr;
      logic closed [2];
      int sw_i [2], sw_j [2];
      g_on = 4.0; g_off = 0.05;
      sw_i[0] = 0; sw_j[0] = 2;
      sw_i[1] = 1; sw_j[1] = 4;
      // ring of branch conductances plus a conductance to ground at each node
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) a[i][j] = 0.0;
      for (int i = 0; i < N; i++) begin
        int j;
        real g;
        j = (i + 1) % N;
        g = 1.0 + 0.25 * i;
        a[i][i] += g; a[j][j] += g; a[i][j] -= g; a[j][i] -= g;
        a[i][i] += 0.5;
      end
      for (int s = 0; s < 2; s++) begin
        closed[s] = 0;
        a[sw_i[s]][sw_i[s]] += g_off; a[sw_j[s]][sw_j[s]] += g_off;
        a[sw_i[s]][sw_j[s]] -= g_off; a[sw_j[s]][sw_i[s]] -= g_off;
      end
      inv(a, ai);
      for (int p = 0; p < N; p++) begin
        dx.opt_ld_en = 1;
        dx.opt_ld_row = IW'(p);
        for (int q = 0; q < N; q++) dx.opt_ld_data[q] = to_fx(ai[p][q]);
        @(negedge clk);
      end
      dx.opt_ld_en = 0;
      for (int k = 0; k < 6; k++) begin
        int s, ii, jj;
        word_t dfx;
        s = k % 2;
        ii = sw_i[s]; jj = sw_j[s];
        dg = closed[s] ? (g_off - g_on) : (g_on - g_off);
        closed[s] = !closed[s];
        // perturbation: A += dg (e_i - e_j)(e_i - e_j)^T, written as
        // u = (-dg at i, +dg at j), v = (-1 at i, +1 at j)
        for (int q = 0; q < N; q++) begin dx.full_u[q] = 0; dx.full_v[q] = 0; end
        dx.full_u[ii] = to_fx(-dg); dx.full_u[jj] = to_fx(dg);
        dx.full_v[ii] = to_fx(-1.0); dx.full_v[jj] = to_fx(1.0);
        for (int p = 0; p < N; p++)
          for (int q = 0; q < N; q++) dx.full_b[p][q] = x_ainv[p][q];
        dx.full_sigma = to_fx(1.0);
        full_fx(dfx);
        sig = 1.0 / (1.0 + from_fx(dfx));
        n_sigma_from_d++;
        dx.opt_idx_i = IW'(ii); dx.opt_idx_j = IW'(jj);
        dx.opt_u_i = to_fx(-dg); dx.opt_u_j = to_fx(dg);
        dx.opt_v_i = to_fx(-1.0); dx.opt_v_j = to_fx(1.0);
        dx.opt_sigma = to_fx(sig);
        opt_fx();
        n_opt_switch_form++;
        n_opt_successive++;
        a[ii][ii] += dg; a[jj][jj] += dg; a[ii][jj] -= dg; a[jj][ii] -= dg;
        inv(a, ai);
        maxerr = 0.0;
        for (int p = 0; p < N; p++)
          for (int q = 0; q < N; q++) begin
            real e;
            e = from_fx(x_ainv[p][q]) - ai[p][q];
            if (e < 0) e = -e;
            if (e > maxerr) maxerr = e;
          end
        chk(maxerr < 2.0e-3, $sformatf("switch %0d: max |error| %f", k, maxerr));
        if (maxerr < 2.0e-3) n_true_inverse++;
      end
    end

    // ---------------- mechanisms
    chk(n_full_ops > 0, "mechanism: full update");
    chk(n_full_b2b > 0, "mechanism: full back-to-back start");
    chk(n_full_sigma_ne1 > 0, "mechanism: sigma other than 1");
    chk(n_cols >= N * n_full_ops, "mechanism: column streaming");
    chk(n_opt_load_rows >= 2 * N, "mechanism: row load");
    chk(n_opt_updates > 0, "mechanism: optimised update");
    chk(n_opt_switch_form > 0, "mechanism: switch-form column/row selection");
    chk(n_opt_successive > 0, "mechanism: successive updates");
    chk(n_cross_equal > 0, "mechanism: full and optimised agree");
    chk(n_sigma_from_d > 0, "mechanism: sigma derived from d");
    chk(n_true_inverse > 0, "mechanism: true inverse tracked");
    $display("mechanisms: full=%0d b2b=%0d sigma!=1=%0d cols=%0d loads=%0d opt=%0d switch=%0d successive=%0d agree=%0d sigma_from_d=%0d inverse_ok=%0d",
             n_full_ops, n_full_b2b, n_full_sigma_ne1, n_cols, n_opt_load_rows, n_opt_updates,
             n_opt_switch_form, n_opt_successive, n_cross_equal, n_sigma_from_d, n_true_inverse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

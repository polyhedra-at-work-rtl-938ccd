// tb_sm_top_full: one complete operation of each engine with the top level
// at its default sizes (full engine order 13, optimised engine order 16,
// 32-bit integer data). The full engine updates a random 13x13 matrix with
// random u, v and sigma; the optimised engine loads a random 16x16 matrix
// and applies one switch update followed by a second one. Every element is
// compared with a model computed here, and the latencies (8 + 2*13 = 34
// and 4 cycles) are checked.
module tb_sm_top_full;
  localparam int NF  = 13;
  localparam int NO  = 16;
  localparam int W   = 32;
  localparam int IWF = $clog2(NF);
  localparam int IWO = $clog2(NO);
  typedef logic signed [W-1:0] word_t;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
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

  logic full_start = 0, full_busy, full_done, full_col_valid;
  word_t full_b [NF][NF], full_u [NF], full_v [NF], full_sigma, full_col [NF], full_d;
  logic [IWF-1:0] full_col_idx;
  logic opt_ld_en = 0, opt_start = 0, opt_busy, opt_done;
  logic [IWO-1:0] opt_ld_row = 0, opt_idx_i = 0, opt_idx_j = 0;
  word_t opt_ld_data [NO], opt_u_i, opt_u_j, opt_v_i, opt_v_j, opt_sigma, opt_ainv [NO][NO];

  sm_top dut (.*);

  initial begin
    word_t r [NF], l [NF], ed, m [NO][NO], lo [NO], ro [NO];
    int t0, ncol;
    for (int q = 0; q < NO; q++) opt_ld_data[q] = 0;
    opt_u_i = 0; opt_u_j = 0; opt_v_i = 0; opt_v_j = 0; opt_sigma = 1;
    for (int i = 0; i < NF; i++) begin
      for (int j = 0; j < NF; j++) full_b[i][j] = word_t'($signed($urandom_range(0, 2000)) - 1000);
      full_u[i] = word_t'($signed($urandom_range(0, 2000)) - 1000);
      full_v[i] = word_t'($signed($urandom_range(0, 2000)) - 1000);
    end
    full_sigma = 3;
    for (int i = 0; i < NF; i++) begin
      r[i] = 0; l[i] = 0;
      for (int j = 0; j < NF; j++) begin
        r[i] += full_b[i][j] * full_u[j];
        l[i] += full_b[j][i] * full_v[j];
      end
    end
    ed = 0;
    for (int j = 0; j < NF; j++) ed += l[j] * full_u[j];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // full engine
    full_start = 1;
    @(negedge clk);
    t0 = cyc;
    full_start = 0;
    ncol = 0;
    while (!full_done && cyc - t0 < 100) begin
      if (full_col_valid) begin
        chk(int'(full_col_idx) == ncol, "column order");
        for (int p = 0; p < NF; p++)
          chk(full_col[p] == full_b[p][ncol] - full_sigma * (r[p] * l[ncol]),
              $sformatf("newB[%0d][%0d]", p, ncol));
        ncol++;
      end
      @(negedge clk);
    end
    chk(cyc - t0 == 8 + 2 * NF, $sformatf("full latency %0d", cyc - t0));
    chk(ncol == NF, "all columns");
    chk(full_d == ed, "d");

    // optimised engine
    for (int p = 0; p < NO; p++) begin
      for (int q = 0; q < NO; q++) begin
        m[p][q] = word_t'($signed($urandom_range(0, 2000)) - 1000);
        opt_ld_data[q] = m[p][q];
      end
      opt_ld_en = 1;
      opt_ld_row = IWO'(p);
      @(negedge clk);
    end
    opt_ld_en = 0;
    for (int k = 0; k < 2; k++) begin
      int ii, jj;
      ii = (k == 0) ? 3 : 15;
      jj = (k == 0) ? 11 : 0;
      opt_idx_i = IWO'(ii); opt_idx_j = IWO'(jj);
      opt_u_i = word_t'($signed($urandom_range(0, 20)) - 10);
      opt_u_j = -word_t'($signed($urandom_range(0, 20)) - 10);
      opt_v_i = -1; opt_v_j = 1;
      opt_sigma = (k == 0) ? 32'sd1 : 32'sd2;
      for (int p = 0; p < NO; p++) begin
        lo[p] = opt_u_i * m[p][ii] + opt_u_j * m[p][jj];
        ro[p] = opt_v_i * m[ii][p] + opt_v_j * m[jj][p];
      end
      for (int p = 0; p < NO; p++)
        for (int q = 0; q < NO; q++) m[p][q] -= opt_sigma * lo[p] * ro[q];
      opt_start = 1;
      @(negedge clk);
      t0 = cyc;
      opt_start = 0;
      while (!opt_done && cyc - t0 < 20) @(negedge clk);
      chk(cyc - t0 == 4, $sformatf("opt latency %0d", cyc - t0));
      for (int p = 0; p < NO; p++)
        for (int q = 0; q < NO; q++)
          chk(opt_ainv[p][q] == m[p][q], $sformatf("opt A[%0d][%0d] update %0d", p, q, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sm_full_pe: drives one row processor through both phases by hand.
// Phase 1 feeds N random (B[p][j], u_j) and (B[j][p], v_j) pairs, one per
// cycle, with acc_en two cycles behind; r and l are compared with sums
// computed here. Phase 2 feeds l_j values on the broadcast input with
// out_en four cycles behind and checks every newB element against
// B - sigma * r * l_j. Run with integer data and with 16 fraction bits.
module tb_sm_full_pe;
  localparam int N = 6;
  localparam int W = 32;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference multiply: full product, arithmetic shift, keep W bits.
  function automatic logic signed [W-1:0] fx(input logic signed [W-1:0] a, b, input int frac);
    logic signed [2*W-1:0] p;
    p = (2*W)'(a) * (2*W)'(b);
    p = p >>> frac;
    return p[W-1:0];
  endfunction

  logic clr, acc_en, out_en;
  logic signed [W-1:0] b_row, u_j, b_col, v_j, lb, sigma, b_out;
  logic signed [W-1:0] r0, l0, nb0, r1, l1, nb1;

  sm_full_pe #(.W(W), .FRAC(0))  dut0 (.clk, .rst_n, .clr, .b_row, .u_j, .b_col, .v_j, .acc_en,
                                       .lb, .sigma, .b_out, .out_en, .r(r0), .l(l0), .newb(nb0));
  sm_full_pe #(.W(W), .FRAC(16)) dut1 (.clk, .rst_n, .clr, .b_row, .u_j, .b_col, .v_j, .acc_en,
                                       .lb, .sigma, .b_out, .out_en, .r(r1), .l(l1), .newb(nb1));

  task automatic chk(input logic signed [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic logic signed [W-1:0] rnd();
    return W'($signed($urandom_range(0, 2000)) - 1000) <<< 8;
  endfunction

  initial begin
    logic signed [W-1:0] br [N], uu [N], bc [N], vv [N], ll [N], bo [N];
    logic signed [W-1:0] er [2], el [2], s;
    clr = 0; acc_en = 0; out_en = 0;
    b_row = 0; u_j = 0; b_col = 0; v_j = 0; lb = 0; sigma = 0; b_out = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k < N; k++) begin
        br[k] = rnd(); uu[k] = rnd(); bc[k] = rnd(); vv[k] = rnd();
        ll[k] = rnd(); bo[k] = rnd();
      end
      s = (rep == 0) ? 32'sd1 : rnd();
      for (int f = 0; f < 2; f++) begin
        er[f] = 0; el[f] = 0;
        for (int k = 0; k < N; k++) begin
          er[f] += fx(br[k], uu[k], f * 16);
          el[f] += fx(bc[k], vv[k], f * 16);
        end
      end
      @(negedge clk);
      clr = 1;
      sigma = s;
      @(negedge clk);
      clr = 0;
      // phase 1: operands at cycle k, accumulate at cycle k+2
      for (int c = 0; c < N + 2; c++) begin
        if (c < N) begin
          b_row = br[c]; u_j = uu[c]; b_col = bc[c]; v_j = vv[c];
        end
        acc_en = (c >= 2);
        @(negedge clk);
      end
      acc_en = 0;
      chk(r0, er[0], "r int");
      chk(l0, el[0], "l int");
      chk(r1, er[1], "r fixed");
      chk(l1, el[1], "l fixed");
      // phase 2: l_j at cycle k, newB written at the end of cycle k+4
      for (int c = 0; c < N + 4; c++) begin
        if (c < N) lb = ll[c];
        out_en = (c >= 4);
        if (c >= 4) b_out = bo[c-4];
        @(negedge clk);
        if (c >= 4) begin
          chk(nb0, bo[c-4] - fx(s, fx(er[0], ll[c-4], 0), 0), $sformatf("newb int j=%0d", c - 4));
          chk(nb1, bo[c-4] - fx(s, fx(er[1], ll[c-4], 16), 16), $sformatf("newb fixed j=%0d", c - 4));
        end
      end
      out_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sm_opt_cell: loads a value into one cell, then applies a series of
// updates, each with sl_p and r_q presented one cycle before upd_en, and
// compares the stored element with a - sl_p * r_q computed here. Checks
// that the element holds when neither ld_en nor upd_en is high, and runs
// one cell with integer data and one with 16 fraction bits.
module tb_sm_opt_cell;
  localparam int W = 32;

  logic clk = 0, rst_n = 0, ld_en = 0, upd_en = 0;
  logic signed [W-1:0] ld_val = 0, sl_p = 0, r_q = 0, a0, a1;
  int checks = 0, failures = 0;

  sm_opt_cell #(.W(W), .FRAC(0))  dut0 (.clk, .rst_n, .ld_en, .ld_val, .sl_p, .r_q, .upd_en, .a(a0));
  sm_opt_cell #(.W(W), .FRAC(16)) dut1 (.clk, .rst_n, .ld_en, .ld_val, .sl_p, .r_q, .upd_en, .a(a1));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
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

  task automatic chk(input logic signed [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    logic signed [W-1:0] e0, e1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ld_val = 32'sd123456;
    ld_en = 1;
    @(negedge clk);
    ld_en = 0;
    e0 = 32'sd123456;
    e1 = 32'sd123456;
    chk(a0, e0, "load int");
    chk(a1, e1, "load fixed");
    for (int k = 0; k < 20; k++) begin
      sl_p = W'($signed($urandom_range(0, 200000)) - 100000);
      r_q  = W'($signed($urandom_range(0, 200000)) - 100000);
      @(negedge clk);
      upd_en = 1;
      @(negedge clk);
      upd_en = 0;
      e0 -= fx(sl_p, r_q, 0);
      e1 -= fx(sl_p, r_q, 16);
      chk(a0, e0, $sformatf("update int %0d", k));
      chk(a1, e1, $sformatf("update fixed %0d", k));
      sl_p = 32'sd777; r_q = 32'sd999;
      repeat (2) @(negedge clk);
      chk(a0, e0, "hold int");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

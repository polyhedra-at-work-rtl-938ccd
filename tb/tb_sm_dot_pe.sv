// tb_sm_dot_pe: feeds N random pairs into the dot-product processor, one
// per cycle, with acc_en two cycles behind, and compares d with the dot
// product computed here. A second run checks that clr restarts the sum.
module tb_sm_dot_pe;
  localparam int N = 7;
  localparam int W = 32;

  logic clk = 0, rst_n = 0, clr = 0, acc_en = 0;
  logic signed [W-1:0] a = 0, b = 0, d;
  int checks = 0, failures = 0;

  sm_dot_pe #(.W(W), .FRAC(0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] aa [N], bb [N];
    logic signed [W-1:0] exp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 5; rep++) begin
      exp = 0;
      for (int k = 0; k < N; k++) begin
        aa[k] = W'($signed($urandom_range(0, 20000)) - 10000);
        bb[k] = W'($signed($urandom_range(0, 20000)) - 10000);
        exp += aa[k] * bb[k];
      end
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int c = 0; c < N + 2; c++) begin
        if (c < N) begin a = aa[c]; b = bb[c]; end
        acc_en = (c >= 2);
        @(negedge clk);
      end
      acc_en = 0;
      checks++;
      if (d !== exp) begin
        failures++;
        $display("FAIL d got %0d exp %0d", d, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sm_full_ctrl: checks the time-counter controller of the full engine.
// For every cycle of two operations it compares each enable and index with
// the schedule written out independently here, checks that busy covers the
// operation, that done pulses 8 + 2N edges after the start edge, and that a
// start while busy would not restart the counter.
module tb_sm_full_ctrl;
  localparam int N  = 5;
  localparam int IW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0;
  logic capture, busy, acc_en, bc_en, dot_acc_en, out_en, done;
  logic [IW-1:0] p1_j, bc_j, dot_j, out_j;
  int checks = 0, failures = 0;

  sm_full_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 2; op++) begin
      @(negedge clk);
      start = 1;
      #1;
      chk(capture == 1'b1, "capture with start when idle");
      @(negedge clk);   // now t = 0
      start = 0;
      for (int t = 0; t <= 2 * N + 8; t++) begin
        logic e_acc, e_bc, e_dot, e_out, e_done, e_busy;
        e_busy = (t <= 2 * N + 7);
        e_acc  = (t >= 2) && (t <= N + 1);
        e_bc   = (t >= N + 2) && (t <= 2 * N + 1);
        e_dot  = (t >= N + 5) && (t <= 2 * N + 4);
        e_out  = (t >= N + 7) && (t <= 2 * N + 6);
        e_done = (t == 2 * N + 8);
        chk(busy == e_busy, $sformatf("busy t=%0d", t));
        chk(acc_en == e_acc, $sformatf("acc_en t=%0d", t));
        chk(bc_en == e_bc, $sformatf("bc_en t=%0d", t));
        chk(dot_acc_en == e_dot, $sformatf("dot_acc_en t=%0d", t));
        chk(out_en == e_out, $sformatf("out_en t=%0d", t));
        chk(done == e_done, $sformatf("done t=%0d", t));
        if (t < N) chk(int'(p1_j) == t, $sformatf("p1_j t=%0d", t));
        if (e_bc) chk(int'(bc_j) == t - (N + 2), $sformatf("bc_j t=%0d", t));
        if (t >= N + 3 && t <= 2 * N + 2) chk(int'(dot_j) == t - (N + 3), $sformatf("dot_j t=%0d", t));
        if (e_out) chk(int'(out_j) == t - (N + 7), $sformatf("out_j t=%0d", t));
        if (op == 1 && t == 3) begin            // start while busy: ignored
          start = 1;
          #1;
          chk(capture == 1'b0, "no capture while busy");
        end
        @(negedge clk);
        start = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sm_full_ctrl: controller of the full Sherman-Morrison engine.
//
// Like a generated polyhedral design, the whole schedule hangs off a single
// time counter t: every enable and every column index is an affine function
// of t, decoded combinationally. t is 0 in the cycle after the edge that
// accepts start and counts up by one per cycle until the operation ends.
//
// Schedule for a matrix of order N (j = 0..N-1 is a column index):
//   t = j            phase 1 issue: operands B[p][j], u_j and B[j][p], v_j
//   t = j+2          phase 1 products ready, accumulated   (acc_en)
//   t = N+2+j        l_j is copied onto the broadcast bus   (bc_en, bc_j)
//   t = N+3+j        dot processor operands l_j, u_j         (dot_j)
//   t = N+5+j        dot processor product accumulated       (dot_acc_en)
//   t = N+7+j        sigma*r_p*l_j ready, newB column j is
//                    registered at the end of this cycle     (out_en, out_j)
//   t = 2N+7         last cycle; done is high in the next one
// With two-stage multipliers this gives the 8 + 2N cycle latency of the
// full engine. The split of the constant 8 into pipeline registers is this
// design's choice. A start while busy is ignored.
module sm_full_ctrl #(
  parameter int N  = 13,
  localparam int IW = (N > 1) ? $clog2(N) : 1,
  localparam int TW = $clog2(2 * N + 10)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          capture,     // start accepted this cycle
  output logic          busy,
  output logic [IW-1:0] p1_j,        // phase 1 column index
  output logic          acc_en,      // phase 1 accumulate
  output logic          bc_en,       // load broadcast register with l[bc_j]
  output logic [IW-1:0] bc_j,
  output logic [IW-1:0] dot_j,       // index of u for the dot processor
  output logic          dot_acc_en,
  output logic          out_en,      // register newB column out_j
  output logic [IW-1:0] out_j,
  output logic          done         // one-cycle pulse: operation complete
);
  logic          run;
  logic [TW-1:0] t;

  localparam int T_LAST = 2 * N + 7;

  assign capture = start && !run;
  assign busy    = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      t    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (capture) begin
        run <= 1'b1;
        t   <= '0;
      end else if (run) begin
        if (int'(t) == T_LAST) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
        t <= t + 1'b1;
      end
    end
  end

  // Window decode: lo <= t <= hi while running.
  function automatic logic in_win(input logic [TW-1:0] tv, input int lo, input int hi);
    return (int'(tv) >= lo) && (int'(tv) <= hi);
  endfunction

  always_comb begin
    p1_j       = '0;
    bc_j       = '0;
    dot_j      = '0;
    out_j      = '0;
    acc_en     = run && in_win(t, 2, N + 1);
    bc_en      = run && in_win(t, N + 2, 2 * N + 1);
    dot_acc_en = run && in_win(t, N + 5, 2 * N + 4);
    out_en     = run && in_win(t, N + 7, 2 * N + 6);
    if (run && in_win(t, 0, N - 1))         p1_j  = IW'(t);
    if (run && in_win(t, N + 2, 2 * N + 1)) bc_j  = IW'(int'(t) - (N + 2));
    if (run && in_win(t, N + 3, 2 * N + 2)) dot_j = IW'(int'(t) - (N + 3));
    if (out_en)                             out_j = IW'(int'(t) - (N + 7));
  end
endmodule

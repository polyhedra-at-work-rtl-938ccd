// sm_full_pe: row processor p of the full Sherman-Morrison engine.
//
// Phase 1 (one column per cycle, j = 0..N-1) runs two matrix-vector
// recurrences side by side:
//   r_p <- r_p + B[p][j] * u_j        (row p of r = B u)
//   l_p <- l_p + B[j][p] * v_j        (entry p of l = B^T v)
// Phase 2 (again one column per cycle) receives l_j on a broadcast bus and
// produces row p of the updated inverse, one element per cycle:
//   newB[p][j] = B[p][j] - sigma * (r_p * l_j)
// which is B - sigma * (B u)(v^T B), the Sherman-Morrison update. sigma is
// applied to the outer-product term, as in the algorithm's own equations.
//
// Timing: all four multipliers have two pipeline stages. acc_en must be
// high exactly when the phase 1 products of the operands presented two
// cycles earlier are on the multiplier outputs; out_en when sigma*r_p*l_j
// for the wanted column is, i.e. four cycles after lb carries l_j. The
// controller sm_full_ctrl provides these enables. clr zeroes r_p and l_p.
// The phase 1 accumulation order follows the algorithm's recurrence; the
// pipelining is this design's choice.
module sm_full_pe #(
  parameter int W    = 32,
  parameter int FRAC = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  // phase 1
  input  logic signed [W-1:0] b_row,   // B[p][j]
  input  logic signed [W-1:0] u_j,
  input  logic signed [W-1:0] b_col,   // B[j][p]
  input  logic signed [W-1:0] v_j,
  input  logic                acc_en,
  // phase 2
  input  logic signed [W-1:0] lb,      // broadcast l_j
  input  logic signed [W-1:0] sigma,
  input  logic signed [W-1:0] b_out,   // B[p][j] of the column being written
  input  logic                out_en,
  output logic signed [W-1:0] r,
  output logic signed [W-1:0] l,
  output logic signed [W-1:0] newb
);
  logic signed [W-1:0] pr, pl, op, incr;

  fxp_mul #(.W(W), .FRAC(FRAC), .STAGES(2)) u_mr (.clk, .a(b_row), .b(u_j),   .y(pr));
  fxp_mul #(.W(W), .FRAC(FRAC), .STAGES(2)) u_ml (.clk, .a(b_col), .b(v_j),   .y(pl));
  fxp_mul #(.W(W), .FRAC(FRAC), .STAGES(2)) u_mo (.clk, .a(r),     .b(lb),    .y(op));
  fxp_mul #(.W(W), .FRAC(FRAC), .STAGES(2)) u_ms (.clk, .a(sigma), .b(op),    .y(incr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= '0;
      l    <= '0;
      newb <= '0;
    end else begin
      if (clr) begin
        r <= '0;
        l <= '0;
      end else if (acc_en) begin
        r <= r + pr;
        l <= l + pl;
      end
      if (out_en) newb <= b_out - incr;
    end
  end
endmodule

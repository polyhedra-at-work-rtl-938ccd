// sm_opt_cell: one of the N^2 cells of the optimised update engine.
//
// The cell holds element (p, q) of the inverse matrix in a register. On an
// update it subtracts the outer-product term sl_p * r_q, where sl_p is
// sigma * l_p (computed once per row outside the cell) and r_q is entry q
// of r. The product is registered inside the cell (one pipeline stage), so
// upd_en must be high one cycle after sl_p and r_q carry the values of the
// update; the new element is visible the cycle after upd_en. ld_en writes
// ld_val directly (matrix load). Load and update in the same cycle must
// not happen; the engine sm_opt never does it. Keeping the matrix in the
// cells follows the optimised organisation; the pipeline split is this
// design's choice.
module sm_opt_cell #(
  parameter int W    = 32,
  parameter int FRAC = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld_en,
  input  logic signed [W-1:0] ld_val,
  input  logic signed [W-1:0] sl_p,
  input  logic signed [W-1:0] r_q,
  input  logic                upd_en,
  output logic signed [W-1:0] a
);
  logic signed [W-1:0] op;

  fxp_mul #(.W(W), .FRAC(FRAC), .STAGES(1)) u_m (.clk, .a(sl_p), .b(r_q), .y(op));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      a <= '0;
    else if (ld_en)  a <= ld_val;
    else if (upd_en) a <= a - op;
  end
endmodule

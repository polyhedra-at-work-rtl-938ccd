// sm_opt: optimised Sherman-Morrison update for a switch change in an
// admittance matrix A, with A^-1 kept in N^2 register cells.
//
// A switch between nodes i and j changes only A[i][i], A[i][j], A[j][i]
// and A[j][j], so the perturbation is u v^T with u and v zero except at
// positions i and j. Then
//   l = A^-1 u   = u_i * (column i) + u_j * (column j)
//   r = v^T A^-1 = v_i * (row i)    + v_j * (row j)
//   A^-1 <- A^-1 - sigma * l r^T
// so the update needs two selected columns and two selected rows of the
// stored inverse instead of two matrix-vector products, and every element
// is updated in parallel. For a switch the coefficients are
// u_i = d_i, u_j = -d_j, v_i = -1, v_j = +1.
//
// Pipeline, counted in edges from the edge that samples start:
//   edge 0  select columns i, j and rows i, j; sample coefficients, sigma
//   edge 1  l and r registered
//   edge 2  sigma * l registered
//   edge 3  outer-product terms registered in the cells
//   edge 4  matrix written; done high in the following cycle
// giving the constant latency of 4 cycles. The pipeline split, the row-wise
// load port and the parallel read-out are this design's choices.
//
// Interface: ld_en writes ld_data into row ld_row (ignored while busy).
// start (ignored while busy or while ld_en is high) launches one update.
// ainv is the whole stored matrix. sigma is supplied from outside (a table
// of pre-computed 1/(1 + d) values, or 1).
module sm_opt
  import sm_pkg::*;
#(
  parameter int N    = 16,
  parameter int W    = DATA_W,
  parameter int FRAC = FRAC_W,
  localparam int IW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld_en,
  input  logic [IW-1:0]       ld_row,
  input  logic signed [W-1:0] ld_data [N],
  input  logic                start,
  input  logic [IW-1:0]       idx_i,
  input  logic [IW-1:0]       idx_j,
  input  logic signed [W-1:0] u_i,
  input  logic signed [W-1:0] u_j,
  input  logic signed [W-1:0] v_i,
  input  logic signed [W-1:0] v_j,
  input  logic signed [W-1:0] sigma,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] ainv  [N][N]
);
  logic                accept;
  logic [4:1]          vld;       // vld[k]: an update has passed edge k-1
  logic signed [W-1:0] ci [N], cj [N], ri [N], rj [N];
  logic signed [W-1:0] ui_r, uj_r, vi_r, vj_r, sigma_r;
  logic signed [W-1:0] l_r [N], r_r [N], sl_r [N];
  logic signed [W-1:0] l_c [N], r_c [N], sl_c [N];
  logic signed [W-1:0] t_ci [N], t_cj [N], t_ri [N], t_rj [N];

  assign busy   = |vld;
  assign accept = start && !busy && !ld_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '0;
      done <= 1'b0;
    end else begin
      vld  <= {vld[3:1], accept};
      done <= vld[4];
    end
  end

  // Stage 0: direct access to the two columns and two rows.
  always_ff @(posedge clk) begin
    if (accept) begin
      for (int k = 0; k < N; k++) begin
        ci[k] <= ainv[k][idx_i];
        cj[k] <= ainv[k][idx_j];
        ri[k] <= ainv[idx_i][k];
        rj[k] <= ainv[idx_j][k];
      end
      ui_r    <= u_i;
      uj_r    <= u_j;
      vi_r    <= v_i;
      vj_r    <= v_j;
      sigma_r <= sigma;
    end
  end

  // Stages 1 and 2: l, r and sigma * l.
  for (genvar k = 0; k < N; k++) begin : g_vec
    fxp_mul #(.W(W), .FRAC(FRAC)) u_lci (.clk, .a(ui_r),    .b(ci[k]),  .y(t_ci[k]));
    fxp_mul #(.W(W), .FRAC(FRAC)) u_lcj (.clk, .a(uj_r),    .b(cj[k]),  .y(t_cj[k]));
    fxp_mul #(.W(W), .FRAC(FRAC)) u_rri (.clk, .a(vi_r),    .b(ri[k]),  .y(t_ri[k]));
    fxp_mul #(.W(W), .FRAC(FRAC)) u_rrj (.clk, .a(vj_r),    .b(rj[k]),  .y(t_rj[k]));
    fxp_mul #(.W(W), .FRAC(FRAC)) u_sl  (.clk, .a(sigma_r), .b(l_r[k]), .y(sl_c[k]));
    assign l_c[k] = t_ci[k] + t_cj[k];
    assign r_c[k] = t_ri[k] + t_rj[k];
  end

  always_ff @(posedge clk) begin
    if (vld[1]) begin
      l_r <= l_c;
      r_r <= r_c;
    end
    if (vld[2]) sl_r <= sl_c;
  end

  // Stages 3 and 4: the N^2 cells.
  for (genvar p = 0; p < N; p++) begin : g_row
    for (genvar q = 0; q < N; q++) begin : g_col
      sm_opt_cell #(.W(W), .FRAC(FRAC)) u_cell (
        .clk, .rst_n,
        .ld_en  (ld_en && !busy && (ld_row == IW'(p))),
        .ld_val (ld_data[q]),
        .sl_p   (sl_r[p]),
        .r_q    (r_r[q]),
        .upd_en (vld[4]),
        .a      (ainv[p][q])
      );
    end
  end

`ifndef SYNTHESIS
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("sm_opt: start while busy is ignored");
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) !(ld_en && busy))
    else $error("sm_opt: load while busy is ignored");
`endif
endmodule

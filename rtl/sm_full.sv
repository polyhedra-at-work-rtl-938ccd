// sm_full: full Sherman-Morrison update engine, space-linear organisation.
//
// Given B = A^-1 (order N) and an order-one perturbation u v^T of A, it
// computes
//   newB = B - sigma * (B u)(v^T B)        (sigma = 1/(1 + v^T B u))
// with N row processors (sm_full_pe) and one dot-product processor
// (sm_dot_pe): N+1 processors, latency 8 + 2N cycles. Phase 1 sweeps the
// columns once to form r = B u and l = B^T v in the row processors; phase 2
// sweeps them again, broadcasting l_j to all rows, and emits newB one
// column per cycle. Meanwhile the dot processor forms d = l . u.
//
// sigma is an input: the division is not computed here but taken from a
// table of pre-computed values outside, addressed with d; with sigma = 1
// (the setting the algorithm is usually run with when the table is left
// out) the engine computes B - (B u)(v^T B).
//
// Interface and timing:
//  - start (one cycle, ignored while busy) samples u, v and sigma.
//  - b must be held stable from the start cycle until done.
//  - newB column j appears on col with col_valid high and col_idx = j,
//    columns 0..N-1 in consecutive cycles; the last one 2N+7 edges after
//    the start edge.
//  - done pulses 8 + 2N edges after the start edge; d is then valid and
//    stays valid until the next start.
// The streaming output and the hold-b requirement are this design's
// choices: the algorithm itself says nothing about input and output.
module sm_full
  import sm_pkg::*;
#(
  parameter int N    = 13,
  parameter int W    = DATA_W,
  parameter int FRAC = FRAC_W,
  localparam int IW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] b     [N][N],
  input  logic signed [W-1:0] u     [N],
  input  logic signed [W-1:0] v     [N],
  input  logic signed [W-1:0] sigma,
  output logic                busy,
  output logic                done,
  output logic                col_valid,
  output logic [IW-1:0]       col_idx,
  output logic signed [W-1:0] col   [N],
  output logic signed [W-1:0] d
);
  logic          capture, acc_en, bc_en, dot_acc_en, out_en;
  logic [IW-1:0] p1_j, bc_j, dot_j, out_j;

  logic signed [W-1:0] u_r [N];
  logic signed [W-1:0] v_r [N];
  logic signed [W-1:0] sigma_r;
  logic signed [W-1:0] lb;
  logic signed [W-1:0] l_vec [N];

  sm_full_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .capture, .busy, .p1_j, .acc_en, .bc_en, .bc_j,
    .dot_j, .dot_acc_en, .out_en, .out_j, .done
  );

  // Input capture and the l broadcast register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        u_r[k] <= '0;
        v_r[k] <= '0;
      end
      sigma_r   <= '0;
      lb        <= '0;
      col_valid <= 1'b0;
      col_idx   <= '0;
    end else begin
      if (capture) begin
        u_r     <= u;
        v_r     <= v;
        sigma_r <= sigma;
      end
      if (bc_en) lb <= l_vec[bc_j];
      col_valid <= out_en;
      col_idx   <= out_j;
    end
  end

  for (genvar p = 0; p < N; p++) begin : g_pe
    sm_full_pe #(.W(W), .FRAC(FRAC)) u_pe (
      .clk, .rst_n,
      .clr    (capture),
      .b_row  (b[p][p1_j]),
      .u_j    (u_r[p1_j]),
      .b_col  (b[p1_j][p]),
      .v_j    (v_r[p1_j]),
      .acc_en,
      .lb,
      .sigma  (sigma_r),
      .b_out  (b[p][out_j]),
      .out_en,
      .r      (),
      .l      (l_vec[p]),
      .newb   (col[p])
    );
  end

  sm_dot_pe #(.W(W), .FRAC(FRAC)) u_dot (
    .clk, .rst_n,
    .clr    (capture),
    .a      (lb),
    .b      (u_r[dot_j]),
    .acc_en (dot_acc_en),
    .d
  );

`ifndef SYNTHESIS
  // The caller must not start a new operation while one is running.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("sm_full: start while busy is ignored");
`endif
endmodule

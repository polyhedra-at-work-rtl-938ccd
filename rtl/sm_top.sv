// sm_top: the two Sherman-Morrison update engines side by side.
//
//  - full engine (sm_full, order N_FULL): general update
//      newB = B - sigma * (B u)(v^T B)
//    for any order-one perturbation u v^T, N_FULL+1 processors, latency
//    8 + 2*N_FULL cycles, newB streamed out one column per cycle. It also
//    returns d = v^T B u, from which sigma = 1/(1 + d) is derived.
//  - optimised engine (sm_opt, order N_OPT): update of a register-held
//    inverse for a switch between nodes i and j, N_OPT^2 cells, constant
//    latency of 4 cycles.
//
// The table of pre-computed sigma values is not part of this design: each
// engine takes sigma as an input port (full_sigma, opt_sigma) and the full
// engine's d is a port, so such a table can be connected outside. Driving
// sigma with 1.0 (1 << FRAC) runs the engines with the division left out.
// The two engines share only the clock and reset. Port meanings and timing
// are those of sm_full and sm_opt. Default sizes are the largest orders the
// two organisations were built for (13 and 16).
module sm_top
  import sm_pkg::*;
#(
  parameter int N_FULL = 13,
  parameter int N_OPT  = 16,
  parameter int W      = DATA_W,
  parameter int FRAC   = FRAC_W,
  localparam int IWF   = (N_FULL > 1) ? $clog2(N_FULL) : 1,
  localparam int IWO   = (N_OPT > 1) ? $clog2(N_OPT) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // full engine
  input  logic                full_start,
  input  logic signed [W-1:0] full_b      [N_FULL][N_FULL],
  input  logic signed [W-1:0] full_u      [N_FULL],
  input  logic signed [W-1:0] full_v      [N_FULL],
  input  logic signed [W-1:0] full_sigma,
  output logic                full_busy,
  output logic                full_done,
  output logic                full_col_valid,
  output logic [IWF-1:0]      full_col_idx,
  output logic signed [W-1:0] full_col    [N_FULL],
  output logic signed [W-1:0] full_d,
  // optimised engine
  input  logic                opt_ld_en,
  input  logic [IWO-1:0]      opt_ld_row,
  input  logic signed [W-1:0] opt_ld_data [N_OPT],
  input  logic                opt_start,
  input  logic [IWO-1:0]      opt_idx_i,
  input  logic [IWO-1:0]      opt_idx_j,
  input  logic signed [W-1:0] opt_u_i,
  input  logic signed [W-1:0] opt_u_j,
  input  logic signed [W-1:0] opt_v_i,
  input  logic signed [W-1:0] opt_v_j,
  input  logic signed [W-1:0] opt_sigma,
  output logic                opt_busy,
  output logic                opt_done,
  output logic signed [W-1:0] opt_ainv    [N_OPT][N_OPT]
);
  sm_full #(.N(N_FULL), .W(W), .FRAC(FRAC)) u_full (
    .clk, .rst_n,
    .start     (full_start),
    .b         (full_b),
    .u         (full_u),
    .v         (full_v),
    .sigma     (full_sigma),
    .busy      (full_busy),
    .done      (full_done),
    .col_valid (full_col_valid),
    .col_idx   (full_col_idx),
    .col       (full_col),
    .d         (full_d)
  );

  sm_opt #(.N(N_OPT), .W(W), .FRAC(FRAC)) u_opt (
    .clk, .rst_n,
    .ld_en   (opt_ld_en),
    .ld_row  (opt_ld_row),
    .ld_data (opt_ld_data),
    .start   (opt_start),
    .idx_i   (opt_idx_i),
    .idx_j   (opt_idx_j),
    .u_i     (opt_u_i),
    .u_j     (opt_u_j),
    .v_i     (opt_v_i),
    .v_j     (opt_v_j),
    .sigma   (opt_sigma),
    .busy    (opt_busy),
    .done    (opt_done),
    .ainv    (opt_ainv)
  );
endmodule

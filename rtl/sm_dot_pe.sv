// sm_dot_pe: the extra processor of the full engine, computing the dot
// product d = l . u serially, one term per cycle.
//
// d is the quantity the scalar sigma = 1/(1 + d) is derived from; the
// engine brings it out so that a sigma table outside can be addressed with
// it. The multiplier has two pipeline stages: acc_en must be high when the
// product of the operands presented two cycles earlier is on its output.
// clr zeroes the accumulator. The serial, one-term-per-cycle organisation
// is this design's choice.
module sm_dot_pe #(
  parameter int W    = 32,
  parameter int FRAC = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                acc_en,
  output logic signed [W-1:0] d
);
  logic signed [W-1:0] p;

  fxp_mul #(.W(W), .FRAC(FRAC), .STAGES(2)) u_m (.clk, .a, .b, .y(p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      d <= '0;
    else if (clr)    d <= '0;
    else if (acc_en) d <= d + p;
  end
endmodule

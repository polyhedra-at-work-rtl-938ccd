// fxp_mul: fixed-point multiplier used by every processing element.
//
// y = (a * b) >>> FRAC, computed on the full 2W-bit signed product and cut
// back to W bits. STAGES selects the pipeline depth:
//   0 - purely combinational,
//   1 - product register (y valid one edge after a, b),
//   2 - operand registers and product register (y valid two edges after
//       a, b), the usual arrangement of an FPGA multiplier block.
// The registers run freely (no enable) and have no reset: every consumer
// qualifies the result with its own timing. The pipeline depth is this
// design's choice.
module fxp_mul #(
  parameter int W      = 32,
  parameter int FRAC   = 0,
  parameter int STAGES = 0
) (
  input  logic                clk,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0]   a_q, b_q;
  logic signed [2*W-1:0] prod;
  logic signed [2*W-1:0] prod_sh;
  logic signed [W-1:0]   y_c;

  if (STAGES >= 2) begin : g_opreg
    always_ff @(posedge clk) begin
      a_q <= a;
      b_q <= b;
    end
  end else begin : g_opcomb
    assign a_q = a;
    assign b_q = b;
  end

  assign prod    = a_q * b_q;
  assign prod_sh = prod >>> FRAC;
  assign y_c     = prod_sh[W-1:0];

  if (STAGES >= 1) begin : g_preg
    always_ff @(posedge clk) y <= y_c;
  end else begin : g_pcomb
    assign y = y_c;
  end
endmodule

// hessian: pipelined approximation of the Hessian determinant
//   feature_score = Dxx*Dyy - (Dxy^2 - (Dxy^2 >> 3))
// i.e. Dxx*Dyy - 0.875*Dxy^2 in integer arithmetic.
//
// Stage 1 registers the product Dxx*Dyy and the square Dxy^2 twice, once
// shifted right by three. Stage 2 registers the product again and the
// difference of the two squares. Stage 3 registers the final difference.
// A new triple of box responses is accepted every tick; the score for it
// appears three ticks later. The structure, the weight 7/8 and the three
// stages follow the source design; the widths (signed D_W-bit inputs,
// 2*D_W-bit result) are this design's choice.
module hessian
  import surf_pkg::*;
#(
  parameter int unsigned DW = D_W,
  parameter int unsigned HW = 2 * DW
) (
  input  logic                 clk,
  input  logic signed [DW-1:0] dxx,
  input  logic signed [DW-1:0] dyy,
  input  logic signed [DW-1:0] dxy,
  output logic signed [HW-1:0] feature_score
);

  logic signed [HW-1:0] prod1, prod2;
  logic signed [HW-1:0] sq_full, sq_eighth;
  logic signed [HW-1:0] sq_diff;

  always_ff @(posedge clk) begin
    // stage 1
    prod1     <= HW'(dxx) * HW'(dyy);
    sq_full   <= HW'(dxy) * HW'(dxy);
    sq_eighth <= (HW'(dxy) * HW'(dxy)) >>> 3;
    // stage 2
    prod2     <= prod1;
    sq_diff   <= sq_full - sq_eighth;
    // stage 3
    feature_score <= prod2 - sq_diff;
  end

endmodule

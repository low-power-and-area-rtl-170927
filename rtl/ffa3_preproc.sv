// ffa3_preproc: pre-processing adders of the three-parallel symmetric FFA.
//
// From the three input phases of one block, X0 = x(3k), X1 = x(3k+1) and
// X2 = x(3k+2), it forms the sub-filter inputs
//   x12  = X1 + X2           (feeds H1+H2)
//   x02p = X0 + X2           (feeds H0+H2)
//   x02m = X0 - X2           (feeds H0-H2)
//   x012 = (X1 + X2) + X0    (feeds H0+H1+H2)
// with four improved carry select adders, the last reusing X1+X2.
// Subtraction is a + ~b with carry-in 1. Results carry one or two growth
// bits so nothing overflows. Purely combinational.
//
// The four sums come from the published equations; reusing X1+X2 and the
// widths are this design's choices.
module ffa3_preproc #(
  parameter int unsigned DW = 8
) (
  input  logic signed [DW-1:0] x0,
  input  logic signed [DW-1:0] x1,
  input  logic signed [DW-1:0] x2,
  output logic signed [DW:0]   x12,
  output logic signed [DW:0]   x02p,
  output logic signed [DW:0]   x02m,
  output logic signed [DW+1:0] x012
);

  logic signed [DW:0]   e0, e1, e2;
  logic signed [DW+1:0] w0, w12;

  assign e0  = (DW+1)'(x0);
  assign e1  = (DW+1)'(x1);
  assign e2  = (DW+1)'(x2);
  assign w0  = (DW+2)'(x0);
  assign w12 = (DW+2)'(x12);

  csla_bec #(.WIDTH(DW + 1)) u_add12  (.a(e1), .b(e2),  .cin(1'b0), .sum(x12),  .cout());
  csla_bec #(.WIDTH(DW + 1)) u_add02p (.a(e0), .b(e2),  .cin(1'b0), .sum(x02p), .cout());
  csla_bec #(.WIDTH(DW + 1)) u_sub02m (.a(e0), .b(~e2), .cin(1'b1), .sum(x02m), .cout());
  csla_bec #(.WIDTH(DW + 2)) u_add012 (.a(w12), .b(w0), .cin(1'b0), .sum(x012), .cout());

endmodule

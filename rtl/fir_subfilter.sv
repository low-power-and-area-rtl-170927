// fir_subfilter: length-M FIR sub-filter in transposed direct form, with
// multiplier sharing for symmetric and antisymmetric coefficient sets.
//
//   y(k) = sum_{m=0}^{M-1} c[m] * x(k-m)       (k counts enabled clocks)
//
// Transposed form: the input sample is multiplied by the coefficients once,
// and each product is added into a chain of M-1 registers that shifts towards
// the output. In SUB_SYMMETRIC form (c[m] = c[M-1-m]) only the first
// NC = ceil(M/2) coefficients are given and multiplied; product j feeds both
// tap j and tap M-1-j, so each multiplier output serves two taps except the
// middle one. SUB_ANTISYMMETRIC (c[m] = -c[M-1-m], middle coefficient zero)
// works the same way but subtracts the product at the mirrored taps. In
// SUB_GENERAL form all M coefficients are given and multiplied. Every form
// uses M-1 adders.
//
// Sharing multiplier outputs between mirrored taps follows the published design; the
// transposed structure, the widths and the reset are this design's choices.
//
// Interface: x is one signed sample, taken on a rising clk edge while en is
// high. y is combinational: it is the output for the sample now on x and the
// samples taken before. coef must be held constant while filtering.
// rst_n (asynchronous, active low) clears the delay chain.
module fir_subfilter
  import fir_pkg::*;
#(
  parameter int unsigned M     = 27,
  parameter sub_kind_e   KIND  = SUB_SYMMETRIC,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned C_W   = 8,
  parameter int unsigned ACC_W = 32,
  localparam int unsigned NC   = (KIND == SUB_GENERAL) ? M : (M + 1) / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [C_W-1:0]   coef [NC],
  output logic signed [ACC_W-1:0] y
);

  // One multiplier per distinct coefficient.
  logic signed [ACC_W-1:0] prod [NC];

  for (genvar j = 0; j < NC; j++) begin : g_mul
    assign prod[j] = ACC_W'(x) * ACC_W'(coef[j]);
  end

  // Tap m uses product tap_idx(m); tap_neg(m) marks a mirrored tap of an
  // antisymmetric set, where the product is subtracted.
  function automatic int tap_idx(int m);
    return (m < NC) ? m : M - 1 - m;
  endfunction

  function automatic bit tap_neg(int m);
    return (KIND == SUB_ANTISYMMETRIC) && (m >= NC);
  endfunction

  if (M == 1) begin : g_single
    assign y = prod[0];
  end else begin : g_chain
    // r[m] holds the partial sum that enters tap m-1 on the next sample.
    logic signed [ACC_W-1:0] r [1:M-1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int m = 1; m < M; m++) r[m] <= '0;
      end else if (en) begin
        for (int m = 1; m < M - 1; m++)
          r[m] <= tap_neg(m) ? r[m+1] - prod[tap_idx(m)] : r[m+1] + prod[tap_idx(m)];
        r[M-1] <= tap_neg(M - 1) ? -prod[tap_idx(M - 1)] : prod[tap_idx(M - 1)];
      end
    end

    assign y = prod[0] + r[1];
  end

endmodule

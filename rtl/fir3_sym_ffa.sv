// fir3_sym_ffa: three-parallel linear-phase FIR filter of odd length N with
// symmetric coefficients, built on a fast FIR algorithm (FFA) rearranged so
// that four of its six sub-filters have symmetric coefficients.
//
// The filter computes y(n) = sum_{i=0}^{N-1} h(i) x(n-i) for three samples
// per clock. With the polyphase split Hj = {h(3m+j)}, Xj = {x(3k+j)} and
// M = N/3, a symmetric odd-length h with N divisible by 3 gives: H1 is
// symmetric, H2 is H0 reversed, so H0+H2 and H0+H1+H2 are symmetric and
// H0-H2 is antisymmetric. The six length-M sub-filters are
//   H0 (general), H1 (symmetric), H1+H2 (general),
//   H0+H1+H2 (symmetric), H0+H2 (symmetric), H0-H2 (antisymmetric),
// and the symmetric/antisymmetric ones need only ceil(M/2) multipliers each.
// For N = 81 that is 27+14+27+14+14+14 = 110 multipliers and
// 6*26 + 15 = 171 adders (4 pre-processing, 11 post-processing, M-1 per
// sub-filter). The pre- and post-processing adders are improved carry select
// adders (csla_bec).
//
// Structure: ffa3_preproc -> six fir_subfilter -> ffa3_postproc -> output
// register. The sub-filter coefficient sets are formed here from the
// coefficient input by adders; they are meant to be static.
//
// Interface
//   x[0], x[1], x[2] : x(3k), x(3k+1), x(3k+2), signed DW bits, taken on a
//                      rising clk edge while in_valid is high. With
//                      in_valid low the filter holds its state (stall).
//   h_half[i]        : h(i) = h(N-1-i) for i = 0..(N-1)/2, signed CW bits,
//                      held constant while filtering.
//   y[0..2]          : y(3k), y(3k+1), y(3k+2), signed AW bits, full
//                      precision, registered: valid (out_valid high) one
//                      clock after the block was taken.
//   rst_n            : asynchronous, active low; clears all filter state,
//                      so the filter starts from zero history.
// N = 81 and the three-way parallelism follow the published design; DW, CW, AW,
// the handshake, the reset and the output register are this design's choices.
module fir3_sym_ffa
  import fir_pkg::*;
#(
  parameter int unsigned N  = 81,
  parameter int unsigned DW = 8,
  parameter int unsigned CW = 8,
  parameter int unsigned AW = 32,
  localparam int unsigned NH = (N + 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x      [3],
  input  logic signed [CW-1:0] h_half [NH],
  output logic                 out_valid,
  output logic signed [AW-1:0] y      [3]
);

  localparam int unsigned M   = N / 3;
  localparam int unsigned NCS = (M + 1) / 2;

  // Hardware cost of this structure (checked against the published counts).
  localparam int unsigned NUM_MULT = 2 * M + 4 * NCS;
  localparam int unsigned NUM_ADD  = 6 * (M - 1) + 15;

  if ((N % 3) != 0 || (N % 2) == 0) begin : g_bad_n
    $error("fir3_sym_ffa: N must be odd and a multiple of 3");
  end

  // Index into h_half for tap n of the full symmetric response.
  function automatic int hidx(int n);
    return (n < int'(NH)) ? n : int'(N) - 1 - n;
  endfunction

  // ---------------------------------------------------------------------
  // Sub-filter coefficient sets
  // ---------------------------------------------------------------------
  logic signed [CW-1:0] c_h0   [M];
  logic signed [CW:0]   c_h12  [M];
  logic signed [CW-1:0] c_h1   [NCS];
  logic signed [CW+1:0] c_h012 [NCS];
  logic signed [CW:0]   c_h02p [NCS];
  logic signed [CW:0]   c_h02m [NCS];

  for (genvar m = 0; m < M; m++) begin : g_cgen
    assign c_h0[m]  = h_half[hidx(3*m)];
    assign c_h12[m] = (CW+1)'(h_half[hidx(3*m+1)]) + (CW+1)'(h_half[hidx(3*m+2)]);
  end

  for (genvar m = 0; m < NCS; m++) begin : g_csym
    assign c_h1[m]   = h_half[hidx(3*m+1)];
    assign c_h012[m] = (CW+2)'(h_half[hidx(3*m)]) + (CW+2)'(h_half[hidx(3*m+1)])
                     + (CW+2)'(h_half[hidx(3*m+2)]);
    assign c_h02p[m] = (CW+1)'(h_half[hidx(3*m)]) + (CW+1)'(h_half[hidx(3*m+2)]);
    assign c_h02m[m] = (CW+1)'(h_half[hidx(3*m)]) - (CW+1)'(h_half[hidx(3*m+2)]);
  end

  // ---------------------------------------------------------------------
  // Pre-processing
  // ---------------------------------------------------------------------
  logic signed [DW:0]   x12, x02p, x02m;
  logic signed [DW+1:0] x012;

  ffa3_preproc #(.DW(DW)) u_pre (
    .x0(x[0]), .x1(x[1]), .x2(x[2]),
    .x12(x12), .x02p(x02p), .x02m(x02m), .x012(x012)
  );

  // ---------------------------------------------------------------------
  // Sub-filters
  // ---------------------------------------------------------------------
  logic signed [AW-1:0] f_h0, f_h1, f_h12, f_h012, f_h02p, f_h02m;

  fir_subfilter #(.M(M), .KIND(SUB_GENERAL), .IN_W(DW), .C_W(CW), .ACC_W(AW)) u_h0 (
    .clk, .rst_n, .en(in_valid), .x(x[0]), .coef(c_h0), .y(f_h0)
  );
  fir_subfilter #(.M(M), .KIND(SUB_SYMMETRIC), .IN_W(DW), .C_W(CW), .ACC_W(AW)) u_h1 (
    .clk, .rst_n, .en(in_valid), .x(x[1]), .coef(c_h1), .y(f_h1)
  );
  fir_subfilter #(.M(M), .KIND(SUB_GENERAL), .IN_W(DW+1), .C_W(CW+1), .ACC_W(AW)) u_h12 (
    .clk, .rst_n, .en(in_valid), .x(x12), .coef(c_h12), .y(f_h12)
  );
  fir_subfilter #(.M(M), .KIND(SUB_SYMMETRIC), .IN_W(DW+2), .C_W(CW+2), .ACC_W(AW)) u_h012 (
    .clk, .rst_n, .en(in_valid), .x(x012), .coef(c_h012), .y(f_h012)
  );
  fir_subfilter #(.M(M), .KIND(SUB_SYMMETRIC), .IN_W(DW+1), .C_W(CW+1), .ACC_W(AW)) u_h02p (
    .clk, .rst_n, .en(in_valid), .x(x02p), .coef(c_h02p), .y(f_h02p)
  );
  fir_subfilter #(.M(M), .KIND(SUB_ANTISYMMETRIC), .IN_W(DW+1), .C_W(CW+1), .ACC_W(AW)) u_h02m (
    .clk, .rst_n, .en(in_valid), .x(x02m), .coef(c_h02m), .y(f_h02m)
  );

  // ---------------------------------------------------------------------
  // Post-processing
  // ---------------------------------------------------------------------
  logic signed [AW-1:0] y0_c, y1_c, y2_c;

  ffa3_postproc #(.AW(AW)) u_post (
    .clk, .rst_n, .en(in_valid),
    .a(f_h0), .b(f_h1), .q(f_h12), .p(f_h012), .e(f_h02p), .f(f_h02m),
    .y0(y0_c), .y1(y1_c), .y2(y2_c)
  );

  // ---------------------------------------------------------------------
  // Output register
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 3; i++) y[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y[0] <= y0_c;
        y[1] <= y1_c;
        y[2] <= y2_c;
      end
    end
  end

endmodule

// ffa3_postproc: post-processing adders and block delays of the
// three-parallel symmetric FFA.
//
// Inputs are the six sub-filter outputs of one block:
//   a = H0*X0, b = H1*X1, q = (H1+H2)(X1+X2), p = (H0+H1+H2)(X0+X1+X2),
//   e = (H0+H2)(X0+X2), f = (H0-H2)(X0-X2).
// Since e + f = 2(H0X0 + H2X2) and e - f = 2(H0X2 + H2X0) are always even,
// halving them by an arithmetic shift is exact:
//   s2 = (e + f) / 2            = H0X0 + H2X2
//   d2 = (e - f) / 2            = H0X2 + H2X0
//   t  = s2 - a                 = H2X2
//   Y0 = a + D{ (q - b) - t }   = H0X0 + D{H1X2 + H2X1}
//   Y1 = ((p - q) - e) + t + D{t} = H0X1 + H1X0 + D{H2X2}
//   Y2 = b + d2                 = H1X1 + H0X2 + H2X0
// where D{} is a delay of one block (z^-3 at the sample rate). That is
// eleven improved carry select adders and two block-delay registers.
//
// The equations follow the published rearranged FFA. Computing the full
// (H0 +/- H2) sub-filters and halving the sum and difference afterwards,
// instead of halving the coefficients, is this design's choice so that
// integer coefficients stay exact.
//
// Interface: the sub-filter outputs are taken as they stand; the y outputs
// are combinational. The two delay registers load on a rising clk edge while
// en is high, and clear on rst_n low (asynchronous).
module ffa3_postproc #(
  parameter int unsigned AW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [AW-1:0] a,
  input  logic signed [AW-1:0] b,
  input  logic signed [AW-1:0] q,
  input  logic signed [AW-1:0] p,
  input  logic signed [AW-1:0] e,
  input  logic signed [AW-1:0] f,
  output logic signed [AW-1:0] y0,
  output logic signed [AW-1:0] y1,
  output logic signed [AW-1:0] y2
);

  logic signed [AW-1:0] s, d, s2, d2, t, u, v, w, w2, w3;
  logic signed [AW-1:0] v_dly, t_dly;

  // Sum and difference of the two half-band sub-filters, then exact halving.
  csla_bec #(.WIDTH(AW)) u_s   (.a(e),  .b(f),   .cin(1'b0), .sum(s),  .cout());
  csla_bec #(.WIDTH(AW)) u_d   (.a(e),  .b(~f),  .cin(1'b1), .sum(d),  .cout());
  assign s2 = s >>> 1;
  assign d2 = d >>> 1;

  // H2X2
  csla_bec #(.WIDTH(AW)) u_t   (.a(s2), .b(~a),  .cin(1'b1), .sum(t),  .cout());

  // Y2
  csla_bec #(.WIDTH(AW)) u_y2  (.a(b),  .b(d2),  .cin(1'b0), .sum(y2), .cout());

  // Y0: H0X0 + D{(H1+H2)(X1+X2) - H1X1 - H2X2}
  csla_bec #(.WIDTH(AW)) u_u   (.a(q),  .b(~b),  .cin(1'b1), .sum(u),  .cout());
  csla_bec #(.WIDTH(AW)) u_v   (.a(u),  .b(~t),  .cin(1'b1), .sum(v),  .cout());
  csla_bec #(.WIDTH(AW)) u_y0  (.a(a),  .b(v_dly), .cin(1'b0), .sum(y0), .cout());

  // Y1: P - Q - (H0+H2)(X0+X2) + H2X2 + D{H2X2}
  csla_bec #(.WIDTH(AW)) u_w   (.a(p),  .b(~q),  .cin(1'b1), .sum(w),  .cout());
  csla_bec #(.WIDTH(AW)) u_w2  (.a(w),  .b(~e),  .cin(1'b1), .sum(w2), .cout());
  csla_bec #(.WIDTH(AW)) u_w3  (.a(w2), .b(t),   .cin(1'b0), .sum(w3), .cout());
  csla_bec #(.WIDTH(AW)) u_y1  (.a(w3), .b(t_dly), .cin(1'b0), .sum(y1), .cout());

  // Block delays (z^-3).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_dly <= '0;
      t_dly <= '0;
    end else if (en) begin
      v_dly <= v;
      t_dly <= t;
    end
  end

endmodule

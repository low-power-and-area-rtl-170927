// csla_bec: improved square-root carry select adder (CSLA with BEC).
//
// The WIDTH-bit operands are split into groups of 2, 2, 3, 4, 5, ... bits
// (16 bits: [1:0], [3:2], [6:4], [10:7], [15:11]). Group 0 is a plain ripple
// carry adder fed by the carry-in. Every higher group of n bits has one
// n-bit RCA with carry-in 0, giving an (n+1)-bit {carry, sum}; an (n+1)-bit
// binary to excess-1 converter adds one to that word to give the result for
// carry-in 1. A 2:1 mux of (n+1)-bit words, steered by the carry out of the
// group below, picks the group's sum bits and its carry out. Compared with
// the classic CSLA, the BEC replaces the second (carry-in 1) RCA of every
// group, which saves gates at the cost of a slightly longer path.
//
// Group structure, the BEC sizes and the mux sizes (6:3, 8:4, 10:5, 12:6 for
// 16 bits) follow the published 16-bit adder. How the group sequence is
// continued or cut for other widths is this design's own rule (see fir_pkg).
// Purely combinational: sum = a + b + cin, cout = carry out of bit WIDTH-1.
module csla_bec #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int NG = fir_pkg::csla_num_groups(WIDTH);

  // carry[g] is the carry into group g; carry[NG] is the adder's carry out.
  logic [NG:0] carry;

  assign carry[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LSB = fir_pkg::csla_group_lsb(g);
    localparam int GW  = fir_pkg::csla_group_width(WIDTH, g);

    if (g == 0) begin : g_first
      // Lowest group: ripple carry adder with the real carry-in.
      rca #(.N(GW)) u_rca (
        .a   (a[LSB +: GW]),
        .b   (b[LSB +: GW]),
        .cin (carry[0]),
        .sum (sum[LSB +: GW]),
        .cout(carry[1])
      );
    end else begin : g_sel
      logic [GW-1:0] s0;
      logic          c0;
      logic [GW:0]   r1;   // {carry, sum} for carry-in 1

      rca #(.N(GW)) u_rca (
        .a   (a[LSB +: GW]),
        .b   (b[LSB +: GW]),
        .cin (1'b0),
        .sum (s0),
        .cout(c0)
      );

      bec #(.N(GW + 1)) u_bec (
        .b({c0, s0}),
        .x(r1)
      );

      // (2*(GW+1)):(GW+1) multiplexer steered by the carry from below.
      assign {carry[g+1], sum[LSB +: GW]} = carry[g] ? r1 : {c0, s0};
    end
  end

  assign cout = carry[NG];

endmodule

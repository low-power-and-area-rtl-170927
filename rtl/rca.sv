// rca: N-bit ripple carry adder.
//
// A chain of N full adders, sum = a ^ b ^ c and carry = majority(a, b, c),
// each carry feeding the next bit. Purely combinational. The carry select
// adder uses these as the per-group adders (the published design names them, e.g.
// "15:11 RCA"; the full-adder gate equations are the standard ones).
module rca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end
  assign cout = c[N];

endmodule

// bec: binary to excess-1 converter.
//
// Adds one to an N-bit word without a carry-in input or full adders: bit 0
// is inverted, and every higher bit i is XORed with the AND of all bits below
// it (b[i] ^ &b[i-1:0]). This is the gate structure commonly used for the
// converter; the published design gives its function as a truth table
// (0000->0001, 0001->0010, ...), the gate network here is this design's own.
// Purely combinational. Wraps to zero when the input is all ones.
//
// In the improved carry select adder an (n+1)-bit BEC takes {carry, sum} of
// an n-bit ripple carry adder that assumed carry-in 0, and produces the result
// for carry-in 1.
module bec #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);

  // all_ones[i] = AND of b[i-1:0]
  logic [N-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  for (genvar i = 0; i < N; i++) begin : g_bit
    if (i > 0) begin : g_and
      assign all_ones[i] = all_ones[i-1] & b[i-1];
    end
    assign x[i] = b[i] ^ all_ones[i];
  end

endmodule

// sor_csa: W-bit carry-save adder.
//
// Reduces three W-bit addends x, y, z to a W-bit sum word and a (W+1)-bit
// carry word with x + y + z == sum + carry. Each bit position is an
// independent full adder: sum is the XOR of the three bits, the carry is their
// majority, weighted one place higher, so carry[0] is always 0. There is no
// carry propagation, so the delay does not depend on W.
//
// Purely combinational. Widths follow the conventional n-bit carry-save adder
// of the design (three n-bit inputs, n-bit sum, (n+1)-bit carry).
module sor_csa #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W:0]   carry
);

  always_comb begin
    sum   = x ^ y ^ z;
    carry = {(x & y) | (x & z) | (y & z), 1'b0};
  end

endmodule

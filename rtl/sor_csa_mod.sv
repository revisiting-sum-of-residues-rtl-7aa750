// sor_csa_mod: modified W-bit carry-save adder with one (W+1)-bit input.
//
// x and z are W bits wide, y is W+1 bits wide. The low W bits of the three
// inputs go through an ordinary W-bit carry-save adder; the extra top bit of y
// has nothing to add to at its weight, so it is copied straight into bit W of
// the sum word. Both outputs are W+1 bits and x + y + z == sum + carry exactly.
// This lets the (W+1)-bit carry word of a previous carry-save stage be fed in
// without a wider adder or a multiplexer, at no extra gate cost.
//
// Purely combinational. The copied top bit is the published modification; the
// reuse of sor_csa for the low bits is only how it is written here.
module sor_csa_mod #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] x,
  input  logic [W:0]   y,
  input  logic [W-1:0] z,
  output logic [W:0]   sum,
  output logic [W:0]   carry
);

  logic [W-1:0] low_sum;

  sor_csa #(.W(W)) u_csa (
    .x    (x),
    .y    (y[W-1:0]),
    .z    (z),
    .sum  (low_sum),
    .carry(carry)
  );

  assign sum = {y[W], low_sum};

endmodule

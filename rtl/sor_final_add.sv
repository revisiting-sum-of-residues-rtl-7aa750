// sor_final_add: turns the carry-save result of the last iteration into one
// (N+1)-bit binary value congruent to it modulo M.
//
// Adding c1 and c2 directly could give an (N+2)-bit value, so the same trick as
// in the iterations is used once more, one bit lower: both words keep only
// their low N-1 bits, and the bits above (q1 = c1 >> (N-1), q2 = c2 >> (N-1))
// are replaced by their value modulo M, (q1 + q2) * 2^(N-1) mod M, read from a
// second residue ROM. The two (N-1)-bit halves are added by an N-bit
// carry-propagate adder and the residue by an (N+1)-bit one, so
//   c = (c1 mod 2^(N-1)) + (c2 mod 2^(N-1)) + ((q1 + q2) * 2^(N-1) mod M)
//     < 2^N - 2 + M < 2^(N+1).
// c is congruent to c1 + c2 modulo M but not necessarily below M.
//
// CW is the width of the carry-save words: N+1 for the radix-2 multiplier,
// N+K+1 for the radix-2^K one, whose q words are then K+2 bits wide.
// The fold, its second table and the two adders follow the published final
// step for radix 2; using it for the radix-2^K words is this design's choice.
// Purely combinational.
module sor_final_add #(
  parameter int unsigned  N  = 24,
  parameter int unsigned  CW = N + 1,
  parameter logic [N-1:0] M  = N'(16777213)
) (
  input  logic [CW-1:0] c1,
  input  logic [CW-1:0] c2,
  output logic [N:0]    c
);

  localparam int unsigned QBW = CW - (N - 1);

  logic [QBW-1:0] q1, q2;
  logic [N-2:0]   l1, l2;
  logic [N-1:0]   lsum;
  logic [N-1:0]   res;

  assign q1 = c1[CW-1:N-1];
  assign q2 = c2[CW-1:N-1];
  assign l1 = c1[N-2:0];
  assign l2 = c2[N-2:0];

  sor_residue_rom #(.N(N), .QBW(QBW), .SHIFT(N - 1), .M(M)) u_lut (
    .q1 (q1),
    .q2 (q2),
    .res(res)
  );

  always_comb begin
    lsum = {1'b0, l1} + {1'b0, l2};
    c    = {1'b0, lsum} + {1'b0, res};
  end

endmodule

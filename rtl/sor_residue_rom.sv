// sor_residue_rom: lookup table of the precomputed residues (q1 + q2) * 2^SHIFT mod M.
//
// The multiplier clears the top bits q1 and q2 of its two carry-save words and
// adds back what they were worth modulo M. Because only the sum q1 + q2
// matters, the table is indexed by that sum: for QBW-bit q1 and q2 the sum
// ranges over 0 .. 2*(2^QBW - 1), so the table has 2^(QBW+1) - 1 entries of
// N bits (7 entries for the 2-bit q of the radix-2 multiplier). The small
// adder forming the index is part of this block.
//
// The 7-entry table addressed by the sum is the published reduced form; the
// index adder and computing the contents at elaboration from the parameter M
// are this design's choices. The contents depend only on M and SHIFT, so the
// table is a ROM. Purely combinational: res follows q1, q2.
module sor_residue_rom
  import sor_pkg::*;
#(
  parameter int unsigned   N     = 24,
  parameter int unsigned   QBW   = 2,
  parameter int unsigned   SHIFT = 24,
  parameter logic [N-1:0]  M     = N'(16777213)
) (
  input  logic [QBW-1:0] q1,
  input  logic [QBW-1:0] q2,
  output logic [N-1:0]   res
);

  localparam int unsigned DEPTH = (2 ** (QBW + 1)) - 1;

  logic [QBW:0]   idx;
  logic [N-1:0]   rom [DEPTH];

  for (genvar j = 0; j < DEPTH; j++) begin : g_rom
    localparam wide_t VAL = pow2_residue(wide_t'(j), SHIFT, wide_t'(M));
    assign rom[j] = VAL[N-1:0];
  end

  assign idx = {1'b0, q1} + {1'b0, q2};
  assign res = rom[idx];

endmodule

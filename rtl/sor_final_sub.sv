// sor_final_sub: full reduction of the multiplier output into [0, M).
//
// The multiplier delivers c < 2^N - 2 + M, congruent to the product but
// possibly above M. This block carries out "while c >= M, subtract M" as an
// unrolled chain of compare-and-subtract stages. The number of stages is the
// largest number of subtractions any legal input can need,
// floor((2^N - 2 + M - 1) / M), computed at elaboration: two stages for any
// modulus with its top bit set (M >= 2^(N-1)), more for smaller moduli. The
// chain is combinational.
//
// A single stage alone would already give an N-bit (but not fully reduced)
// result; the chain is this design's choice of a fully reduced output.
module sor_final_sub
  import sor_pkg::*;
#(
  parameter int unsigned  N = 24,
  parameter logic [N-1:0] M = N'(16777213)
) (
  input  logic [N:0]   c,
  output logic [N-1:0] r
);

  localparam int unsigned NSUB = final_subs(N, wide_t'(M));

  logic [N:0] v [NSUB+1];
  logic [NSUB-1:0] took;

  assign v[0] = c;
  for (genvar j = 0; j < NSUB; j++) begin : g_stage
    assign took[j]  = (v[j] >= {1'b0, M});
    assign v[j + 1] = took[j] ? v[j] - {1'b0, M} : v[j];
  end

  assign r = v[NSUB][N-1:0];

  initial begin
    assert (M > 1) else $error("sor_final_sub: modulus must be above 1");
  end

endmodule

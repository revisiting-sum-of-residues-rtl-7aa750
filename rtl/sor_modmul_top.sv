// sor_modmul_top: the two sum of residues modular multipliers side by side.
//
// r2_*: the radix-2 multiplier (sor_modmul_r2), N iterations per product.
// rk_*: the radix-2^K multiplier (sor_modmul_rk), ceil(N/K) iterations.
// Both compute c = a * b mod M for the same elaboration-time modulus M and
// word length N, and each has its own start/busy/done handshake and operands
// (see the two modules for the timing). Both also give the folded result
// c_raw < 2^(N+1), congruent to a * b, for users that accept an incompletely
// reduced residue. rst_n is an asynchronous active-low reset shared by both.
//
// The defaults are a 24-bit channel, the widest word length the design was
// evaluated at, with M = 2^24 - 3 and radix 4; the modulus and the radix are
// this design's choices.
module sor_modmul_top #(
  parameter int unsigned  N = 24,
  parameter int unsigned  K = 2,
  parameter logic [N-1:0] M = N'(16777213)
) (
  input  logic         clk,
  input  logic         rst_n,

  input  logic         r2_start,
  input  logic [N-1:0] r2_a,
  input  logic [N-1:0] r2_b,
  output logic         r2_busy,
  output logic         r2_done,
  output logic [N:0]   r2_c_raw,
  output logic [N-1:0] r2_c,

  input  logic         rk_start,
  input  logic [N-1:0] rk_a,
  input  logic [N-1:0] rk_b,
  output logic         rk_busy,
  output logic         rk_done,
  output logic [N:0]   rk_c_raw,
  output logic [N-1:0] rk_c
);

  sor_modmul_r2 #(.N(N), .M(M)) u_r2 (
    .clk  (clk),
    .rst_n(rst_n),
    .start(r2_start),
    .a    (r2_a),
    .b    (r2_b),
    .busy (r2_busy),
    .done (r2_done),
    .c_raw(r2_c_raw),
    .c    (r2_c)
  );

  sor_modmul_rk #(.N(N), .K(K), .M(M)) u_rk (
    .clk  (clk),
    .rst_n(rst_n),
    .start(rk_start),
    .a    (rk_a),
    .b    (rk_b),
    .busy (rk_busy),
    .done (rk_done),
    .c_raw(rk_c_raw),
    .c    (rk_c)
  );

endmodule

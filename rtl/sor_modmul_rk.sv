// sor_modmul_rk: iterative radix-2^K sum of residues modular multiplier,
// c = a * b mod M.
//
// The radix-2^K form of sor_modmul_r2: each clock consumes one K-bit digit of
// a (most significant digit first), so a multiplication takes ceil(N/K)
// iterations. The carry-save words C1, C2 are N+K+1 bits and the bits above
// bit N-1 of each (q1 = C1 >> N, q2 = C2 >> N, K+1 bits each) are cleared
// every iteration:
//   {T1, T2} = rC1' + rC2' + a_i*B          (N+K)-bit carry-save adder
//   {C1, C2} = T1 + T2 + LUT(q1, q2)        modified (N+K)-bit carry-save adder
// with r = 2^K, rC' = (C mod 2^N) * 2^K and LUT(q1, q2) = (q1 + q2) * 2^(N+K)
// mod M, an N-bit value zero-extended into the second adder. a_i*B is a K by N
// bit product. The digits of a are taken from a zero-extended to a whole
// number of digits.
//
// The published architecture stops at the loop. The final step here is this
// design's own: the same fold as the radix-2 multiplier, splitting C1, C2 at
// bit N-1 with a residue table of (q1 + q2) * 2^(N-1) mod M for the K+2 bit
// tops (sor_final_add), then the same full reduction (sor_final_sub).
//
// Interface and timing: as sor_modmul_r2, with ceil(N/K) iterations: done
// pulses ceil(N/K)+1 clocks after the start edge. 1 < M < 2^N, a, b < 2^N.
// rst_n is an asynchronous active-low reset.
module sor_modmul_rk #(
  parameter int unsigned  N = 24,
  parameter int unsigned  K = 2,
  parameter logic [N-1:0] M = N'(16777213)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [N:0]   c_raw,
  output logic [N-1:0] c
);

  localparam int unsigned D    = (N + K - 1) / K;   // digits of a
  localparam int unsigned AW   = D * K;
  localparam int unsigned W    = N + K;             // carry-save adder width
  localparam int unsigned CNTW = $clog2(D + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FINAL} state_t;

  state_t          state;
  logic [CNTW-1:0] cnt;
  logic [AW-1:0]   a_sh;
  logic [N-1:0]    b_q;
  logic [W:0]      c1_q, c2_q;

  // one iteration
  logic [W-1:0] r_c1, r_c2, aib, t1, lut_w;
  logic [N-1:0] lut;
  logic [W:0]   t2, c1_d, c2_d;
  logic [K:0]   q1, q2;
  logic [K-1:0] digit;

  assign q1     = c1_q[W:N];
  assign q2     = c2_q[W:N];
  assign r_c1   = {c1_q[N-1:0], {K{1'b0}}};
  assign r_c2   = {c2_q[N-1:0], {K{1'b0}}};
  assign digit  = a_sh[AW-1 -: K];
  assign aib    = W'(digit) * W'(b_q);
  assign lut_w  = W'(lut);

  sor_csa #(.W(W)) u_csa1 (
    .x    (r_c1),
    .y    (r_c2),
    .z    (aib),
    .sum  (t1),
    .carry(t2)
  );

  sor_residue_rom #(.N(N), .QBW(K + 1), .SHIFT(W), .M(M)) u_lut (
    .q1 (q1),
    .q2 (q2),
    .res(lut)
  );

  sor_csa_mod #(.W(W)) u_csa2 (
    .x    (t1),
    .y    (t2),
    .z    (lut_w),
    .sum  (c1_d),
    .carry(c2_d)
  );

  // final step
  logic [N:0]   c_raw_d;
  logic [N-1:0] c_d;

  sor_final_add #(.N(N), .CW(W + 1), .M(M)) u_fadd (
    .c1(c1_q),
    .c2(c2_q),
    .c (c_raw_d)
  );

  sor_final_sub #(.N(N), .M(M)) u_fsub (
    .c   (c_raw_d),
    .r   (c_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      a_sh  <= '0;
      b_q   <= '0;
      c1_q  <= '0;
      c2_q  <= '0;
      done  <= 1'b0;
      c_raw <= '0;
      c     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_sh  <= AW'(a);
          b_q   <= b;
          c1_q  <= '0;
          c2_q  <= '0;
          cnt   <= CNTW'(D - 1);
          state <= S_RUN;
        end
        S_RUN: begin
          c1_q <= c1_d;
          c2_q <= c2_d;
          a_sh <= a_sh << K;
          cnt  <= cnt - 1'b1;
          if (cnt == '0) state <= S_FINAL;
        end
        S_FINAL: begin
          c_raw <= c_raw_d;
          c     <= c_d;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_result_reduced: assert property (@(posedge clk) done |-> c < M)
    else $error("sor_modmul_rk: result %0d not below M", c);

endmodule

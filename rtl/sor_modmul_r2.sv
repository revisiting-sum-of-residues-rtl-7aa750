// sor_modmul_r2: iterative radix-2 sum of residues modular multiplier,
// c = a * b mod M.
//
// The partial result is kept in carry-save form as two (N+1)-bit words C1, C2
// and never converted to binary inside the loop. One iteration per clock,
// for i = N-1 down to 0 (multiplier bits MSB first):
//   {T1, T2} = 2C1' + 2C2' + a_i*B          N-bit carry-save adder
//   {C1, C2} = T1 + T2 + LUT(q1, q2)        modified N-bit carry-save adder
// where q1, q2 are the top two bits of the previous C1, C2 (C >> (N-1)),
// 2C' = 2C & (2^N - 1) is the previous word shifted left with those two bits
// dropped, and LUT(q1, q2) = (q1 + q2) * 2^N mod M is what the dropped bits
// were worth after the doubling. The residue lookup depends only on registered
// state, so it runs in parallel with the first adder. After the last
// iteration sor_final_add folds C1, C2 into c_raw < 2^(N+1), congruent to
// a * b mod M, and sor_final_sub reduces that into [0, M).
//
// M is fixed at elaboration (the residue tables are ROMs); it must satisfy
// 1 < M < 2^N. a and b must be below 2^N; b need not be below M.
//
// Interface and timing: start is sampled while idle, together with a and b.
// The N iterations take the next N clocks, the result is registered on the
// clock after that: done pulses for one cycle N+1 clocks after the start edge,
// with c_raw and c valid from then until the next result. busy is high from
// the cycle after start until done. start while busy is ignored.
// rst_n is an asynchronous active-low reset.
//
// The datapath follows the published architecture; the registers, the
// counter, the handshake and the reset are this design's own choices.
module sor_modmul_r2 #(
  parameter int unsigned  N = 24,
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

  localparam int unsigned CNTW = $clog2(N + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FINAL} state_t;

  state_t          state;
  logic [CNTW-1:0] cnt;
  logic [N-1:0]    a_sh, b_q;
  logic [N:0]      c1_q, c2_q;

  // one iteration
  logic [N-1:0] two_c1, two_c2, aib, t1, lut;
  logic [N:0]   t2, c1_d, c2_d;
  logic [1:0]   q1, q2;

  assign q1     = c1_q[N:N-1];
  assign q2     = c2_q[N:N-1];
  assign two_c1 = {c1_q[N-2:0], 1'b0};
  assign two_c2 = {c2_q[N-2:0], 1'b0};
  assign aib    = a_sh[N-1] ? b_q : '0;

  sor_csa #(.W(N)) u_csa1 (
    .x    (two_c1),
    .y    (two_c2),
    .z    (aib),
    .sum  (t1),
    .carry(t2)
  );

  sor_residue_rom #(.N(N), .QBW(2), .SHIFT(N), .M(M)) u_lut (
    .q1 (q1),
    .q2 (q2),
    .res(lut)
  );

  sor_csa_mod #(.W(N)) u_csa2 (
    .x    (t1),
    .y    (t2),
    .z    (lut),
    .sum  (c1_d),
    .carry(c2_d)
  );

  // final step
  logic [N:0]   c_raw_d;
  logic [N-1:0] c_d;

  sor_final_add #(.N(N), .CW(N + 1), .M(M)) u_fadd (
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
          a_sh  <= a;
          b_q   <= b;
          c1_q  <= '0;
          c2_q  <= '0;
          cnt   <= CNTW'(N - 1);
          state <= S_RUN;
        end
        S_RUN: begin
          c1_q <= c1_d;
          c2_q <= c2_d;
          a_sh <= a_sh << 1;
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

  // The folded result always fits N+1 bits with room to spare and the
  // reduced one is below M.
  a_result_reduced: assert property (@(posedge clk) done |-> c < M)
    else $error("sor_modmul_r2: result %0d not below M", c);

endmodule

// sor_mm_harness: test driver for one modular multiplier instance.
//
// Instantiates sor_modmul_r2 (K = 1) or sor_modmul_rk (K > 1) with the given
// word length N and modulus M, then runs products through the start/done
// handshake: every (a, b) pair when EXHAUSTIVE is set, otherwise NRAND random
// pairs plus corner values. Each product is checked against a * b mod M
// computed here with 64-bit integer arithmetic, together with:
//   - the folded output c_raw: congruent to a * b and below 2^N - 2 + M,
//   - the latency: done exactly N+1 (radix 2) or ceil(N/K)+1 clocks after the
//     start edge,
//   - busy during the operation, and that a start pulse with other operands
//     while busy is ignored.
// Raises finished when done; checks and failures count its own checks.
module sor_mm_harness #(
  parameter int unsigned     N          = 4,
  parameter longint unsigned M          = 9,
  parameter int unsigned     K          = 1,
  parameter bit              EXHAUSTIVE = 1'b1,
  parameter int unsigned     NRAND      = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int unsigned LAT = ((K == 1) ? N : (N + K - 1) / K) + 1;
  localparam longint unsigned AMAX = (64'd1 << N) - 1;

  logic         start;
  logic [N-1:0] a, b;
  logic         busy, done;
  logic [N:0]   c_raw;
  logic [N-1:0] c;

  if (K == 1) begin : g_r2
    sor_modmul_r2 #(.N(N), .M(N'(M))) dut (
      .clk, .rst_n, .start, .a, .b, .busy, .done, .c_raw, .c
    );
  end else begin : g_rk
    sor_modmul_rk #(.N(N), .K(K), .M(N'(M))) dut (
      .clk, .rst_n, .start, .a, .b, .busy, .done, .c_raw, .c
    );
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL [N=%0d K=%0d M=%0d] %s", N, K, M, what);
    end
  endfunction

  function automatic longint unsigned rnd();
    return {$urandom, $urandom} & AMAX;
  endfunction

  task automatic run_op(input longint unsigned av, input longint unsigned bv);
    longint unsigned expv;
    int cyc;
    expv = (av * bv) % M;
    @(negedge clk);
    a     = N'(av);
    b     = N'(bv);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a     = N'(rnd());
    b     = N'(rnd());
    cyc   = 0;
    check(busy === 1'b1, "busy after start");
    while (!done && cyc < LAT + 20) begin
      // a second start while busy must not disturb the product in flight
      start = (cyc == 2);
      @(negedge clk);
      cyc++;
    end
    start = 1'b0;
    check(done === 1'b1, "done never came");
    check(cyc == LAT, $sformatf("latency %0d, expected %0d", cyc, LAT));
    check(longint'(c) == expv,
          $sformatf("%0d*%0d: c=%0d expected %0d", av, bv, c, expv));
    check((longint'(c_raw) % M) == expv && longint'(c_raw) <= AMAX - 1 + M - 1,
          $sformatf("%0d*%0d: c_raw=%0d not congruent or out of bound", av, bv, c_raw));
    @(negedge clk);
    check(done === 1'b0 && busy === 1'b0, "done is a single-cycle pulse");
  endtask

  initial begin
    finished = 1'b0;
    checks   = 0;
    failures = 0;
    start    = 1'b0;
    a        = '0;
    b        = '0;
    wait (rst_n === 1'b1);
    if (EXHAUSTIVE) begin
      for (longint unsigned av = 0; av <= AMAX; av++)
        for (longint unsigned bv = 0; bv <= AMAX; bv++)
          run_op(av, bv);
    end else begin
      run_op(AMAX, AMAX);
      run_op(M - 1, M - 1);
      run_op(0, AMAX);
      run_op(AMAX, 1);
      for (int unsigned t = 0; t < NRAND; t++) run_op(rnd(), rnd());
    end
    finished = 1'b1;
  end

endmodule

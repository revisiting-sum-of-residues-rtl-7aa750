// sor_modmul_top_tb: end-to-end test of sor_modmul_top at its default
// parameters (24-bit operands, M = 2^24 - 3, radix 4 for the second multiplier).
//
// Both multipliers run streams of products at the same time, each through its
// own handshake, with back-to-back starts and a start pulse while busy that
// must be ignored. Every product is checked against a * b mod M worked out
// here, the folded output against its congruence and bound, and the latency
// against 25 clocks (radix 2) and 13 clocks (radix 4).
//
// It also counts how often each mechanism of the multipliers was exercised
// and fails if one never was: a nonzero residue added in the loop (top bits
// cleared), a loop table entry for a large q1 + q2, the extra top bit of the first
// adder's carry word passing through the modified adder, a nonzero residue in
// the final fold, and zero and one final subtraction of M. (Two
// subtractions need c_raw >= 2M, which at M = 2^24 - 3 only the single
// largest folded value reaches; sor_final_sub_tb covers that case.)
module sor_modmul_top_tb;

  localparam int unsigned     N   = 24;
  localparam int unsigned     K   = 2;
  localparam longint unsigned M   = 16777213;
  localparam longint unsigned MSK = (64'd1 << N) - 1;
  localparam int unsigned     NOPS = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         r2_start, rk_start;
  logic [N-1:0] r2_a, r2_b, rk_a, rk_b;
  logic         r2_busy, r2_done, rk_busy, rk_done;
  logic [N:0]   r2_c_raw, rk_c_raw;
  logic [N-1:0] r2_c, rk_c;

  sor_modmul_top dut (
    .clk, .rst_n,
    .r2_start, .r2_a, .r2_b, .r2_busy, .r2_done, .r2_c_raw, .r2_c,
    .rk_start, .rk_a, .rk_b, .rk_busy, .rk_done, .rk_c_raw, .rk_c
  );

  int checks = 0, failures = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endfunction

  function automatic longint unsigned rnd();
    return {$urandom, $urandom} & MSK;
  endfunction

  // operand streams: corner values first, then random
  function automatic longint unsigned operand(int t, bit second);
    case (t)
      0: return MSK;
      1: return M - 1;
      2: return second ? MSK : 1;
      default: return rnd();
    endcase
  endfunction

  // ---------------------------------------------------------------- drivers
  bit r2_fin = 0, rk_fin = 0;
  int subs_seen [3] = '{0, 0, 0};

  task automatic note_result(string tag, longint unsigned av, longint unsigned bv,
                             longint unsigned c, longint unsigned c_raw, int cyc, int lat);
    longint unsigned expv = (av * bv) % M;
    check(c == expv, $sformatf("%s %0d*%0d: c=%0d expected %0d", tag, av, bv, c, expv));
    check(c_raw % M == expv && c_raw <= MSK - 1 + M - 1,
          $sformatf("%s %0d*%0d: c_raw=%0d", tag, av, bv, c_raw));
    check(cyc == lat, $sformatf("%s latency %0d expected %0d", tag, cyc, lat));
    if (c_raw >= c && (c_raw - c) / M <= 2) subs_seen[(c_raw - c) / M]++;
  endtask

  initial begin : drive_r2
    longint unsigned av, bv;
    int cyc;
    r2_start = 1'b0;
    r2_a = '0;
    r2_b = '0;
    wait (rst_n === 1'b1);
    for (int t = 0; t < NOPS; t++) begin
      av = operand(t, 1'b0);
      bv = operand(t, 1'b1);
      @(negedge clk);
      r2_a = N'(av);
      r2_b = N'(bv);
      r2_start = 1'b1;
      cyc = -1;   // counts clock edges after the start edge
      do begin
        @(negedge clk);
        r2_start = (cyc == 3);   // ignored: the multiplier is busy
        r2_a = N'(rnd());
        cyc++;
      end while (!r2_done && cyc < 100);
      r2_start = 1'b0;
      note_result("r2", av, bv, r2_c, r2_c_raw, cyc, N + 1);
    end
    r2_fin = 1;
  end

  initial begin : drive_rk
    longint unsigned av, bv;
    int cyc;
    rk_start = 1'b0;
    rk_a = '0;
    rk_b = '0;
    wait (rst_n === 1'b1);
    for (int t = 0; t < NOPS; t++) begin
      av = operand(t, 1'b1);
      bv = operand(t, 1'b0);
      @(negedge clk);
      rk_a = N'(av);
      rk_b = N'(bv);
      rk_start = 1'b1;
      cyc = -1;   // counts clock edges after the start edge
      do begin
        @(negedge clk);
        rk_start = (cyc == 3);
        rk_b = N'(rnd());
        cyc++;
      end while (!rk_done && cyc < 100);
      rk_start = 1'b0;
      note_result("rk", av, bv, rk_c, rk_c_raw, cyc, (N + K - 1) / K + 1);
    end
    rk_fin = 1;
  end

  // ------------------------------------------------------ mechanism counters
  int r2_reduce = 0, r2_lut_max = 0, r2_msb_pass = 0, r2_fold = 0;
  int rk_reduce = 0, rk_lut_max = 0, rk_msb_pass = 0, rk_fold = 0;

  always @(posedge clk) begin
    if (int'(dut.u_r2.state) == 1) begin
      if (dut.u_r2.q1 != 0 || dut.u_r2.q2 != 0) r2_reduce++;
      if (int'(dut.u_r2.q1) + int'(dut.u_r2.q2) >= 4) r2_lut_max++;
      if (dut.u_r2.t2[N]) r2_msb_pass++;
    end
    if (int'(dut.u_r2.state) == 2 && (dut.u_r2.c1_q[N:N-1] != 0 || dut.u_r2.c2_q[N:N-1] != 0)) r2_fold++;
    if (int'(dut.u_rk.state) == 1) begin
      if (dut.u_rk.q1 != 0 || dut.u_rk.q2 != 0) rk_reduce++;
      if (int'(dut.u_rk.q1) + int'(dut.u_rk.q2) >= 6) rk_lut_max++;
      if (dut.u_rk.t2[N+K]) rk_msb_pass++;
    end
    if (int'(dut.u_rk.state) == 2 && (dut.u_rk.c1_q[N+K:N-1] != 0 || dut.u_rk.c2_q[N+K:N-1] != 0)) rk_fold++;
  end

  task automatic need(string what, int count);
    $display("  %-44s %0d", what, count);
    check(count > 0, $sformatf("mechanism never exercised: %s", what));
  endtask

  task automatic finish_tb();
    $display("mechanisms exercised:");
    need("r2: loop residue added (q1+q2 > 0)", r2_reduce);
    need("r2: loop residue for q1+q2 >= 4", r2_lut_max);
    need("r2: carry MSB copied by modified adder", r2_msb_pass);
    need("r2: nonzero residue in final fold", r2_fold);
    need("rk: loop residue added (q1+q2 > 0)", rk_reduce);
    need("rk: loop residue for q1+q2 >= 6", rk_lut_max);
    need("rk: carry MSB copied by modified adder", rk_msb_pass);
    need("rk: nonzero residue in final fold", rk_fold);
    need("final reduction with no subtraction", subs_seen[0]);
    need("final reduction with one subtraction", subs_seen[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (r2_fin && rk_fin);
    finish_tb();
  end

  initial begin
    repeat (NOPS * 40) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish_tb();
  end

endmodule

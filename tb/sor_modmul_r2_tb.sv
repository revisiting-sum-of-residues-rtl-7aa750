// sor_modmul_r2_tb: self-checking test of the radix-2 sum of residues multiplier.
//
// First replays the worked example n = 4, A = 15, B = 11, M = 9 and compares
// the carry-save words C1, C2 after every iteration, the folded result and the
// reduced result with the values of that example. Then runs products on
// several configurations through sor_mm_harness: exhaustive for N = 4 and
// N = 8, random at N = 12 (with M = 4093 and with a small modulus, 1000, that needs
// a longer final subtraction chain), 16 and 24: the word lengths 4 to 24
// that the design targets. Latency N+1 clocks is checked on every
// product.
module sor_modmul_r2_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  // worked example instance
  logic       start;
  logic [3:0] a, b, c;
  logic [4:0] c_raw;
  logic       busy, done;

  sor_modmul_r2 #(.N(4), .M(4'd9)) dut (
    .clk, .rst_n, .start, .a, .b, .busy, .done, .c_raw, .c
  );

  // C1[i], C2[i] for i = 3 .. 0 of the example
  logic [4:0] exp_c1 [4] = '{5'b01011, 5'b01110, 5'b11110, 5'b11000};
  logic [4:0] exp_c2 [4] = '{5'b00000, 5'b01010, 5'b00010, 5'b00110};

  // configurations
  logic [5:0] fin;
  int hc [6], hf [6];

  sor_mm_harness #(.N(4),  .M(9),        .K(1), .EXHAUSTIVE(1)) h0 (.clk, .rst_n, .finished(fin[0]), .checks(hc[0]), .failures(hf[0]));
  sor_mm_harness #(.N(8),  .M(251),      .K(1), .EXHAUSTIVE(1)) h1 (.clk, .rst_n, .finished(fin[1]), .checks(hc[1]), .failures(hf[1]));
  sor_mm_harness #(.N(12), .M(1000),     .K(1), .EXHAUSTIVE(0), .NRAND(3000)) h2 (.clk, .rst_n, .finished(fin[2]), .checks(hc[2]), .failures(hf[2]));
  sor_mm_harness #(.N(16), .M(65521),    .K(1), .EXHAUSTIVE(0), .NRAND(3000)) h3 (.clk, .rst_n, .finished(fin[3]), .checks(hc[3]), .failures(hf[3]));
  sor_mm_harness #(.N(24), .M(16777213), .K(1), .EXHAUSTIVE(0), .NRAND(3000)) h4 (.clk, .rst_n, .finished(fin[4]), .checks(hc[4]), .failures(hf[4]));

  sor_mm_harness #(.N(12), .M(4093),      .K(1), .EXHAUSTIVE(0), .NRAND(3000)) h5 (.clk, .rst_n, .finished(fin[5]), .checks(hc[5]), .failures(hf[5]));

  task automatic finish_tb();
    for (int j = 0; j < 6; j++) begin
      checks   += hc[j];
      failures += hf[j];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    start = 1'b0;
    a = '0;
    b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    a = 4'd15;
    b = 4'd11;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      check(dut.c1_q == exp_c1[i] && dut.c2_q == exp_c2[i],
            $sformatf("example iteration i=%0d: C1=%b C2=%b", 3 - i, dut.c1_q, dut.c2_q));
      @(negedge clk);
    end
    check(done && c_raw == 5'b01100 && c == 4'b0011,
          $sformatf("example result: done=%b c_raw=%b c=%b", done, c_raw, c));
    wait (&fin);
    finish_tb();
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish_tb();
  end

endmodule

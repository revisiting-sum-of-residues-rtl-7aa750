// sor_modmul_rk_tb: self-checking test of the radix-2^K sum of residues multiplier.
//
// Runs products on several word lengths and radices through sor_mm_harness:
// exhaustive for N = 4, K = 2 and for N = 8, K = 3 (a word length that is not
// a whole number of digits), random for N = 12 with a small modulus, and for
// N = 24 at K = 2 and K = 4, and N = 16 at K = 8. Every product is checked
// against a * b mod M and for a latency of ceil(N/K)+1 clocks.
module sor_modmul_rk_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [5:0] fin;
  int hc [6], hf [6];

  sor_mm_harness #(.N(4),  .M(9),        .K(2), .EXHAUSTIVE(1)) h0 (.clk, .rst_n, .finished(fin[0]), .checks(hc[0]), .failures(hf[0]));
  sor_mm_harness #(.N(8),  .M(251),      .K(3), .EXHAUSTIVE(1)) h1 (.clk, .rst_n, .finished(fin[1]), .checks(hc[1]), .failures(hf[1]));
  sor_mm_harness #(.N(12), .M(1000),     .K(2), .EXHAUSTIVE(0), .NRAND(3000)) h2 (.clk, .rst_n, .finished(fin[2]), .checks(hc[2]), .failures(hf[2]));
  sor_mm_harness #(.N(24), .M(16777213), .K(2), .EXHAUSTIVE(0), .NRAND(3000)) h3 (.clk, .rst_n, .finished(fin[3]), .checks(hc[3]), .failures(hf[3]));
  sor_mm_harness #(.N(24), .M(16777213), .K(4), .EXHAUSTIVE(0), .NRAND(3000)) h4 (.clk, .rst_n, .finished(fin[4]), .checks(hc[4]), .failures(hf[4]));
  sor_mm_harness #(.N(16), .M(65521),    .K(8), .EXHAUSTIVE(0), .NRAND(3000)) h5 (.clk, .rst_n, .finished(fin[5]), .checks(hc[5]), .failures(hf[5]));

  task automatic finish_tb();
    for (int j = 0; j < 6; j++) begin
      checks   += hc[j];
      failures += hf[j];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
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

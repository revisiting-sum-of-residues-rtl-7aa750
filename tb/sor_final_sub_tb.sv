// sor_final_sub_tb: self-checking test of the final reduction into [0, M).
//
// Checks the worked example (1100 with M = 9 gives 0011), then every legal
// input value, 0 .. 2^N - 2 + M - 1, for N = 4 with M = 9, N = 8 with M = 131
// and N = 8 with M = 20 (a modulus below 2^(N-1), which needs a longer chain),
// and random legal inputs for N = 24.
module sor_final_sub_tb;

  int checks = 0, failures = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endfunction

  localparam longint unsigned M24 = 16777213;

  logic [4:0]  ca;
  logic [3:0]  ra;
  logic [8:0]  cb, cc;
  logic [7:0]  rb, rc;
  logic [24:0] cd;
  logic [23:0] rd;

  sor_final_sub #(.N(4),  .M(4'd9))         ua (.c(ca), .r(ra));
  sor_final_sub #(.N(8),  .M(8'd131))       ub (.c(cb), .r(rb));
  sor_final_sub #(.N(8),  .M(8'd20))        uc (.c(cc), .r(rc));
  sor_final_sub #(.N(24), .M(24'd16777213)) ud (.c(cd), .r(rd));

  initial begin
    ca = 5'b01100;
    #1;
    check(ra == 4'b0011, $sformatf("example: %b", ra));
    for (int v = 0; v <= 14 + 8; v++) begin
      ca = 5'(v);
      #1;
      check(int'(ra) == v % 9, $sformatf("N=4 M=9 c=%0d: %0d", v, ra));
    end
    for (int v = 0; v <= 254 + 130; v++) begin
      cb = 9'(v);
      #1;
      check(int'(rb) == v % 131, $sformatf("N=8 M=131 c=%0d: %0d", v, rb));
    end
    for (int v = 0; v <= 254 + 19; v++) begin
      cc = 9'(v);
      #1;
      check(int'(rc) == v % 20, $sformatf("N=8 M=20 c=%0d: %0d", v, rc));
    end
    for (int t = 0; t < 5000; t++) begin
      longint unsigned v = longint'({$urandom, $urandom}) % ((64'd1 << 24) - 2 + M24);
      if (t == 0) v = (64'd1 << 24) - 3 + M24;
      cd = 25'(v);
      #1;
      check(longint'(rd) == v % M24, $sformatf("N=24 c=%0d: %0d", v, rd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

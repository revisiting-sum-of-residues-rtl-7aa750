// sor_final_add_tb: self-checking test of the final fold of the carry-save result.
//
// Checks the last step of the worked example (C1 = 11000, C2 = 00110,
// M = 9 gives 1100), then exhaustively for N = 4 with 5-bit words and
// randomly for N = 24 with 25-bit words (radix 2) and 27-bit words (radix 4):
// the result must be congruent to c1 + c2 modulo M and below 2^N - 2 + M, and
// must equal the value worked out bit-field by bit-field here.
module sor_final_add_tb;

  int checks = 0, failures = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endfunction

  // reference: split at bit n-1, residue of the top part
  function automatic longint unsigned ref_fold(longint unsigned c1, longint unsigned c2,
                                               int n, longint unsigned m);
    longint unsigned lo = (64'd1 << (n - 1)) - 1;
    longint unsigned q  = (c1 >> (n - 1)) + (c2 >> (n - 1));
    return (c1 & lo) + (c2 & lo) + ((q << (n - 1)) % m);
  endfunction

  localparam longint unsigned M24 = 16777213;

  logic [4:0]  a1, a2, ac;
  logic [24:0] b1, b2, bc, dc;
  logic [26:0] d1, d2;

  sor_final_add #(.N(4),  .CW(5),  .M(4'd9))         ua (.c1(a1), .c2(a2), .c(ac));
  sor_final_add #(.N(24), .CW(25), .M(24'd16777213)) ub (.c1(b1), .c2(b2), .c(bc));
  sor_final_add #(.N(24), .CW(27), .M(24'd16777213)) ud (.c1(d1), .c2(d2), .c(dc));

  initial begin
    a1 = 5'b11000;
    a2 = 5'b00110;
    #1;
    check(ac == 5'b01100, $sformatf("example final step: %b", ac));
    for (int v = 0; v < 1024; v++) begin
      {a1, a2} = 10'(v);
      #1;
      check(ac == 5'(ref_fold(a1, a2, 4, 9)) && (int'(ac) % 9) == ((int'(a1) + int'(a2)) % 9)
            && int'(ac) <= 14 + 8,
            $sformatf("N=4 c1=%b c2=%b: %b", a1, a2, ac));
    end
    for (int t = 0; t < 5000; t++) begin
      b1 = 25'({$urandom, $urandom});
      b2 = 25'({$urandom, $urandom});
      d1 = 27'({$urandom, $urandom});
      d2 = 27'({$urandom, $urandom});
      #1;
      check(bc == 25'(ref_fold(b1, b2, 24, M24)) &&
            (longint'(bc) % M24) == ((longint'(b1) + longint'(b2)) % M24) &&
            longint'(bc) <= (64'd1 << 24) - 2 + M24 - 1,
            $sformatf("N=24 CW=25 c1=%h c2=%h: %h", b1, b2, bc));
      check(dc == 25'(ref_fold(d1, d2, 24, M24)) &&
            (longint'(dc) % M24) == ((longint'(d1) + longint'(d2)) % M24) &&
            longint'(dc) <= (64'd1 << 24) - 2 + M24 - 1,
            $sformatf("N=24 CW=27 c1=%h c2=%h: %h", d1, d2, dc));
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

// sor_csa_mod_tb: self-checking test of the modified carry-save adder.
//
// Checks the four second-adder steps of the worked example n = 4, A = 15,
// B = 11, M = 9 against the values printed for it, then, exhaustively for
// W = 4 and randomly for W = 24: the top bit of the wide input reappears as
// the top bit of the sum, the low sum bits are the XOR of the inputs, carry
// bit 0 is clear, and sum + carry equals x + y + z.
module sor_csa_mod_tb;

  int checks = 0, failures = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endfunction

  logic [3:0]  x4, z4;
  logic [4:0]  y4, s4, c4;
  logic [23:0] x24, z24;
  logic [24:0] y24, s24, c24;

  sor_csa_mod #(.W(4))  u4  (.x(x4),  .y(y4),  .z(z4),  .sum(s4),  .carry(c4));
  sor_csa_mod #(.W(24)) u24 (.x(x24), .y(y24), .z(z24), .sum(s24), .carry(c24));

  // worked example: {T1, T2, residue} -> {C1, C2}
  logic [3:0] ex_x [4] = '{4'b1011, 4'b1101, 4'b0011, 4'b0011};
  logic [4:0] ex_y [4] = '{5'b00000, 5'b00100, 5'b11000, 5'b11000};
  logic [3:0] ex_z [4] = '{4'b0000, 4'b0111, 4'b0101, 4'b0011};
  logic [4:0] ex_s [4] = '{5'b01011, 5'b01110, 5'b11110, 5'b11000};
  logic [4:0] ex_c [4] = '{5'b00000, 5'b01010, 5'b00010, 5'b00110};

  initial begin
    for (int i = 0; i < 4; i++) begin
      x4 = ex_x[i];
      y4 = ex_y[i];
      z4 = ex_z[i];
      #1;
      check(s4 == ex_s[i] && c4 == ex_c[i],
            $sformatf("example step %0d: sum=%b carry=%b", i, s4, c4));
    end
    for (int v = 0; v < 8192; v++) begin
      {x4, y4, z4} = 13'(v);
      #1;
      check(s4[4] == y4[4] && s4[3:0] == (x4 ^ y4[3:0] ^ z4) && c4[0] == 1'b0 &&
            int'(s4) + int'(c4) == int'(x4) + int'(y4) + int'(z4),
            $sformatf("W=4 x=%b y=%b z=%b: sum=%b carry=%b", x4, y4, z4, s4, c4));
    end
    for (int t = 0; t < 5000; t++) begin
      x24 = 24'($urandom);
      y24 = 25'({$urandom, $urandom});
      z24 = 24'($urandom);
      #1;
      check(s24[24] == y24[24] && c24[0] == 1'b0 &&
            longint'(s24) + longint'(c24) == longint'(x24) + longint'(y24) + longint'(z24),
            $sformatf("W=24 x=%h y=%h z=%h: sum=%h carry=%h", x24, y24, z24, s24, c24));
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

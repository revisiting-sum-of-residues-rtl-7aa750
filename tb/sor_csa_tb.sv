// sor_csa_tb: self-checking test of the carry-save adder.
//
// For widths 4 (exhaustive over all 4096 input triples) and 24 (random), the
// sum word must equal the bitwise XOR of the inputs, the carry word the
// bitwise majority shifted up one place with bit 0 clear, and together they
// must add up to x + y + z.
module sor_csa_tb;

  int checks = 0, failures = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endfunction

  logic [3:0]  x4, y4, z4, s4;
  logic [4:0]  c4;
  logic [23:0] x24, y24, z24, s24;
  logic [24:0] c24;

  sor_csa #(.W(4))  u4  (.x(x4),  .y(y4),  .z(z4),  .sum(s4),  .carry(c4));
  sor_csa #(.W(24)) u24 (.x(x24), .y(y24), .z(z24), .sum(s24), .carry(c24));

  task automatic check_bits(input int w, input longint unsigned x, y, z, s, cy);
    longint unsigned es = 0, ec = 0;
    for (int i = 0; i < w; i++) begin
      int n1 = int'(x[i]) + int'(y[i]) + int'(z[i]);
      es[i]     = n1[0];
      ec[i + 1] = n1[1];
    end
    check(s == es && cy == ec && s + cy == x + y + z,
          $sformatf("W=%0d x=%0h y=%0h z=%0h: sum=%0h carry=%0h", w, x, y, z, s, cy));
  endtask

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {x4, y4, z4} = 12'(v);
      #1;
      check_bits(4, x4, y4, z4, s4, c4);
    end
    for (int t = 0; t < 5000; t++) begin
      x24 = 24'($urandom);
      y24 = 24'($urandom);
      z24 = 24'($urandom);
      #1;
      check_bits(24, x24, y24, z24, s24, c24);
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

// sor_residue_rom_tb: self-checking test of the residue lookup table.
//
// Reads every (q1, q2) pair from four tables and compares with
// (q1 + q2) * 2^SHIFT mod M computed here with 64-bit integers: the two
// tables of the worked example (N = 4, M = 9, shifts 4 and 3; the example
// prints 0000, 0111, 0101, 0011 for sums 0 to 3 of the first and 0110 for
// sum 3 of the second), the 24-bit loop table, and a 3-bit-q table as used by
// the radix-4 multiplier at N = 12.
module sor_residue_rom_tb;

  int checks = 0, failures = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endfunction

  function automatic longint unsigned ref_res(longint unsigned s, int sh, longint unsigned m);
    return ((s << sh) % m);
  endfunction

  logic [1:0]  qa1, qa2;
  logic [2:0]  qd1, qd2;
  logic [3:0]  ra, rb;
  logic [23:0] rc;
  logic [11:0] rd;

  sor_residue_rom #(.N(4),  .QBW(2), .SHIFT(4),  .M(4'd9))         ua (.q1(qa1), .q2(qa2), .res(ra));
  sor_residue_rom #(.N(4),  .QBW(2), .SHIFT(3),  .M(4'd9))         ub (.q1(qa1), .q2(qa2), .res(rb));
  sor_residue_rom #(.N(24), .QBW(2), .SHIFT(24), .M(24'd16777213)) uc (.q1(qa1), .q2(qa2), .res(rc));
  sor_residue_rom #(.N(12), .QBW(3), .SHIFT(14), .M(12'd4093))     ud (.q1(qd1), .q2(qd2), .res(rd));

  logic [3:0] ex_a [4] = '{4'b0000, 4'b0111, 4'b0101, 4'b0011};

  initial begin
    for (int i = 0; i < 16; i++) begin
      {qa1, qa2} = 4'(i);
      #1;
      check(ra == 4'(ref_res(qa1 + qa2, 4, 9)), $sformatf("N=4 shift 4 q=%0d,%0d: %b", qa1, qa2, ra));
      check(rb == 4'(ref_res(qa1 + qa2, 3, 9)), $sformatf("N=4 shift 3 q=%0d,%0d: %b", qa1, qa2, rb));
      check(rc == 24'(ref_res(qa1 + qa2, 24, 16777213)), $sformatf("N=24 q=%0d,%0d: %0d", qa1, qa2, rc));
      if (int'(qa1) + int'(qa2) <= 3)
        check(ra == ex_a[int'(qa1) + int'(qa2)], $sformatf("example table q=%0d,%0d: %b", qa1, qa2, ra));
      if (int'(qa1) + int'(qa2) == 3)
        check(rb == 4'b0110, $sformatf("example final table q=%0d,%0d: %b", qa1, qa2, rb));
    end
    for (int i = 0; i < 64; i++) begin
      {qd1, qd2} = 6'(i);
      #1;
      check(rd == 12'(ref_res(qd1 + qd2, 14, 4093)), $sformatf("N=12 q=%0d,%0d: %0d", qd1, qd2, rd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

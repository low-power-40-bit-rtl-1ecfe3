// tb_csla_group: exhaustive check of modified-CSLA groups of width 1, 2
// (default), 3, 4 and 6 bits: {cout, sum} must equal a + b + cin.
// One counter i runs over all 2^13 values; each instance takes its a, b and
// cin from its own slice of i, so every instance sees all of its inputs.
// Also counts, for the 2-bit group, how often the carry-in-1 (BEC) path is
// selected and how often a carry propagates through the group via the BEC
// (a + b = 2^N - 1 with cin = 1); both must occur.
module tb_csla_group;
  logic       a1, b1, s1, ci1, co1;
  logic [1:0] a2, b2, s2;
  logic       ci2, co2;
  logic [2:0] a3, b3, s3;
  logic       ci3, co3;
  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  logic [5:0] a6, b6, s6;
  logic       ci6, co6;
  int checks = 0, failures = 0;
  int sel_bec = 0, propagate = 0;

  csla_group #(.N(1)) dut1 (.a(a1), .b(b1), .cin(ci1), .sum(s1), .cout(co1));
  csla_group          dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  csla_group #(.N(3)) dut3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3));
  csla_group #(.N(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  csla_group #(.N(6)) dut6 (.a(a6), .b(b6), .cin(ci6), .sum(s6), .cout(co6));

  task automatic check(input int n, input int a, input int b, input int ci,
                       input int got);
    int exp;
    exp = a + b + ci;
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d a=%0d b=%0d cin=%0d got=%0d exp=%0d", n, a, b, ci, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 13); i++) begin
      logic [12:0] v;
      v = 13'(i);
      {ci1, b1, a1} = v[2:0];
      {ci2, b2, a2} = v[4:0];
      {ci3, b3, a3} = v[6:0];
      {ci4, b4, a4} = v[8:0];
      {ci6, b6, a6} = v[12:0];
      #1;
      check(1, int'(a1), int'(b1), int'(ci1), int'({co1, s1}));
      check(2, int'(a2), int'(b2), int'(ci2), int'({co2, s2}));
      check(3, int'(a3), int'(b3), int'(ci3), int'({co3, s3}));
      check(4, int'(a4), int'(b4), int'(ci4), int'({co4, s4}));
      check(6, int'(a6), int'(b6), int'(ci6), int'({co6, s6}));
      if (ci2) sel_bec++;
      if (ci2 && (int'(a2) + int'(b2) == 3)) propagate++;
    end
    $display("2-bit group: BEC path selected %0d times, carry propagated through BEC %0d times",
             sel_bec, propagate);
    checks += 2;
    if (sel_bec == 0) failures++;
    if (propagate == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

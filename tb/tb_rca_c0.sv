// tb_rca_c0: checks the carry-in-0 ripple adder, {cout, sum} = a + b.
// Exhaustive for the default 2-bit instance, for a 1-bit instance (half adder
// only) and for an 8-bit instance.
module tb_rca_c0;
  logic [1:0] a2, b2, s2;
  logic       co2;
  logic       a1, b1, s1, co1;
  logic [7:0] a8, b8, s8;
  logic       co8;
  int checks = 0, failures = 0;

  rca_c0          dut2 (.a(a2), .b(b2), .sum(s2), .cout(co2));
  rca_c0 #(.N(1)) dut1 (.a(a1), .b(b1), .sum(s1), .cout(co1));
  rca_c0 #(.N(8)) dut8 (.a(a8), .b(b8), .sum(s8), .cout(co8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a2, b2} = 4'(i);
      {a1, b1} = 2'(i);
      #1;
      checks += 2;
      if ({co2, s2} !== (3'(a2) + 3'(b2))) begin
        failures++;
        $display("FAIL N=2 a=%h b=%h -> %0b %h", a2, b2, co2, s2);
      end
      if ({co1, s1} !== (2'(a1) + 2'(b1))) begin
        failures++;
        $display("FAIL N=1 a=%0b b=%0b -> %0b %0b", a1, b1, co1, s1);
      end
    end
    for (int i = 0; i < (1 << 16); i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if ({co8, s8} !== (9'(a8) + 9'(b8))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 a=%h b=%h -> %0b %h", a8, b8, co8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

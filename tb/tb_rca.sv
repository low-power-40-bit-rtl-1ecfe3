// tb_rca: checks the ripple carry adder with carry input.
// The default 2-bit instance is tested exhaustively; a 7-bit instance is
// tested exhaustively too, so carries ripple across a longer chain.
module tb_rca;
  logic [1:0] a2, b2, s2;
  logic       cin2, co2;
  logic [6:0] a7, b7, s7;
  logic       cin7, co7;
  int checks = 0, failures = 0;

  rca            dut2 (.a(a2), .b(b2), .cin(cin2), .sum(s2), .cout(co2));
  rca #(.N(7))   dut7 (.a(a7), .b(b7), .cin(cin7), .sum(s7), .cout(co7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a7, b7, cin7} = '0;
    for (int i = 0; i < 32; i++) begin
      {cin2, a2, b2} = 5'(i);
      #1;
      checks++;
      if ({co2, s2} !== (3'(a2) + 3'(b2) + 3'(cin2))) begin
        failures++;
        $display("FAIL N=2 a=%h b=%h cin=%0b -> %0b %h", a2, b2, cin2, co2, s2);
      end
    end
    for (int i = 0; i < (1 << 15); i++) begin
      {cin7, a7, b7} = 15'(i);
      #1;
      checks++;
      if ({co7, s7} !== (8'(a7) + 8'(b7) + 8'(cin7))) begin
        failures++;
        if (failures < 10) $display("FAIL N=7 a=%h b=%h cin=%0b -> %0b %h", a7, b7, cin7, co7, s7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

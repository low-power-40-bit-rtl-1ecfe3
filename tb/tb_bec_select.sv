// tb_bec_select: exhaustive check of the 4-bit BEC with 8:4 mux:
// s must equal b for cin = 0 and b + 1 (mod 16) for cin = 1.
module tb_bec_select;
  logic [3:0] b, s;
  logic       cin;
  int checks = 0, failures = 0;

  bec_select dut (.b(b), .cin(cin), .s(s));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {cin, b} = 5'(i);
      #1;
      checks++;
      if (s !== (b + 4'(cin))) begin
        failures++;
        $display("FAIL b=%b cin=%0b s=%b", b, cin, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

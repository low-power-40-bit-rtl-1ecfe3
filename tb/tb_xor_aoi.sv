// tb_xor_aoi: exhaustive check of the gate-level XOR against a ^ b.
// Applies all four input pairs, compares after a settling delay, and prints
// one TB_RESULT line. A watchdog ends the run if it ever hangs.
module tb_xor_aoi;
  logic a, b, y;
  int checks = 0, failures = 0;

  xor_aoi dut (.a(a), .b(b), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== (a ^ b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

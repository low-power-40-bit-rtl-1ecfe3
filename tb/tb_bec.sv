// tb_bec: checks the binary to excess-1 converter.
// The default 4-bit instance is checked against its function table for all
// 16 inputs (0000 -> 0001, ..., 1110 -> 1111, 1111 -> 0000) and against its
// bit equations; 2-bit and 6-bit instances are checked against b + 1 mod 2^N.
// The wrap from all ones to zero must occur once per width.
module tb_bec;
  logic [3:0] b4, x4;
  logic [1:0] b2, x2;
  logic [5:0] b6, x6;
  int checks = 0, failures = 0;
  int wraps = 0;

  bec          dut4 (.b(b4), .x(x4));
  bec #(.N(2)) dut2 (.b(b2), .x(x2));
  bec #(.N(6)) dut6 (.b(b6), .x(x6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {b2, b6} = '0;
    for (int i = 0; i < 16; i++) begin
      logic [3:0] eq;
      b4 = 4'(i);
      #1;
      eq[0] = ~b4[0];
      eq[1] = b4[0] ^ b4[1];
      eq[2] = b4[2] ^ (b4[0] & b4[1]);
      eq[3] = b4[3] ^ (b4[0] & b4[1] & b4[2]);
      checks += 2;
      if (x4 !== 4'((i + 1) % 16)) begin
        failures++;
        $display("FAIL N=4 b=%b x=%b", b4, x4);
      end
      if (x4 !== eq) begin
        failures++;
        $display("FAIL N=4 equations b=%b x=%b eq=%b", b4, x4, eq);
      end
      if (b4 == 4'hF && x4 == 4'h0) wraps++;
    end
    for (int i = 0; i < 4; i++) begin
      b2 = 2'(i);
      #1;
      checks++;
      if (x2 !== 2'((i + 1) % 4)) begin
        failures++;
        $display("FAIL N=2 b=%b x=%b", b2, x2);
      end
      if (b2 == 2'b11 && x2 == 2'b00) wraps++;
    end
    for (int i = 0; i < 64; i++) begin
      b6 = 6'(i);
      #1;
      checks++;
      if (x6 !== 6'((i + 1) % 64)) begin
        failures++;
        $display("FAIL N=6 b=%b x=%b", b6, x6);
      end
      if (b6 == 6'h3F && x6 == 6'h00) wraps++;
    end
    checks++;
    if (wraps != 3) begin
      failures++;
      $display("FAIL wrap-around seen %0d times, expected 3", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

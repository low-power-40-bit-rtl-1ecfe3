// tb_mux2n: exhaustive check of the 8:4 mux (N = 4, the default): for every
// pair of input words and both select values, y must equal the chosen word.
module tb_mux2n;
  localparam int N = 4;
  logic [N-1:0] in0, in1, y;
  logic         sel;
  int checks = 0, failures = 0;

  mux2n #(.N(N)) dut (.in0(in0), .in1(in1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * N + 1)); i++) begin
      {sel, in1, in0} = (2 * N + 1)'(i);
      #1;
      checks++;
      if (y !== (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%0b in0=%h in1=%h y=%h", sel, in0, in1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

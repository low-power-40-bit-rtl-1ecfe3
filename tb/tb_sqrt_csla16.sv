// tb_sqrt_csla16: test of the square-root CSLA built at 16 bits, the
// configuration whose group structure (2, 2, 3, 4, 5 bits from the LSB) the
// design's delay and gate-count figures are worked out for.
// Drives directed corner cases and 200,000 pseudo-random operand pairs
// (fully random, near-complements and per-group complements) and compares
// {cout, sum} with a 17-bit reference a + b + cin. For each upper group it
// counts selections of the carry-in-0 result, of the carry-in-1 (BEC) result
// and carries passed through the group by way of the BEC, plus carries that
// ran from cin to cout; each must occur at least once. The group layout for
// the counts is written out here, independent of the RTL. Combinational DUT,
// checked 1 time unit after each vector.
module tb_sqrt_csla16;
  localparam int W  = 16;
  localparam int NG = 5;
  localparam int GLSB [NG] = '{0, 2, 4, 7, 11};
  localparam int GW   [NG] = '{2, 2, 3, 4, 5};
  localparam int NRAND = 200000;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int sel0 [NG];
  int sel1 [NG];
  int prop [NG];
  int full_chain = 0;

  sqrt_csla #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic logic [W-1:0] rand_w();
    return 16'($urandom);
  endfunction

  task automatic apply(input logic [W-1:0] av, input logic [W-1:0] bv, input logic cv);
    logic [W:0] exp;
    a   = av;
    b   = bv;
    cin = cv;
    #1;
    exp = {1'b0, av} + {1'b0, bv} + (W + 1)'(cv);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%0b got=%0b_%h exp=%0b_%h",
                 av, bv, cv, cout, sum, exp[W], exp[W-1:0]);
    end
    // event counts, computed from the operands only
    for (int k = 1; k < NG; k++) begin
      logic [W:0] low, grp;
      logic       cg;
      low = ({1'b0, av} & ((W + 1)'(1) << GLSB[k]) - 1) +
            ({1'b0, bv} & ((W + 1)'(1) << GLSB[k]) - 1) + (W + 1)'(cv);
      cg  = low[GLSB[k]];
      grp = ((W + 1)'(av) >> GLSB[k]) & (((W + 1)'(1) << GW[k]) - 1);
      grp = grp + (((W + 1)'(bv) >> GLSB[k]) & (((W + 1)'(1) << GW[k]) - 1));
      if (cg) sel1[k]++;
      else    sel0[k]++;
      if (cg && grp == (((W + 1)'(1) << GW[k]) - 1)) prop[k]++;
    end
    if (cv && ((av ^ bv) == '1)) full_chain++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NG; k++) begin
      sel0[k] = 0;
      sel1[k] = 0;
      prop[k] = 0;
    end
    // directed corner cases
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);
    apply('0, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply(16'h5555, 16'hAAAA, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    // a carry generated at each group boundary and rippled to the top
    for (int k = 0; k < NG; k++) begin
      logic [W-1:0] m;
      m = ~((W'(1) << GLSB[k]) - 1);
      apply(m, W'(1) << GLSB[k], 1'b0);
      apply(~m, W'(1), 1'b0);
    end
    // pseudo-random operands
    for (int n = 0; n < NRAND; n++) begin
      logic [W-1:0] av, bv, flip;
      av = rand_w();
      case (n % 3)
        0: bv = rand_w();
        1: begin
          flip = (W'(1) << ($urandom % W));
          if (($urandom % 2) != 0) flip |= (W'(1) << ($urandom % W));
          if ($urandom % 4 == 0) flip = '0;
          bv = ~av ^ flip;
        end
        default: begin
          bv = rand_w();
          for (int k = 0; k < NG; k++)
            if (($urandom % 2) != 0)
              for (int i = GLSB[k]; i < GLSB[k] + GW[k]; i++) bv[i] = ~av[i];
        end
      endcase
      apply(av, bv, 1'($urandom));
    end
    // every mechanism must have occurred
    for (int k = 1; k < NG; k++) begin
      $display("group %0d (%0d bits at bit %0d): carry-in-0 result %0d, BEC result %0d, carry through BEC %0d",
               k, GW[k], GLSB[k], sel0[k], sel1[k], prop[k]);
      checks += 3;
      if (sel0[k] == 0) failures++;
      if (sel1[k] == 0) failures++;
      if (prop[k] == 0) failures++;
    end
    $display("carry from cin to cout through all groups: %0d", full_chain);
    checks++;
    if (full_chain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

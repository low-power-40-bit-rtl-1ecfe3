// rca: N-bit ripple carry adder with a carry input.
//
// {cout, sum} = a + b + cin, computed by a chain of N full adders in which
// each cell's carry out feeds the next cell's carry in. The square-root CSLA
// uses it for its least significant group, the only group that sees the
// adder's external carry input. Combinational; the carry ripples from bit 0
// to bit N-1.
module rca #(
  parameter int N = 2  // adder width in bits
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[N];
endmodule

// rca_c0: N-bit ripple carry adder for a carry input fixed at 0.
//
// {cout, sum} = a + b. Because the carry into bit 0 is known to be 0, bit 0
// is a half adder and bits 1..N-1 are full adders in a ripple chain. This is
// the single RCA each upper group of the modified square-root CSLA keeps (the
// carry-in-1 copy is replaced by a binary to excess-1 converter). The
// half-adder LSB follows the source description. Combinational.
module rca_c0 #(
  parameter int N = 2  // adder width in bits, at least 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:1] c;  // c[i] is the carry into bit i
  half_adder u_ha (.a(a[0]), .b(b[0]), .s(sum[0]), .c(c[1]));
  for (genvar i = 1; i < N; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[N];
endmodule

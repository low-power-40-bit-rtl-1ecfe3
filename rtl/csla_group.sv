// csla_group: one N-bit group of the modified carry select adder.
//
// The group adds its slices of a and b once, assuming a carry in of 0, with
// an N-bit ripple adder (half adder in the LSB). Its N+1-bit result
// {c, s} is fed to an (N+1)-bit binary to excess-1 converter, which gives
// {c, s} + 1, the result for a carry in of 1. A (2N+2):(N+1) mux, selected by
// the carry out of the group below (cin), picks one of the two, giving the
// group's sum bits and its carry out. The sum of a + b fits in N+1 bits and
// is at most 2^(N+1) - 2, so the converter never wraps.
// Structure follows the source description. Combinational: the local sum is
// formed in parallel with the lower groups, and cin only passes the mux.
module csla_group #(
  parameter int N = 2  // group width in bits, at least 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,   // carry out of the group below (mux select)
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] s0;  // sum for carry in 0
  logic         c0;  // carry out for carry in 0

  rca_c0     #(.N(N))   u_rca (.a(a), .b(b), .sum(s0), .cout(c0));
  bec_select #(.N(N+1)) u_sel (.b({c0, s0}), .cin(cin), .s({cout, sum}));
endmodule

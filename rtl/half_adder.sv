// half_adder: one-bit half adder.
//
// s = a XOR b, c = a AND b. Built from one xor_aoi and one AND gate, which
// gives the unit-gate cost of 3 delay and 6 area used to size the adder.
// The function and cost follow the source description. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,  // sum
  output logic c   // carry out
);
  xor_aoi u_xor (.a(a), .b(b), .y(s));
  assign c = a & b;
endmodule

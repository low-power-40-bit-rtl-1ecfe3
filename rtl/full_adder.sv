// full_adder: one-bit full adder.
//
// p = a XOR b, s = p XOR cin, cout = (a AND b) OR (p AND cin). Two xor_aoi
// cells, two AND gates and one OR gate: 6 units of delay and 13 units of area
// in the unit-gate model, matching the costs the source description uses.
// The gate arrangement is this design's choice. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,    // sum
  output logic cout  // carry out
);
  logic p;  // propagate

  xor_aoi u_xor0 (.a(a), .b(b),   .y(p));
  xor_aoi u_xor1 (.a(p), .b(cin), .y(s));
  assign cout = (a & b) | (p & cin);
endmodule

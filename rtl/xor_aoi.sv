// xor_aoi: two-input exclusive OR built from basic gates.
//
// y = (a AND NOT b) OR (NOT a AND b): two inverters, two AND gates and one
// OR gate, three gate levels deep. In the unit-gate model used to size this
// adder (every basic gate one unit of delay and one unit of area) it counts
// as 3 units of delay and 5 units of area. The gate structure follows the
// source description; it is purely combinational, with no clock or reset.
module xor_aoi (
  input  logic a,
  input  logic b,
  output logic y
);
  logic a_n, b_n;  // inverter outputs
  logic t0, t1;    // AND terms

  assign a_n = ~a;
  assign b_n = ~b;
  assign t0  = a & b_n;
  assign t1  = a_n & b;
  assign y   = t0 | t1;
endmodule

// mux2n: N-bit 2:1 multiplexer (a "2N:N mux").
//
// y = sel ? in1 : in0, built per bit as (in0 AND NOT sel) OR (in1 AND sel):
// an inverter, two AND gates and an OR gate per bit, i.e. 3 units of delay
// and 4 units of area per bit in the unit-gate model. The CSLA uses it
// to choose between the carry-in-0 result (in0) and the carry-in-1 result
// (in1) of a group. The function and unit costs follow the source
// description; the AND-OR gate form is this design's choice. Combinational.
module mux2n #(
  parameter int N = 4  // bits per input word; 4 gives the 8:4 mux
) (
  input  logic [N-1:0] in0,  // selected when sel = 0
  input  logic [N-1:0] in1,  // selected when sel = 1
  input  logic         sel,
  output logic [N-1:0] y
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    logic sel_n;
    assign sel_n = ~sel;
    assign y[i]  = (in0[i] & sel_n) | (in1[i] & sel);
  end
endmodule

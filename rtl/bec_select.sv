// bec_select: binary to excess-1 converter followed by a 2N:N multiplexer.
//
// s = cin ? b + 1 : b (modulo 2^N). The word b goes straight to input 0 of
// the mux and through an N-bit BEC to input 1; cin drives the select. This
// is the basic carry-select step of the modified CSLA: both possible results
// exist in parallel and the carry only chooses between them. Structure
// follows the source description. Combinational.
module bec_select #(
  parameter int N = 4  // word width in bits; 4 gives the 4-bit BEC with 8:4 mux
) (
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s
);
  logic [N-1:0] b_plus1;

  bec   #(.N(N)) u_bec (.b(b), .x(b_plus1));
  mux2n #(.N(N)) u_mux (.in0(b), .in1(b_plus1), .sel(cin), .y(s));
endmodule

// bec: N-bit binary to excess-1 converter.
//
// x = b + 1 modulo 2^N, without any adder: x[0] = NOT b[0] and
// x[i] = b[i] XOR (b[0] AND ... AND b[i-1]) for i >= 1. The AND terms are
// formed by a chain of two-input AND gates, one per bit from bit 1 upward
// (the 4-bit instance has the equations X0 = ~B0, X1 = B0^B1,
// X2 = B2^(B0&B1), X3 = B3^(B0&B1&B2)). All-ones wraps to all-zeros.
// Structure and equations follow the source description. Combinational.
module bec #(
  parameter int N = 4  // converter width in bits, at least 2
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  logic [N-1:1] all1;  // all1[i] = AND of b[i-1:0]

  assign x[0] = ~b[0];
  for (genvar i = 1; i < N; i++) begin : g_bit
    if (i == 1) begin : g_first
      assign all1[i] = b[0];
    end else begin : g_chain
      assign all1[i] = all1[i-1] & b[i-1];
    end
    xor_aoi u_xor (.a(b[i]), .b(all1[i]), .y(x[i]));
  end
endmodule

// sqrt_csla: modified square-root carry select adder, 40 bits by default.
//
// {cout, sum} = a + b + cin. The operands are split into groups of growing
// width (2, 2, 3, 4, 5, 6, 7, 8, 3 bits from the LSB for WIDTH = 40; 2, 2, 3,
// 4, 5 for WIDTH = 16; see csla_pkg). The lowest group is a plain ripple
// adder that takes cin. Every higher group is a csla_group: it precomputes
// its sum for a carry in of 0 with one ripple adder, derives the carry-in-1
// result with a binary to excess-1 converter instead of a second ripple
// adder, and lets the carry out of the group below select between the two.
// The carry therefore crosses each upper group through a single mux, and the
// growing group widths let each group's local sum finish about when that
// carry arrives.
// The group structure, the BEC in place of the carry-in-1 adder and the
// 40-bit width follow the source description; the group widths above 16 bits
// are this design's own continuation of the 16-bit layout.
// Purely combinational: no clock, no reset, no pipeline registers.
module sqrt_csla
  import csla_pkg::*;
#(
  parameter int WIDTH = 40  // adder width in bits, at least 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NG = num_groups(WIDTH);

  logic [NG:0] c;  // c[k] is the carry into group k

  assign c[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    localparam int LSB = group_lsb(k);
    localparam int W   = group_width(WIDTH, k);
    if (k == 0) begin : g_rca
      rca #(.N(W)) u_rca (
        .a(a[LSB +: W]), .b(b[LSB +: W]), .cin(c[k]),
        .sum(sum[LSB +: W]), .cout(c[k+1])
      );
    end else begin : g_sel
      csla_group #(.N(W)) u_grp (
        .a(a[LSB +: W]), .b(b[LSB +: W]), .cin(c[k]),
        .sum(sum[LSB +: W]), .cout(c[k+1])
      );
    end
  end

  assign cout = c[NG];
endmodule

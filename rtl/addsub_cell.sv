// addsub_cell: the adder/subtractor cell at the input of the 1D DCT unit.
//
// A sample pair (a, b) = (X(i), X(N-1-i)) enters one cell and leaves as the
// sum a+b, which feeds the even-coefficient inner products, and the
// difference a-b, which feeds the odd-coefficient inner products. This is the
// symmetry of the cosine basis that halves the multiplications from N^2 to
// N^2/2. Both results are one bit wider than the inputs, so nothing
// overflows. The same cell, with a wider W, forms the output butterfly of the
// 1D unit in inverse mode (a design choice, see dct1d).
//
// Purely combinational; inputs and outputs are two's complement.
module addsub_cell #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W:0]   sum,
  output logic signed [W:0]   diff
);

  always_comb begin
    sum  = (W+1)'(a) + (W+1)'(b);
    diff = (W+1)'(a) - (W+1)'(b);
  end

endmodule

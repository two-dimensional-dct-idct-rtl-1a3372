// compressor_4to2: a row of W 4:2 compressor cells.
//
// Four W-bit words are reduced to a sum word and a carry word with the same
// total (mod 2^W). Each bit cell is two cascaded carry-save adders: the first
// adds a, b, c and sends its carry sideways to the next bit position (the
// cell's carry-out); the second adds the first one's sum, d and the carry-in
// from the bit below. The carry-out of a cell depends only on a, b and c, so
// no carry ripples along the row and the delay is that of three XORs.
// The carry word is returned already shifted to its weight.
//
// Purely combinational; W must be at least 2. Bits carried out of position W-1 are dropped, which
// is correct for operands that are residues mod 2^W.
module compressor_4to2 #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] t;     // sum of the first carry-save adder
  logic [W-2:0] co;    // sideways carry-out of cells 0 .. W-2 (the top one is dropped)
  logic [W-1:0] ci;    // sideways carry-in of each cell
  logic [W-2:0] k;     // carry of the second carry-save adder, cells 0 .. W-2

  always_comb begin
    t  = a ^ b ^ c;
    co = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    ci = {co, 1'b0};
    s  = t ^ d ^ ci;
    k  = (t[W-2:0] & d[W-2:0]) | (t[W-2:0] & ci[W-2:0]) | (d[W-2:0] & ci[W-2:0]);
    cy = {k, 1'b0};
  end

endmodule

// cla_adder: the final carry lookahead adder of a vector inner product.
//
// Adds the sum and carry words left by the carry-save accumulation. The
// carries are computed by a parallel prefix (Kogge-Stone) lookahead network:
// generate/propagate pairs are combined over distances 1, 2, 4, ... so every
// carry is ready after log2(W) levels. The choice of prefix network is this
// design's own; only a carry lookahead adder of this width is prescribed.
//
// Purely combinational; the result is taken mod 2^W.
module cla_adder #(
  parameter int W = 35
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  logic [W-1:0] p;
  logic [W-1:0] gg;
  logic [W-1:0] pp;

  always_comb begin
    p  = a ^ b;
    gg = a & b;
    pp = p;
    for (int span = 1; span < W; span = span * 2) begin
      // Descending order: position i-span still holds the previous level.
      for (int i = W - 1; i >= span; i--) begin
        gg[i] = gg[i] | (pp[i] & gg[i-span]);
        pp[i] = pp[i] & pp[i-span];
      end
    end
    s = p ^ {gg[W-2:0], 1'b0};
  end

endmodule

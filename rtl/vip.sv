// vip: radix-2^(B/K) vector inner product unit, W = sum_i c(i) * V(i) over
// i = 0 .. N/2-1.
//
// Each of the N/2 cells keeps its coefficient c(i) in a register (loaded when
// coef_load is high) and splits it into K digits of NB = B/K bits. Every digit
// gets its own array multiplier (digit_mult), so all N/2 x K digit products
// u(r,i) * V(i) are formed at once, each as a partial sum word and a partial
// carry word, with no adder inside the multipliers. The summations over the
// cells i and over the digits r are merged into a single sum: all
// N x K words, shifted by 2^(r*NB) to their significance, go into one tree of
// 4:2 compressors (cs_tree), and one carry lookahead adder (cla_adder) of
// 2B + log2(N/2) + 1 bits gives the result. For N = 8 that is 32 words and
// four levels of compressors.
//
// The Baugh-Wooley sign correction of all N/2 products is one constant. Its
// low bits are injected into an empty adder input of the top-digit
// multiplier of cell 0, and its top bit extends that multiplier's carry word,
// so it costs no extra word in the tree.
//
// The digit split, the adder-free multipliers, the single merged compressor
// tree and the single final adder follow the architecture. Taking the data
// word one bit wider than the coefficient (VW = B+1, room for the pre-added
// sample) and gathering the whole correction in one multiplier are this
// design's choices.
//
// Timing: the coefficient registers load on the rising clock edge; from v to
// y the unit is combinational. Reset loads zeros into the coefficient
// registers.
module vip #(
  parameter int N     = 8,                        // transform size; N/2 products
  parameter int B     = 16,                       // coefficient wordlength
  parameter int VW    = B + 1,                    // data wordlength
  parameter int K     = 4,                        // digits per coefficient
  parameter int ACC_W = 2 * B + $clog2(N / 2) + 1 // result width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    coef_load,
  input  logic signed [B-1:0]     coef_in [N/2],
  input  logic signed [VW-1:0]    v       [N/2],
  output logic signed [ACC_W-1:0] y
);

  localparam int NB = B / K;
  localparam int PW = VW + NB;               // width of a digit product word

  // Sign correction of one Baugh-Wooley product, and of all N/2 of them.
  localparam longint PCORR = (longint'(1) <<< (B - 1)) + (longint'(1) <<< (VW - 1))
                           - (longint'(1) <<< (B + VW - 1));
  localparam logic [ACC_W-1:0] CORR = ACC_W'((longint'(N) / 2) * PCORR);

  // Where the correction goes. Bits at or above WTOP lie above every product
  // word: they extend the carry word of the top-digit product of cell 0.
  // Bits from TOPOFF up to TOPOFF+VW-1 are injected into the array of that
  // same multiplier. If the correction has bits elsewhere (not the case for
  // the default sizes), it is added as one extra word instead.
  localparam int TOPOFF = (K - 1) * NB;
  localparam int WTOP   = TOPOFF + PW;
  localparam logic [ACC_W-1:0] HI_MASK  = ~((ACC_W'(1) << WTOP) - ACC_W'(1));
  localparam logic [ACC_W-1:0] MID_MASK = ((ACC_W'(1) << (TOPOFF + VW)) - ACC_W'(1))
                                        & ~((ACC_W'(1) << TOPOFF) - ACC_W'(1));
  localparam bit INJ_OK = (WTOP < ACC_W) && ((CORR & ~(HI_MASK | MID_MASK)) == '0);
  localparam logic [ACC_W-1:0] CORR_HI  = INJ_OK ? (CORR & HI_MASK) : '0;
  localparam logic [VW-1:0]    CORR_INJ = INJ_OK ? VW'((CORR & MID_MASK) >> TOPOFF) : '0;
  localparam int NW = (N / 2) * K * 2 + (INJ_OK ? 0 : 1);  // words into the tree

  logic signed [B-1:0] coef_q [N/2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N / 2; i++) coef_q[i] <= '0;
    end else if (coef_load) begin
      coef_q <= coef_in;
    end
  end

  logic [ACC_W-1:0] words [NW];
  logic [ACC_W-1:0] tree_s;
  logic [ACC_W-1:0] tree_c;

  for (genvar i = 0; i < N / 2; i++) begin : g_cell
    for (genvar r = 0; r < K; r++) begin : g_digit
      logic [VW+NB-1:0] ps;
      logic [VW+NB-1:0] pc;
      localparam bit TOP0 = (i == 0) && (r == K - 1);
      digit_mult #(.B(B), .VW(VW), .NB(NB), .DIGIT(r),
                   .INJ(TOP0 ? CORR_INJ : VW'(0))) u_mult (
        .u (coef_q[i][r*NB +: NB]),
        .v (v[i]),
        .s (ps),
        .cy(pc)
      );
      assign words[2*(i*K+r)]   = ACC_W'(ps) << (r * NB);
      assign words[2*(i*K+r)+1] = (ACC_W'(pc) << (r * NB)) | (TOP0 ? CORR_HI : '0);
    end
  end
  if (!INJ_OK) begin : g_corr_word
    assign words[NW-1] = CORR;
  end

  cs_tree #(.M(NW), .W(ACC_W)) u_tree (
    .in(words),
    .s (tree_s),
    .cy(tree_c)
  );

  logic [ACC_W-1:0] sum;

  cla_adder #(.W(ACC_W)) u_cla (
    .a(tree_s),
    .b(tree_c),
    .s(sum)
  );

  assign y = signed'(sum);

endmodule

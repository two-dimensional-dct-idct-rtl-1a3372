// dct1d: one N-point 1D DCT/IDCT unit (N even), used twice in the 2D design.
//
// Forward mode. The N input samples arrive in parallel. N/2 adder/subtractor
// cells fold the input with the cosine symmetry, V(i) = X(i) +/- X(N-1-i),
// and N vector inner products (vip) each hold one row of the folded cosine
// matrix: the N/2 "even" units compute
//   Z(2k)   = sum_i c(2k, i)   * (X(i) + X(N-1-i)),  i = 0 .. N/2-1,
// and the N/2 "odd" units
//   Z(2k+1) = sum_i c(2k+1, i) * (X(i) - X(N-1-i)).
// All N results appear in parallel.
//
// Inverse mode (this design's own mapping; only the claim that the same
// hardware can compute the inverse is given). The adder/subtractor cells are
// bypassed: even unit k takes the even-indexed inputs with the coefficients
// c(2m, k) and forms E(k), odd unit k takes the odd-indexed inputs with
// c(2m+1, k) and forms O(k), m = 0 .. N/2-1. A second row of N/2
// adder/subtractor cells at the output gives x(k) = E(k) + O(k) and
// x(N-1-k) = E(k) - O(k).
//
// The coefficients sit in registers inside the inner-product cells. They are
// reloaded from a constant table (dct_pkg::coef) after reset and whenever the
// mode changes, on the same clock edge that captures the input vector with its
// new mode, so consecutive vectors may use different modes.
//
// Timing: x_in and inverse_in are registered on the rising edge; y follows
// combinationally from the registered vector, one cycle after x_in was
// presented. Outputs have the full accumulator width, 2B + log2(N/2) + 1
// bits, with B-1 more fraction bits than the input.
module dct1d #(
  parameter int N     = 8,
  parameter int B     = 16,
  parameter int K     = 4,
  parameter int ACC_W = 2 * B + $clog2(N / 2) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    inverse_in,    // 0: DCT, 1: IDCT
  input  logic signed [B-1:0]     x_in [N],
  output logic signed [ACC_W-1:0] y    [N]
);

  localparam int H  = N / 2;
  localparam int VW = B + 1;

  // Constant coefficient sets: [bank][unit][idx]; bank 0 even, 1 odd.
  typedef logic signed [B-1:0] coef_t;

  function automatic coef_t fwd_coef(int bank, int unit, int idx);
    return coef_t'(dct_pkg::coef(N, B, 2 * unit + bank, idx));
  endfunction

  function automatic coef_t inv_coef(int bank, int unit, int idx);
    return coef_t'(dct_pkg::coef(N, B, 2 * idx + bank, unit));
  endfunction

  // Input register and mode register.
  logic signed [B-1:0] x_q [N];
  logic                inv_q;
  logic                loaded_q;    // coefficients valid since reset
  logic                coef_load;
  logic                inv_next;

  assign inv_next  = inverse_in;
  assign coef_load = !loaded_q || (inverse_in != inv_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) x_q[i] <= '0;
      inv_q    <= 1'b0;
      loaded_q <= 1'b0;
    end else begin
      x_q      <= x_in;
      inv_q    <= inverse_in;
      loaded_q <= 1'b1;
    end
  end

  // Input folding: N/2 adder/subtractor cells.
  logic signed [B:0] fsum  [H];
  logic signed [B:0] fdiff [H];

  for (genvar i = 0; i < H; i++) begin : g_pre
    addsub_cell #(.W(B)) u_pre (
      .a   (x_q[i]),
      .b   (x_q[N-1-i]),
      .sum (fsum[i]),
      .diff(fdiff[i])
    );
  end

  // Inner products: bank 0 even, bank 1 odd.
  logic signed [ACC_W-1:0] acc [2][H];

  for (genvar bank = 0; bank < 2; bank++) begin : g_bank
    for (genvar u = 0; u < H; u++) begin : g_unit
      logic signed [B-1:0]  cin [H];
      logic signed [VW-1:0] vin [H];
      for (genvar c = 0; c < H; c++) begin : g_cell
        assign cin[c] = inv_next ? inv_coef(bank, u, c) : fwd_coef(bank, u, c);
        assign vin[c] = inv_q ? VW'(x_q[2*c+bank])
                              : ((bank == 0) ? fsum[c] : fdiff[c]);
      end
      vip #(.N(N), .B(B), .VW(VW), .K(K), .ACC_W(ACC_W)) u_vip (
        .clk      (clk),
        .rst_n    (rst_n),
        .coef_load(coef_load),
        .coef_in  (cin),
        .v        (vin),
        .y        (acc[bank][u])
      );
    end
  end

  // Output butterfly for the inverse, and output ordering.
  logic signed [ACC_W:0] bsum  [H];
  logic signed [ACC_W:0] bdiff [H];

  for (genvar k = 0; k < H; k++) begin : g_post
    addsub_cell #(.W(ACC_W)) u_post (
      .a   (acc[0][k]),
      .b   (acc[1][k]),
      .sum (bsum[k]),
      .diff(bdiff[k])
    );
  end

  always_comb begin
    for (int k = 0; k < H; k++) begin
      if (inv_q) begin
        y[k]     = bsum[k][ACC_W-1:0];
        y[N-1-k] = bdiff[k][ACC_W-1:0];
      end else begin
        y[2*k]   = acc[0][k];
        y[2*k+1] = acc[1][k];
      end
    end
  end

endmodule

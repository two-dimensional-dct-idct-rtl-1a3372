// dct2d: fully parallel N x N 2D DCT/IDCT by row-column decomposition.
//
// Three stages: a 1D DCT unit for the rows, a transposition buffer of
// N^2 + N skewed registers with N N:1 multiplexers, and a second, identical
// 1D DCT unit for the columns. One column of a block enters per cycle and,
// after the initial delay, one row of the transformed block leaves per cycle,
// so a whole N x N transform is completed every N cycles.
//
// Data format (choices of this design). Forward: x_in[i] = X(i, j) is column j
// of the input block, B-bit two's complement integers, presented on N
// consecutive valid cycles j = 0 .. N-1; y_out[q] = Y(p, q) is row p of the
// 2D DCT (orthonormal, including the 2/N E(p)E(q) factor), rows p = 0 .. N-1
// on consecutive valid cycles. Inverse (inverse = 1): x_in carries column q
// of the coefficient block, y_out row i of the reconstructed samples.
// Between the stages the row results are cut to B bits (TRANS_FRAC fraction
// bits, saturated); the column results are cut to B bits with OUT_FRAC
// fraction bits, saturated. Truncation is toward minus infinity.
//
// Control. A counter gives the position of each valid input column inside
// its block; it steers the transposition multiplexers. Valid and mode travel
// with the data through delay registers, so the mode may change from one
// block to the next with no gap (each 1D unit reloads its coefficients as the
// first column or row of the other mode reaches it). Blocks may be separated
// by idle cycles, but the N columns of one block must be contiguous and share
// one mode (checked by assertions).
//
// Timing: inputs are registered on the rising edge of clk, outputs come from
// registers. The first row of a block appears N + 4 cycles after its first
// column was presented: 1 cycle into the row unit, N + 1 cycles through the
// transposition, 1 cycle into the column unit, 1 output register.
module dct2d #(
  parameter int N          = 8,
  parameter int B          = 16,
  parameter int K          = 4,
  parameter int TRANS_FRAC = 2,
  parameter int OUT_FRAC   = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                inverse,
  input  logic signed [B-1:0] x_in  [N],
  output logic                out_valid,
  output logic                out_inverse,
  output logic signed [B-1:0] y_out [N]
);

  localparam int ACC_W  = 2 * B + $clog2(N / 2) + 1;
  localparam int CFRAC  = B - 1;                    // coefficient fraction bits
  localparam int SHIFT1 = CFRAC - TRANS_FRAC;       // row result -> buffer word
  localparam int SHIFT2 = CFRAC + TRANS_FRAC - OUT_FRAC;
  localparam int SW     = $clog2(N);
  localparam int TDLY   = N + 1;                    // transposition delay

  // Arithmetic shift right by SH, then saturate to B bits.
  function automatic logic signed [B-1:0] cut(logic signed [ACC_W-1:0] v, int sh);
    logic signed [ACC_W-1:0] t;
    t = v >>> sh;
    if (t > ACC_W'((longint'(1) <<< (B - 1)) - 1))
      return {1'b0, {(B-1){1'b1}}};
    else if (t < -ACC_W'(longint'(1) <<< (B - 1)))
      return {1'b1, {(B-1){1'b0}}};
    else
      return t[B-1:0];
  endfunction

  // ---- block position counter (column index inside the block) ----
  logic [SW-1:0] pos_q;
  logic          blk_inv_q;      // mode of the block being received

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q     <= '0;
      blk_inv_q <= 1'b0;
    end else if (in_valid) begin
      pos_q <= (pos_q == SW'(N - 1)) ? '0 : pos_q + 1'b1;
      if (pos_q == '0) blk_inv_q <= inverse;
    end
  end

  // ---- stage 1: row transform ----
  logic                    v1_q;      // valid of the vector in the row unit
  logic [SW-1:0]           pos1_q;
  logic                    inv1_q;
  logic signed [ACC_W-1:0] row_y [N];
  logic signed [B-1:0]     row_z [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q   <= 1'b0;
      pos1_q <= '0;
      inv1_q <= 1'b0;
    end else begin
      v1_q   <= in_valid;
      pos1_q <= pos_q;
      inv1_q <= inverse;
    end
  end

  dct1d #(.N(N), .B(B), .K(K), .ACC_W(ACC_W)) u_row (
    .clk       (clk),
    .rst_n     (rst_n),
    .inverse_in(inverse),
    .x_in      (x_in),
    .y         (row_y)
  );

  always_comb begin
    for (int p = 0; p < N; p++) row_z[p] = cut(row_y[p], SHIFT1);
  end

  // ---- stage 2: transposition ----
  logic signed [B-1:0] col_z [N];

  transpose_buffer #(.N(N), .B(B)) u_tr (
    .clk   (clk),
    .rst_n (rst_n),
    .z_in  (row_z),
    .pos_in(pos1_q),
    .z_out (col_z)
  );

  // Valid and mode delayed with the data through the transposition.
  logic [TDLY-1:0] vdly_q;
  logic [TDLY-1:0] idly_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vdly_q <= '0;
      idly_q <= '0;
    end else begin
      vdly_q <= {vdly_q[TDLY-2:0], v1_q};
      idly_q <= {idly_q[TDLY-2:0], inv1_q};
    end
  end

  // ---- stage 3: column transform ----
  logic                    v3_q;
  logic                    inv3_q;
  logic signed [ACC_W-1:0] col_y [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3_q   <= 1'b0;
      inv3_q <= 1'b0;
    end else begin
      v3_q   <= vdly_q[TDLY-1];
      inv3_q <= idly_q[TDLY-1];
    end
  end

  dct1d #(.N(N), .B(B), .K(K), .ACC_W(ACC_W)) u_col (
    .clk       (clk),
    .rst_n     (rst_n),
    .inverse_in(idly_q[TDLY-1]),
    .x_in      (col_z),
    .y         (col_y)
  );

  // ---- output register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_inverse <= 1'b0;
      for (int q = 0; q < N; q++) y_out[q] <= '0;
    end else begin
      out_valid   <= v3_q;
      out_inverse <= inv3_q;
      for (int q = 0; q < N; q++) y_out[q] <= cut(col_y[q], SHIFT2);
    end
  end

  // ---- input rules ----
  // The columns of a block are contiguous and share one mode.
  a_block_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (pos_q != '0) |-> in_valid)
    else $error("dct2d: idle cycle inside a block");
  a_block_one_mode: assert property (@(posedge clk) disable iff (!rst_n)
    (pos_q != '0 && in_valid) |-> (inverse == blk_inv_q))
    else $error("dct2d: mode changed inside a block");

endmodule

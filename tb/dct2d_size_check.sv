// dct2d_size_check: drives one dct2d instance of size N with a stream of
// random blocks (forward and inverse, back to back and with idle cycles) and
// compares every output row bit for bit with the integer model; also checks
// that the first row of each block appears N+4 cycles after its first column.
// Used by tb_dct2d_sizes for the transform sizes other than the default.
module dct2d_size_check #(
  parameter int N    = 4,
  parameter int NBLK = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import dct_ref_pkg::*;
  localparam int B   = 16;
  localparam int SH1 = B - 1 - 2;
  localparam int SH2 = B - 1 + 2;
  localparam int LAT = N + 4;

  logic in_valid, inverse, out_valid, out_inverse;
  logic signed [B-1:0] x_in [N];
  logic signed [B-1:0] y_out [N];

  dct2d #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .inverse(inverse),
    .x_in(x_in), .out_valid(out_valid), .out_inverse(out_inverse), .y_out(y_out));

  longint exp_vals [$];
  bit     exp_inv  [$];
  int     exp_cyc  [$];
  int     cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_cyc.size() == 0) begin
        failures++;
        $display("FAIL N=%0d unexpected row", N);
      end else begin
        if (exp_cyc.pop_front() != cyc) begin
          failures++;
          $display("FAIL N=%0d row at wrong cycle %0d", N, cyc);
        end
        if (exp_inv.pop_front() != out_inverse) failures++;
        for (int q = 0; q < N; q++) begin
          longint w;
          w = exp_vals.pop_front();
          checks++;
          if (longint'(y_out[q]) != w) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d q=%0d got %0d want %0d", N, q, y_out[q], w);
          end
        end
      end
    end
  end

  initial begin
    longint blk [N][N];
    longint z [N][N];
    vec_t v, r;
    done = 1'b0;
    checks = 0;
    failures = 0;
    in_valid = 1'b0;
    inverse = 1'b0;
    for (int i = 0; i < N; i++) x_in[i] = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int bk = 0; bk < NBLK; bk++) begin
      bit inv;
      int rng;
      inv = (bk % 3 == 1);
      rng = (bk % 4 == 0) ? B : 10;
      if (bk % 7 == 6) begin
        in_valid = 1'b0;
        repeat (1 + bk % 2) @(negedge clk);
      end
      for (int c = 0; c < N; c++)
        for (int i = 0; i < N; i++) blk[c][i] = rnd(rng);
      // Model.
      for (int c = 0; c < N; c++) begin
        for (int e = 0; e < MAXN; e++) v[e] = (e < N) ? blk[c][e] : 0;
        r = inv ? inv1d(v, N, B) : fwd1d(v, N, B);
        for (int e = 0; e < N; e++) z[e][c] = cut(r[e], SH1, B);
      end
      for (int p = 0; p < N; p++) begin
        for (int e = 0; e < MAXN; e++) v[e] = (e < N) ? z[p][e] : 0;
        r = inv ? inv1d(v, N, B) : fwd1d(v, N, B);
        for (int e = 0; e < N; e++) exp_vals.push_back(cut(r[e], SH2, B));
        exp_inv.push_back(inv);
        exp_cyc.push_back(cyc + LAT + p);
      end
      for (int c = 0; c < N; c++) begin
        in_valid = 1'b1;
        inverse  = inv;
        for (int i = 0; i < N; i++) x_in[i] = B'(blk[c][i]);
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
    repeat (LAT + N + 2) @(negedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin
      failures++;
      $display("FAIL N=%0d: %0d rows missing", N, exp_cyc.size());
    end
    done = 1'b1;
  end
endmodule

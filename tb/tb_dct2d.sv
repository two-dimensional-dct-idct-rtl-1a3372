// tb_dct2d: end-to-end test of the 2D DCT/IDCT at its default size (8 x 8,
// 16-bit words).
//
// Blocks are streamed one column per cycle and every output row is compared
// bit for bit with an integer model (1D transforms with the rounded
// coefficients, truncation and saturation between and after the passes). On
// top of that:
//  - the first row of every block must leave exactly N+4 cycles after the
//    block's first column entered, and back-to-back blocks must give
//    back-to-back output rows (one transform every N cycles);
//  - small-range forward results are compared with a floating-point DCT, and
//    the hardware's own DCT output is fed back through its IDCT and compared
//    with a floating-point IDCT (within 2) and with the original block
//    (within 8, the truncation bias);
//  - each mechanism must occur at least once: forward and inverse blocks, a
//    mode switch between back-to-back blocks, idle cycles between blocks,
//    saturation of the word entering the transposition. (Saturation at the
//    output is counted too; with the default fraction settings the output
//    cannot overflow, so it is not required.)
module tb_dct2d;
  import dct_ref_pkg::*;
  localparam int N = 8;
  localparam int B = 16;
  localparam int TRANS_FRAC = 2;
  localparam int OUT_FRAC = 0;
  localparam int SH1 = B - 1 - TRANS_FRAC;
  localparam int SH2 = B - 1 + TRANS_FRAC - OUT_FRAC;
  localparam int LAT = N + 4;
  localparam int NBLK = 120;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, inverse = 1'b0;
  logic signed [B-1:0] x_in [N];
  logic out_valid, out_inverse;
  logic signed [B-1:0] y_out [N];

  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0, n_switch = 0, n_gap = 0, n_b2b = 0;
  int n_sat1 = 0, n_sat2 = 0, n_roundtrip = 0, n_float = 0;

  always #5 clk = ~clk;

  dct2d dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .inverse(inverse),
    .x_in(x_in), .out_valid(out_valid), .out_inverse(out_inverse), .y_out(y_out));

  // Expected rows, in order.
  longint exp_vals [$];     // N values per expected row
  bit     exp_inv  [$];
  int     exp_cyc  [$];      // cycle at which the row must appear, -1 = any
  longint got_blk [N][N];    // last output block, for the round trip

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Integer model of one block: in[c][e] is element e of input column c,
  // out[r][e] element e of output row r.
  task automatic model(input longint in [N][N], input bit inv, output longint out [N][N]);
    vec_t v, r;
    longint z [N][N];
    for (int c = 0; c < N; c++) begin
      for (int e = 0; e < MAXN; e++) v[e] = (e < N) ? in[c][e] : 0;
      r = inv ? inv1d(v, N, B) : fwd1d(v, N, B);
      for (int e = 0; e < N; e++) begin
        if (saturates(r[e], SH1, B)) n_sat1++;
        z[e][c] = cut(r[e], SH1, B);       // z[row][column]
      end
    end
    for (int p = 0; p < N; p++) begin
      for (int e = 0; e < MAXN; e++) v[e] = (e < N) ? z[p][e] : 0;
      r = inv ? inv1d(v, N, B) : fwd1d(v, N, B);
      for (int e = 0; e < N; e++) begin
        if (saturates(r[e], SH2, B)) n_sat2++;
        out[p][e] = cut(r[e], SH2, B);
      end
    end
  endtask

  // Send one block; gap = idle cycles before it.
  task automatic send(input longint blk [N][N], input bit inv, input int gap);
    longint out [N][N];
    model(blk, inv, out);
    if (gap > 0) begin
      in_valid = 1'b0;
      for (int k = 0; k < gap; k++) begin
        for (int i = 0; i < N; i++) x_in[i] = B'(rnd(B));
        @(negedge clk);
      end
    end
    for (int p = 0; p < N; p++) begin
      for (int q = 0; q < N; q++) exp_vals.push_back(out[p][q]);
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
  endtask

  // Output checker.
  int rows_seen = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_cyc.size() == 0) begin
        failures++;
        $display("FAIL unexpected output row at cycle %0d", cyc);
      end else begin
        longint row [N];
        int     ecyc;
        for (int q = 0; q < N; q++) row[q] = exp_vals.pop_front();
        ecyc = exp_cyc.pop_front();
        if (out_inverse != exp_inv.pop_front()) begin
          failures++;
          $display("FAIL mode flag at cycle %0d", cyc);
        end
        if (cyc != ecyc) begin
          failures++;
          $display("FAIL row at cycle %0d, due at %0d", cyc, ecyc);
        end
        for (int q = 0; q < N; q++) begin
          checks++;
          got_blk[rows_seen % N][q] = longint'(y_out[q]);
          if (longint'(y_out[q]) != row[q]) begin
            failures++;
            if (failures < 10)
              $display("FAIL row %0d q=%0d got %0d want %0d", rows_seen, q, y_out[q], row[q]);
          end
        end
      end
      rows_seen++;
    end
  end

  task automatic wait_drain();
    int guard = 0;
    while (exp_cyc.size() != 0 && guard < 200) begin
      @(negedge clk);
      guard++;
    end
  endtask

  initial begin
    longint blk [N][N];
    longint orig [N][N];
    longint coefs [N][N];
    automatic bit prev_inv = 1'b0;
    automatic bit first = 1'b1;
    for (int i = 0; i < N; i++) x_in[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. Random stream: mixed ranges, modes and gaps.
    for (int bk = 0; bk < NBLK; bk++) begin
      bit inv;
      int gap;
      int rng;
      inv = (bk % 6 == 2) || (bk % 6 == 3) || (bk % 13 == 7);
      gap = (bk % 5 == 4) ? 1 + (bk % 3) : 0;
      rng = (bk % 4 == 0) ? B : (bk % 4 == 1) ? 9 : (bk % 4 == 2) ? 12 : 6;
      for (int c = 0; c < N; c++)
        for (int i = 0; i < N; i++) blk[c][i] = rnd(rng);
      if (bk == 10) for (int c = 0; c < N; c++) for (int i = 0; i < N; i++) blk[c][i] = -32768;
      if (bk == 11) for (int c = 0; c < N; c++) for (int i = 0; i < N; i++) blk[c][i] = 32767;
      if (inv) n_inv++; else n_fwd++;
      if (!first) begin
        if (gap > 0) n_gap++;
        else begin
          n_b2b++;
          if (inv != prev_inv) n_switch++;
        end
      end
      first = 1'b0;
      prev_inv = inv;
      send(blk, inv, gap);
    end
    wait_drain();

    // 2. Forward DCT against floating point, then the round trip through
    //    the hardware's own IDCT.
    for (int t = 0; t < 12; t++) begin
      for (int c = 0; c < N; c++)
        for (int i = 0; i < N; i++) begin
          orig[c][i] = rnd(9);
          blk[c][i]  = orig[c][i];
        end
      repeat (3) @(negedge clk);
      send(blk, 1'b0, 0);
      wait_drain();
      repeat (2) @(negedge clk);
      // got_blk[p][q] = Y(p, q). Floating-point check: Y(p,q) =
      // sum_i sum_j X(i,j) a(p,i) a(q,j), with X(i,j) = orig[j][i].
      for (int p = 0; p < N; p++)
        for (int q = 0; q < N; q++) begin
          real acc;
          acc = 0.0;
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++)
              acc += real'(orig[j][i]) *
                     ((p == 0) ? $sqrt(1.0 / N) : $sqrt(2.0 / N)) * $cos(3.14159265358979 * (2 * i + 1) * p / (2.0 * N)) *
                     ((q == 0) ? $sqrt(1.0 / N) : $sqrt(2.0 / N)) * $cos(3.14159265358979 * (2 * j + 1) * q / (2.0 * N));
          checks++;
          n_float++;
          if (acc - real'(got_blk[p][q]) > 2.0 || real'(got_blk[p][q]) - acc > 2.0) begin
            failures++;
            $display("FAIL float Y(%0d,%0d) got %0d want %f", p, q, got_blk[p][q], acc);
          end
        end
      // Feed Y back: inverse input column q carries Y(., q).
      for (int q = 0; q < N; q++)
        for (int p = 0; p < N; p++) coefs[q][p] = got_blk[p][q];
      send(coefs, 1'b1, 0);
      wait_drain();
      repeat (2) @(negedge clk);
      // Inverse output row i is X(i, .), i.e. orig[.][i]. It is compared
      // with a floating-point IDCT of the same coefficients (within 2), and
      // with the original block within 8: every cut rounds toward minus
      // infinity, and the DC basis gathers that bias at X(0,0).
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          automatic longint dlt = got_blk[i][j] - orig[j][i];
          automatic real    xf  = 0.0;
          for (int p = 0; p < N; p++)
            for (int q = 0; q < N; q++)
              xf += real'(coefs[q][p]) *
                    ((p == 0) ? $sqrt(1.0 / N) : $sqrt(2.0 / N)) * $cos(3.14159265358979 * (2 * i + 1) * p / (2.0 * N)) *
                    ((q == 0) ? $sqrt(1.0 / N) : $sqrt(2.0 / N)) * $cos(3.14159265358979 * (2 * j + 1) * q / (2.0 * N));
          checks += 2;
          n_roundtrip++;
          if (xf - real'(got_blk[i][j]) > 2.0 || real'(got_blk[i][j]) - xf > 2.0) begin
            failures++;
            $display("FAIL float IDCT X(%0d,%0d) got %0d want %f", i, j, got_blk[i][j], xf);
          end
          if (dlt > 8 || dlt < -8) begin
            failures++;
            $display("FAIL round trip X(%0d,%0d) got %0d want %0d", i, j, got_blk[i][j], orig[j][i]);
          end
        end
    end

    checks++;
    if (exp_cyc.size() != 0) begin failures++; $display("FAIL %0d rows never came", exp_cyc.size()); end
    $display("forward=%0d inverse=%0d mode_switch_back_to_back=%0d idle_gaps=%0d back_to_back=%0d",
             n_fwd, n_inv, n_switch, n_gap, n_b2b);
    $display("saturations: transposition=%0d output=%0d float_checks=%0d roundtrip_checks=%0d",
             n_sat1, n_sat2, n_float, n_roundtrip);
    checks++;
    if (n_fwd == 0 || n_inv == 0 || n_switch == 0 || n_gap == 0 || n_b2b == 0 ||
        n_sat1 == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

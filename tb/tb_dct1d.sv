// tb_dct1d: random vectors through the 1D unit in forward and inverse mode,
// with the mode changing between consecutive vectors, compared exactly with
// the integer reference. The result must appear one cycle after the vector is
// presented, and each mode must have been used at least once.
module tb_dct1d;
  import dct_ref_pkg::*;
  localparam int N = 8;
  localparam int B = 16;
  localparam int ACC_W = 2 * B + $clog2(N / 2) + 1;

  logic clk = 1'b0, rst_n = 1'b0, inv = 1'b0;
  logic signed [B-1:0]     x [N];
  logic signed [ACC_W-1:0] y [N];
  int checks = 0, failures = 0, n_fwd = 0, n_inv = 0, n_switch = 0;

  always #5 clk = ~clk;

  dct1d #(.N(N), .B(B), .K(4)) dut (.clk(clk), .rst_n(rst_n), .inverse_in(inv), .x_in(x), .y(y));

  initial begin
    vec_t xv, want;
    automatic bit prev_inv = 1'b0;
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      // Mode pattern: runs of forward and inverse with single-vector switches.
      inv = (n % 7 == 3) || (n % 11 >= 6) || (n >= 300 && n < 320);
      for (int i = 0; i < MAXN; i++) xv[i] = 0;
      for (int i = 0; i < N; i++) begin
        if (n == 0)      xv[i] = -32768;
        else if (n == 1) xv[i] = 32767;
        else if (n == 2) xv[i] = (i % 2 == 0) ? -32768 : 32767;
        else             xv[i] = rnd(B);
        x[i] = B'(xv[i]);
      end
      want = inv ? inv1d(xv, N, B) : fwd1d(xv, N, B);
      if (inv) n_inv++; else n_fwd++;
      if (n > 0 && inv != prev_inv) n_switch++;
      prev_inv = inv;
      @(posedge clk);
      #1;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (longint'(y[p]) != want[p]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d inv=%0d p=%0d y=%0d want=%0d", n, inv, p, y[p], want[p]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_fwd == 0 || n_inv == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL mode coverage fwd=%0d inv=%0d switches=%0d", n_fwd, n_inv, n_switch);
    end
    $display("forward=%0d inverse=%0d mode_switches=%0d", n_fwd, n_inv, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

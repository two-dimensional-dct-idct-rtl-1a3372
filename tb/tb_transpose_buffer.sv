// tb_transpose_buffer: streams N x N blocks of random words column by column,
// back to back and with idle cycles between some blocks, and checks that row
// p of each block appears at the output exactly N+1 cycles after column p
// entered.
module tb_transpose_buffer;
  import dct_ref_pkg::*;
  localparam int N  = 8;
  localparam int B  = 16;
  localparam int SW = $clog2(N);
  localparam int NBLK = 40;
  localparam int DEPTH = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [B-1:0] z_in [N];
  logic signed [B-1:0] z_out [N];
  logic [SW-1:0] pos;
  int checks = 0, failures = 0, gaps = 0, b2b = 0;

  // Expected output per cycle: valid flag and row.
  bit             exp_v   [DEPTH];
  logic [B-1:0]   exp_row [DEPTH][N];
  int cyc = 0;

  always #5 clk = ~clk;

  transpose_buffer #(.N(N), .B(B)) dut (.clk(clk), .rst_n(rst_n), .z_in(z_in), .pos_in(pos), .z_out(z_out));

  always @(posedge clk) begin
    if (rst_n) begin
      if (exp_v[cyc]) begin
        for (int j = 0; j < N; j++) begin
          checks++;
          if (z_out[j] !== exp_row[cyc][j]) begin
            failures++;
            if (failures < 10) $display("FAIL cycle %0d j=%0d got %0d want %0d", cyc, j, z_out[j], exp_row[cyc][j]);
          end
        end
      end
      cyc++;
    end
  end

  initial begin
    logic [B-1:0] blk [N][N];
    int t;
    for (int i = 0; i < DEPTH; i++) exp_v[i] = 1'b0;
    for (int i = 0; i < N; i++) z_in[i] = '0;
    pos = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    t = 0;   // index of the cycle that ends with the next posedge
    for (int bk = 0; bk < NBLK; bk++) begin
      if (bk % 5 == 4) begin
        automatic int g = 1 + bk % 3;
        gaps++;
        for (int k = 0; k < g; k++) begin
          for (int i = 0; i < N; i++) z_in[i] = B'(rnd(B));
          pos = SW'($urandom);
          @(negedge clk);
          t++;
        end
      end else if (bk > 0) b2b++;
      for (int p = 0; p < N; p++)
        for (int j = 0; j < N; j++) blk[p][j] = B'(rnd(B));
      for (int j = 0; j < N; j++) begin
        for (int p = 0; p < N; p++) z_in[p] = blk[p][j];
        pos = SW'(j);
        // Row j is due N+1 cycles later.
        exp_v[t + N + 1] = 1'b1;
        for (int q = 0; q < N; q++) exp_row[t + N + 1][q] = blk[j][q];
        @(negedge clk);
        t++;
      end
    end
    repeat (2 * N + 2) @(negedge clk);
    checks++;
    if (gaps == 0 || b2b == 0) begin
      failures++;
      $display("FAIL coverage gaps=%0d back_to_back=%0d", gaps, b2b);
    end
    $display("gaps=%0d back_to_back=%0d", gaps, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (DEPTH - 10) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

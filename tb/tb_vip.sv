// tb_vip: loads random coefficients, applies random data vectors and compares
// the inner product with the exact sum of c(i)*V(i); also checks that the
// coefficient registers hold while coef_load is low, that the result follows
// v in the same cycle, and that the tree takes exactly N x K words.
module tb_vip;
  import dct_ref_pkg::*;
  localparam int N  = 8;
  localparam int B  = 16;
  localparam int VW = B + 1;
  localparam int H  = N / 2;
  localparam int ACC_W = 2 * B + $clog2(H) + 1;

  logic clk = 1'b0, rst_n = 1'b0, coef_load = 1'b0;
  logic signed [B-1:0]     coef_in [H];
  logic signed [VW-1:0]    v [H];
  logic signed [ACC_W-1:0] y;
  longint cref [H];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vip #(.N(N), .B(B), .VW(VW), .K(4)) dut (
    .clk(clk), .rst_n(rst_n), .coef_load(coef_load), .coef_in(coef_in), .v(v), .y(y));

  task automatic apply_and_check();
    longint want = 0;
    for (int i = 0; i < H; i++) begin
      v[i] = VW'(rnd(VW));
      want += cref[i] * longint'(v[i]);
    end
    #1;
    checks++;
    if (longint'(y) != want) begin
      failures++;
      $display("FAIL y=%0d want=%0d", y, want);
    end
  endtask

  initial begin
    for (int i = 0; i < H; i++) begin coef_in[i] = '0; v[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // The sign correction must ride inside the multipliers: exactly N x K
    // words enter the compressor tree.
    checks++;
    if (dut.NW != N * 4) begin
      failures++;
      $display("FAIL %0d words in the compressor tree", dut.NW);
    end
    for (int set = 0; set < 40; set++) begin
      @(negedge clk);
      for (int i = 0; i < H; i++) begin
        cref[i]    = (set == 0) ? -32768 : (set == 1) ? 32767 : rnd(B);
        coef_in[i] = B'(cref[i]);
      end
      coef_load = 1'b1;
      @(negedge clk);
      coef_load = 1'b0;
      // New values on coef_in must not reach the registers now.
      for (int i = 0; i < H; i++) coef_in[i] = B'(rnd(B));
      if (set == 0) begin
        for (int i = 0; i < H; i++) v[i] = {1'b1, {(VW-1){1'b0}}};
        #1;
        checks++;
        if (longint'(y) != -32768 * -65536 * H) begin
          failures++;
          $display("FAIL extreme y=%0d", y);
        end
      end
      for (int n = 0; n < 50; n++) apply_and_check();
      @(negedge clk);
      for (int n = 0; n < 5; n++) apply_and_check();
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

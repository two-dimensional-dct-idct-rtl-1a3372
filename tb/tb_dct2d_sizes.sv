// tb_dct2d_sizes: the 2D DCT/IDCT built for the other two transform sizes of
// the hardware-cost comparison, 4 x 4 and 16 x 16 (16-bit words), each run on
// a stream of forward and inverse blocks and checked bit for bit.
module tb_dct2d_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  logic done4, done16;
  int   c4, f4, c16, f16;

  always #5 clk = ~clk;

  dct2d_size_check #(.N(4),  .NBLK(60)) u4  (.clk(clk), .rst_n(rst_n), .done(done4),  .checks(c4),  .failures(f4));
  dct2d_size_check #(.N(16), .NBLK(30)) u16 (.clk(clk), .rst_n(rst_n), .done(done16), .checks(c16), .failures(f16));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done4 && done16);
    $display("N=4: checks=%0d failures=%0d  N=16: checks=%0d failures=%0d", c4, f4, c16, f16);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16, f4 + f16);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16, f4 + f16 + 1);
    $finish;
  end
endmodule

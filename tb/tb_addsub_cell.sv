// tb_addsub_cell: exhaustive corners and random pairs through the
// adder/subtractor cell; sum and difference must be exact (one bit wider).
module tb_addsub_cell;
  import dct_ref_pkg::*;
  localparam int W = 16;
  logic signed [W-1:0] a, b;
  logic signed [W:0]   sum, diff;
  int checks = 0, failures = 0;

  addsub_cell #(.W(W)) dut (.a(a), .b(b), .sum(sum), .diff(diff));

  task automatic check(longint av, longint bv);
    a = W'(av);
    b = W'(bv);
    #1;
    checks++;
    if (longint'(sum) != av + bv || longint'(diff) != av - bv) begin
      failures++;
      $display("FAIL a=%0d b=%0d sum=%0d diff=%0d", av, bv, sum, diff);
    end
  endtask

  initial begin
    check(-32768, -32768);
    check(32767, 32767);
    check(-32768, 32767);
    check(32767, -32768);
    check(0, 0);
    for (int n = 0; n < 2000; n++) check(rnd(W), rnd(W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

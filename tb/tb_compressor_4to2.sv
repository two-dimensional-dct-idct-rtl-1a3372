// tb_compressor_4to2: the sum and carry words of a 4:2 compressor row must
// add up to a+b+c+d mod 2^W; corners and random words.
module tb_compressor_4to2;
  localparam int W = 20;
  logic [W-1:0] a, b, c, d, s, cy;
  int checks = 0, failures = 0;

  compressor_4to2 #(.W(W)) dut (.a(a), .b(b), .c(c), .d(d), .s(s), .cy(cy));

  task automatic check(logic [W-1:0] av, bv, cv, dv);
    logic [W-1:0] want;
    a = av; b = bv; c = cv; d = dv;
    #1;
    want = av + bv + cv + dv;
    checks++;
    if (W'(s + cy) != want) begin
      failures++;
      $display("FAIL %h %h %h %h -> %h + %h", av, bv, cv, dv, s, cy);
    end
  endtask

  initial begin
    check('1, '1, '1, '1);
    check('0, '0, '0, '0);
    check('1, '0, '1, '0);
    for (int n = 0; n < 3000; n++)
      check(W'($urandom), W'($urandom), W'($urandom), W'($urandom));
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

// tb_cla_adder: the lookahead adder at its default width against the plain
// sum mod 2^W, with long carry chains and random operands.
module tb_cla_adder;
  localparam int W = 35;
  logic [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  cla_adder #(.W(W)) dut (.a(a), .b(b), .s(s));

  task automatic check(logic [W-1:0] av, bv);
    a = av; b = bv;
    #1;
    checks++;
    if (s != W'(av + bv)) begin
      failures++;
      $display("FAIL %h + %h -> %h", av, bv, s);
    end
  endtask

  initial begin
    check('1, W'(1));
    check('1, '1);
    check({1'b0, {(W-1){1'b1}}}, W'(1));
    check('0, '0);
    for (int i = 0; i < W; i++) check(W'((longint'(1) << i) - 1), W'(longint'(1) << 0));
    for (int n = 0; n < 3000; n++)
      check(W'({$urandom, $urandom}), W'({$urandom, $urandom}));
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

// tb_cs_tree: the two words left by the compressor tree must add up to the
// sum of all input words mod 2^W; the inner-product size (33 words) and two
// odd sizes that exercise the 3:2 and pass-through paths.
module tb_cs_tree;
  localparam int W = 35;
  localparam int M1 = 33;
  localparam int M2 = 7;
  localparam int M3 = 6;

  logic [W-1:0] in1 [M1];
  logic [W-1:0] in2 [M2];
  logic [W-1:0] in3 [M3];
  logic [W-1:0] s1, c1, s2, c2, s3, c3;
  int checks = 0, failures = 0;

  cs_tree #(.M(M1), .W(W)) dut1 (.in(in1), .s(s1), .cy(c1));
  cs_tree #(.M(M2), .W(W)) dut2 (.in(in2), .s(s2), .cy(c2));
  cs_tree #(.M(M3), .W(W)) dut3 (.in(in3), .s(s3), .cy(c3));

  task automatic run(bit all_ones);
    logic [W-1:0] w1, w2, w3;
    w1 = '0; w2 = '0; w3 = '0;
    for (int i = 0; i < M1; i++) begin
      in1[i] = all_ones ? '1 : W'({$urandom, $urandom});
      w1 += in1[i];
    end
    for (int i = 0; i < M2; i++) begin
      in2[i] = all_ones ? '1 : W'({$urandom, $urandom});
      w2 += in2[i];
    end
    for (int i = 0; i < M3; i++) begin
      in3[i] = all_ones ? '1 : W'({$urandom, $urandom});
      w3 += in3[i];
    end
    #1;
    checks += 3;
    if (W'(s1 + c1) != w1) begin failures++; $display("FAIL M=%0d", M1); end
    if (W'(s2 + c2) != w2) begin failures++; $display("FAIL M=%0d", M2); end
    if (W'(s3 + c3) != w3) begin failures++; $display("FAIL M=%0d", M3); end
  endtask

  initial begin
    run(1'b1);
    for (int n = 0; n < 1000; n++) run(1'b0);
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

// tb_digit_mult: the K digit multipliers of one coefficient, shifted to their
// weights and summed with the Baugh-Wooley correction, must give the exact
// two's complement product U*V. Each digit's own carry-save pair is also
// checked against the positive-form digit product worked out bit by bit, and
// a top-digit cell with a constant injected into its array must return that
// product plus the constant.
module tb_digit_mult;
  import dct_ref_pkg::*;
  localparam int B  = 16;
  localparam int VW = 17;
  localparam int NB = 4;
  localparam int K  = B / NB;
  localparam int PW = VW + NB;

  logic [B-1:0]  u;
  logic [VW-1:0] v;
  logic [PW-1:0] s  [K];
  logic [PW-1:0] cy [K];
  int checks = 0, failures = 0;

  // A top-digit multiplier with a constant injected into its array.
  localparam logic [VW-1:0] INJ = 17'h1_2345;
  logic [PW-1:0] si, ci;
  digit_mult #(.B(B), .VW(VW), .NB(NB), .DIGIT(K-1), .INJ(INJ)) dut_inj (
    .u(u[(K-1)*NB +: NB]), .v(v), .s(si), .cy(ci));

  for (genvar r = 0; r < K; r++) begin : g_d
    digit_mult #(.B(B), .VW(VW), .NB(NB), .DIGIT(r)) dut (
      .u(u[r*NB +: NB]), .v(v), .s(s[r]), .cy(cy[r]));
  end

  // Positive-form value of digit r: bits of U times bits of V, with the
  // sign-crossing terms complemented.
  function automatic longint pos_digit(longint uu, longint vv, int r);
    longint acc = 0;
    for (int jj = 0; jj < NB; jj++)
      for (int k = 0; k < VW; k++) begin
        int  j  = r * NB + jj;
        bit  ub = uu[j];
        bit  vb = vv[k];
        bit  t  = ub & vb;
        if ((j == B - 1) != (k == VW - 1)) t = ~t;
        acc += longint'(t) << (jj + k);
      end
    return acc;
  endfunction

  task automatic check(longint uv, longint vv);
    longint total, want, corr, mask;
    u = B'(uv);
    v = VW'(vv);
    #1;
    mask  = (longint'(1) << (B + VW)) - 1;
    corr  = (longint'(1) << (B - 1)) + (longint'(1) << (VW - 1)) - (longint'(1) << (B + VW - 1));
    total = corr;
    for (int r = 0; r < K; r++) begin
      longint d = (longint'(s[r]) + longint'(cy[r])) & ((longint'(1) << PW) - 1);
      checks++;
      if (d != pos_digit(uv, vv, r)) begin
        failures++;
        $display("FAIL digit %0d u=%0d v=%0d got %0d want %0d", r, uv, vv, d, pos_digit(uv, vv, r));
      end
      total += d << (r * NB);
    end
    checks++;
    if (((longint'(si) + longint'(ci)) & ((longint'(1) << PW) - 1)) != pos_digit(uv, vv, K - 1) + longint'(INJ)) begin
      failures++;
      $display("FAIL injected u=%0d v=%0d", uv, vv);
    end
    want = uv * vv;
    checks++;
    if ((total & mask) != (want & mask)) begin
      failures++;
      $display("FAIL u=%0d v=%0d product %0d", uv, vv, want);
    end
  endtask

  initial begin
    check(-32768, -65536);
    check(32767, 65535);
    check(-32768, 65535);
    check(32767, -65536);
    check(-1, -1);
    check(0, 12345);
    for (int n = 0; n < 1500; n++) check(rnd(B), rnd(VW));
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

// cs_tree: carry-save accumulation of M words down to a sum and a carry word.
//
// The words are reduced level by level. On each level they are taken four at
// a time into a W-bit row of 4:2 compressors; three words left over go
// through one carry-save adder (a 3:2 row), one or two left over pass to the
// next level. This repeats until two words remain, which the final carry
// lookahead adder of the inner product adds. For the 32 partial sum and carry
// words of an 8-point inner product the counts per level are 32, 16, 8, 4, 2:
// four 4:2 compressors deep, as in the architecture.
//
// The words of an inner product are added here as whole W-bit words aligned
// to their significance, not cut into digit-wide slices with hand-placed
// carry bits; the arithmetic is the same, the bit-level floorplan is this
// design's own.
//
// Purely combinational; all arithmetic is mod 2^W.
module cs_tree #(
  parameter int M = 32,
  parameter int W = 35
) (
  input  logic [W-1:0] in [M],
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  // Number of words after one level that starts with m words.
  function automatic int next_count(int m);
    return (m / 4) * 2 + ((m % 4 == 3) ? 2 : (m % 4));
  endfunction

  function automatic int count_at(int lvl);
    int m = M;
    for (int l = 0; l < lvl; l++) m = next_count(m);
    return m;
  endfunction

  function automatic int num_levels();
    int m = M;
    int l = 0;
    while (m > 2) begin
      m = next_count(m);
      l++;
    end
    return l;
  endfunction

  localparam int L = num_levels();

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int MC = count_at(l);
    localparam int G4 = MC / 4;
    localparam int R  = MC % 4;
    localparam int MN = next_count(MC);

    logic [W-1:0] cur [MC];   // words entering this level
    logic [W-1:0] nxt [MN];   // words leaving it

    if (l == 0) begin : g_first
      for (genvar e = 0; e < MC; e++) begin : g_e
        assign cur[e] = in[e];
      end
    end else begin : g_next
      for (genvar e = 0; e < MC; e++) begin : g_e
        assign cur[e] = g_lvl[l-1].nxt[e];
      end
    end

    for (genvar g = 0; g < G4; g++) begin : g_c42
      compressor_4to2 #(.W(W)) u_c42 (
        .a (cur[4*g]),
        .b (cur[4*g+1]),
        .c (cur[4*g+2]),
        .d (cur[4*g+3]),
        .s (nxt[2*g]),
        .cy(nxt[2*g+1])
      );
    end

    if (R == 3) begin : g_csa
      assign nxt[2*G4]   = cur[4*G4] ^ cur[4*G4+1] ^ cur[4*G4+2];
      assign nxt[2*G4+1] = ((cur[4*G4] & cur[4*G4+1]) | (cur[4*G4] & cur[4*G4+2])
                           | (cur[4*G4+1] & cur[4*G4+2])) << 1;
    end else begin : g_pass
      for (genvar r = 0; r < R; r++) begin : g_r
        assign nxt[2*G4+r] = cur[4*G4+r];
      end
    end
  end

  if (L == 0 && M >= 2) begin : g_out_direct
    assign s  = in[0];
    assign cy = in[1];
  end else if (L == 0) begin : g_out_single
    assign s  = in[0];
    assign cy = '0;
  end else begin : g_out_tree
    assign s  = g_lvl[L-1].nxt[0];
    assign cy = g_lvl[L-1].nxt[1];
  end

endmodule

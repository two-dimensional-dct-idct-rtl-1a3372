// transpose_buffer: transposition between the row and the column 1D DCT,
// built from two arrays of skewed shift registers and N N:1 multiplexers
// (N^2 + N word registers in all, no RAM).
//
// The row unit delivers, every cycle, one column j of the intermediate
// matrix: z_in[p] = Z(p, j), p = 0 .. N-1. Output p goes into the first-array
// shift register R1[p+1], which is p+1 words long, so the column leaves the
// first array skewed: in a given cycle, R1[m] shows row m-1 of a different
// column. The second array R2[1..N] (lengths 1 .. N) collects the transpose.
// Shift register R2[N-d] keeps only column d: its multiplexer picks, in each
// cycle, the one R1 output that currently shows an element of column d. The
// multiplexer of R2[N] is steered by the block position of the column that
// just entered (pos_in), one cycle late; every further multiplexer R2[N-d]
// gets the same select through d more delay registers. Because R2[N-d] is
// d words shorter, all N elements of row p of Z leave the second array in
// the same cycle:
//   z_out[j] = Z(p, j), j = 0 .. N-1,
// exactly N+1 cycles after column p was at z_in. Rows follow one per cycle,
// and a new N x N block may follow the previous one without a gap.
//
// The two skewed arrays, the multiplexers and the delay-chained select follow
// the architecture; taking the select from the block position (rather than a
// free-running counter), so that blocks may be separated by idle cycles, is
// this design's choice.
//
// Interface: z_in and pos_in are sampled on every rising clock edge; pos_in
// must count 0 .. N-1 along the N columns of a block. Blocks may be separated
// by idle cycles; what the buffer shows then is meaningless. The registers are
// reset to zero.
module transpose_buffer #(
  parameter int N = 8,
  parameter int B = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [B-1:0]  z_in  [N],
  input  logic [$clog2(N)-1:0] pos_in,
  output logic signed [B-1:0]  z_out [N]
);

  localparam int SW = $clog2(N);

  // Multiplexer select chain: sel_q[d] steers the multiplexer of R2[N-d].
  logic [SW-1:0] sel_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < N; d++) sel_q[d] <= '0;
    end else begin
      sel_q[0] <= pos_in;
      for (int d = 1; d < N; d++) sel_q[d] <= sel_q[d-1];
    end
  end

  // First array: R1[m] (index m-1 here) is m words long.
  logic signed [B-1:0] r1_out [N];

  for (genvar m = 0; m < N; m++) begin : g_r1
    logic signed [B-1:0] sr [m+1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k <= m; k++) sr[k] <= '0;
      end else begin
        sr[0] <= z_in[m];
        for (int k = 1; k <= m; k++) sr[k] <= sr[k-1];
      end
    end
    assign r1_out[m] = sr[m];
  end

  // Multiplexers and second array: R2[N-d] is N-d words long.
  for (genvar d = 0; d < N; d++) begin : g_r2
    localparam int LEN = N - d;
    logic signed [B-1:0] mux_out;
    logic signed [B-1:0] sr [LEN];
    assign mux_out = r1_out[sel_q[d]];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < LEN; k++) sr[k] <= '0;
      end else begin
        sr[0] <= mux_out;
        for (int k = 1; k < LEN; k++) sr[k] <= sr[k-1];
      end
    end
    assign z_out[d] = sr[LEN-1];
  end

endmodule

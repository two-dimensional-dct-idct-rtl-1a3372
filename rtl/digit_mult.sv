// digit_mult: array multiplier of one radix-2^NB coefficient digit by a data
// word, without the final adder.
//
// The B-bit coefficient U is split into K = B/NB digits of NB bits; this cell
// multiplies digit number DIGIT (bits DIGIT*NB .. DIGIT*NB+NB-1 of U) by the
// whole VW-bit data word V. Signs are handled the Baugh-Wooley way: every
// partial-product bit that pairs a sign bit with a non-sign bit is formed by a
// NAND instead of an AND, the bit pairing the two sign bits by an AND, so all
// partial products are positive. The fixed correction
//   2^(B-1) + 2^(VW-1) - 2^(B+VW-1)
// that this leaves is not added here: the inner-product unit adds it once for
// all its products. Only the top digit holds the sign bit of U.
//
// INJ is a constant injected into the array: the first carry-save row adds
// the first two partial-product rows with an otherwise empty third input
// (half adders), and INJ fills that input (making full adders where its bits
// are one). The inner-product unit uses this to fold the sign correction into
// the multipliers, as the architecture does with ones fed into empty adder
// positions. INJ must stay below 2^VW so that s + cy cannot overflow.
//
// The NB partial-product rows are reduced by a linear carry-save array (one
// row of full adders per extra row, half adders where a position is empty)
// and the result stays in carry-save form: s + cy equals the digit product
// u_DIGIT * V in the positive form, plus INJ, relative to weight
// 2^(DIGIT*NB).
//
// Purely combinational.
module digit_mult #(
  parameter int B     = 16,   // coefficient wordlength
  parameter int VW    = 17,   // data wordlength (pre-added sample)
  parameter int NB    = 4,    // digit size n = B/4
  parameter int DIGIT = 0,    // which digit of the coefficient this cell takes
  parameter logic [VW-1:0] INJ = '0  // constant added into the array
) (
  input  logic [NB-1:0]    u,   // the coefficient digit
  input  logic [VW-1:0]    v,   // the data word, two's complement
  output logic [VW+NB-1:0] s,   // partial sum word
  output logic [VW+NB-1:0] cy   // partial carry word
);

  localparam int PW = VW + NB;

  logic [VW-1:0] pp [NB];   // partial-product rows
  logic [PW-1:0] row;
  logic [PW-1:0] acc_s;
  logic [PW-1:0] acc_c;
  logic [PW-1:0] nxt_s;
  logic [PW-1:0] nxt_c;

  always_comb begin
    for (int jj = 0; jj < NB; jj++) begin
      for (int k = 0; k < VW; k++) begin
        if (DIGIT * NB + jj == B - 1)
          // Sign bit of U: NAND with the non-sign bits of V, AND with its sign.
          pp[jj][k] = (k == VW - 1) ? (u[jj] & v[k]) : ~(u[jj] & v[k]);
        else
          // Non-sign bit of U: NAND only with the sign bit of V.
          pp[jj][k] = (k == VW - 1) ? ~(u[jj] & v[k]) : (u[jj] & v[k]);
      end
    end
    acc_s = PW'(pp[0]);
    acc_c = PW'(INJ);
    for (int jj = 1; jj < NB; jj++) begin
      row   = PW'(pp[jj]) << jj;
      nxt_s = acc_s ^ acc_c ^ row;
      nxt_c = ((acc_s & acc_c) | (acc_s & row) | (acc_c & row)) << 1;
      acc_s = nxt_s;
      acc_c = nxt_c;
    end
    s  = acc_s;
    cy = acc_c;
  end

endmodule

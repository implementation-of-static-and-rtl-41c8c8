// ncl_mul_array -- unsigned 8x8-bit quad-rail NCL multiplier (4 x 4 radix-4 digits).
//
// x and y are 4 quad-rail digits each (digit 0 least significant). Sixteen q33mul cells
// form every digit product x[i]*y[j] = 4*pph[i][j] + ppl[i][j]; ppl has weight 4^(i+j),
// pph weight 4^(i+j+1). The partial products are summed by an array of digit adders:
//   row 1 (digits 1-4): Q332, Q3322, Q3322, Q322
//   row 2 (digits 2-5): Q332, Q3322, Q3322, Q322D
//   row 3 (digits 3-6): Q332, Q3322, Q3322, Q3222
//   row 4 (digits 4-7): Q32, Q32D, Q32D, Q22D  (ripple-carry row)
// In rows 1-3 each adder takes the sum of the adder above it, the carry of the adder
// above and one digit to the right (carry-save), and the partial products of its digit
// not yet used; carries run diagonally, never along a row. Row 4 resolves the last
// sum/carry pairs with a dual-rail ripple carry. Product digit 0 is ppl[0][0]; digits 1, 2
// and 3 are the sums of the rightmost adder of rows 1, 2 and 3.
// The row/column layout and the adder types follow the published block diagram; the
// assignment of each partial product to an adder input is this design's own, chosen so
// that every carry fits its encoding. The leftmost adder of row 3 is a Q3222 (quad + three
// 3-rail inputs) because the carry it receives from row 2 is a 3-rail MEAG.
// Output p: 8 quad-rail digits, the 16-bit product; the final carry out of row 4 is
// always zero and is left unconnected.
// Timing: zero-delay, NCL combinational logic; p becomes DATA only after x and y are
// complete DATA and NULL only after both are NULL.
module ncl_mul_array
  import ncl_pkg::*;
(
  input  qr_t [3:0] x,
  input  qr_t [3:0] y,
  output qr_t [7:0] p
);
  qr_t ppl [4][4];
  m3_t pph [4][4];

  for (genvar i = 0; i < 4; i++) begin : g_x
    for (genvar j = 0; j < 4; j++) begin : g_y
      q33mul u_mul (.a(x[i]), .b(y[j]), .ppl(ppl[i][j]), .pph(pph[i][j]));
    end
  end

  assign p[0] = ppl[0][0];

  // Row 1
  qr_t s1_2, s1_3, s1_4;
  m3_t c1_1, c1_2, c1_3;
  dr_t c1_4;
  q332add  u_r1d1 (.q0(ppl[0][1]), .q1(ppl[1][0]), .m0(pph[0][0]), .s(p[1]), .co(c1_1));
  q3322add u_r1d2 (.q0(ppl[0][2]), .q1(ppl[1][1]), .m0(pph[0][1]), .m1(pph[1][0]),
                   .s(s1_2), .co(c1_2));
  q3322add u_r1d3 (.q0(ppl[0][3]), .q1(ppl[1][2]), .m0(pph[0][2]), .m1(pph[1][1]),
                   .s(s1_3), .co(c1_3));
  q322add  u_r1d4 (.q0(ppl[1][3]), .m0(pph[0][3]), .m1(pph[1][2]), .s(s1_4), .co(c1_4));

  // Row 2
  qr_t s2_3, s2_4, s2_5;
  m3_t c2_2, c2_3, c2_4, c2_5;
  q332add  u_r2d2 (.q0(s1_2), .q1(ppl[2][0]), .m0(c1_1), .s(p[2]), .co(c2_2));
  q3322add u_r2d3 (.q0(s1_3), .q1(ppl[2][1]), .m0(c1_2), .m1(pph[2][0]),
                   .s(s2_3), .co(c2_3));
  q3322add u_r2d4 (.q0(s1_4), .q1(ppl[2][2]), .m0(c1_3), .m1(pph[2][1]),
                   .s(s2_4), .co(c2_4));
  q322dadd u_r2d5 (.q0(ppl[2][3]), .m0(pph[1][3]), .m1(pph[2][2]), .ci(c1_4),
                   .s(s2_5), .co(c2_5));

  // Row 3
  qr_t s3_4, s3_5, s3_6;
  m3_t c3_3, c3_4, c3_5, c3_6;
  q332add  u_r3d3 (.q0(s2_3), .q1(ppl[3][0]), .m0(c2_2), .s(p[3]), .co(c3_3));
  q3322add u_r3d4 (.q0(s2_4), .q1(ppl[3][1]), .m0(c2_3), .m1(pph[3][0]),
                   .s(s3_4), .co(c3_4));
  q3322add u_r3d5 (.q0(s2_5), .q1(ppl[3][2]), .m0(c2_4), .m1(pph[3][1]),
                   .s(s3_5), .co(c3_5));
  q3222add u_r3d6 (.q0(ppl[3][3]), .m0(pph[2][3]), .m1(pph[3][2]), .m2(c2_5),
                   .s(s3_6), .co(c3_6));

  // Row 4: ripple-carry
  dr_t k4, k5, k6, k7;
  q32add  u_r4d4 (.q0(s3_4), .m0(c3_3), .s(p[4]), .co(k4));
  q32dadd u_r4d5 (.q0(s3_5), .m0(c3_4), .ci(k4), .s(p[5]), .co(k5));
  q32dadd u_r4d6 (.q0(s3_6), .m0(c3_5), .ci(k5), .s(p[6]), .co(k6));
  q22dadd u_r4d7 (.m0(pph[3][3]), .m1(c3_6), .ci(k6), .s(p[7]), .co(k7));
endmodule

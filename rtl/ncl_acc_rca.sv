// ncl_acc_rca -- 12-digit (24-bit) quad-rail NCL ripple-carry adder that adds the 8-digit
// product to the 12-digit accumulated value.
//
// Digit 0 is a Q33 adder (accumulator digit + product digit, no carry in); digits 1-7 are
// Q33D adders (two quad-rail digits and the dual-rail carry from the right); digits 8-11
// have no product digit and are Q3D adders (accumulator digit + carry). The dual-rail
// carry out of digit 11, cout, is DATA1 exactly when acc + p does not fit in 24 bits: it
// is the overflow flag. This arrangement is the published one.
// Timing: zero-delay NCL logic; s and cout are DATA only once acc and p are all DATA
// and NULL only once they are all NULL.
module ncl_acc_rca
  import ncl_pkg::*;
(
  input  qr_t [11:0] acc,
  input  qr_t [7:0]  p,
  output qr_t [11:0] s,
  output dr_t        cout
);
  dr_t c [12];

  q33add u_d0 (.q0(acc[0]), .q1(p[0]), .s(s[0]), .co(c[0]));
  for (genvar d = 1; d < 8; d++) begin : g_pd
    q33dadd u_add (.q0(acc[d]), .q1(p[d]), .ci(c[d-1]), .s(s[d]), .co(c[d]));
  end
  for (genvar d = 8; d < 12; d++) begin : g_hi
    q3dadd u_add (.q0(acc[d]), .ci(c[d-1]), .s(s[d]), .co(c[d]));
  end
  assign cout = c[11];
endmodule

// q332add -- quad-rail NCL digit adder: adds two quad-rail digits and a 3-rail MEAG.
//
// Result: s = quad-rail sum digit (total mod 4), co = 3-rail MEAG carry (total div 4). The
// largest total is 8, so the carry is at most 2 and needs a 3-rail MEAG.
// Operand naming: q* quad-rail digits (0..3), m* 3-rail MEAGs (0..2), ci dual-rail (0..1).
// The adder is input-complete: s and co become DATA only once every operand is DATA and
// return to NULL only once every operand is NULL. The operand types, the function and the
// carry encoding are the published ones; the gate netlist is this design's own: 48
// TH33 minterm gates and TH1n (OR) output rails (see ncl_digit_fn), instead of an
// area-optimised threshold-gate reduction.
// Timing: zero delay, combinational with hysteresis (no clock).
module q332add
  import ncl_pkg::*;
(
  input  qr_t  q0,
  input  qr_t  q1,
  input  m3_t  m0,
  output qr_t  s,
  output m3_t  co
);
  ncl_digit_fn #(.NQ(2), .N3(1), .ND(0), .CR(3)) u_fn (
    .in_rails ({{1'b0, m0}, q1, q0}),
    .sum      (s),
    .carry    (co)
  );
endmodule

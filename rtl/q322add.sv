// q322add -- quad-rail NCL digit adder: adds a quad-rail digit and two 3-rail MEAGs.
//
// Result: s = quad-rail sum digit (total mod 4), co = dual-rail carry (total div 4). The
// largest total is 7, so the carry is at most 1 and fits a dual-rail signal.
// Operand naming: q* quad-rail digits (0..3), m* 3-rail MEAGs (0..2), ci dual-rail (0..1).
// The adder is input-complete: s and co become DATA only once every operand is DATA and
// return to NULL only once every operand is NULL. The operand types, the function and the
// carry encoding are the published ones; the gate netlist is this design's own: 36
// TH33 minterm gates and TH1n (OR) output rails (see ncl_digit_fn), instead of an
// area-optimised threshold-gate reduction.
// Timing: zero delay, combinational with hysteresis (no clock).
module q322add
  import ncl_pkg::*;
(
  input  qr_t  q0,
  input  m3_t  m0,
  input  m3_t  m1,
  output qr_t  s,
  output dr_t  co
);
  ncl_digit_fn #(.NQ(1), .N3(2), .ND(0), .CR(2)) u_fn (
    .in_rails ({{1'b0, m1}, {1'b0, m0}, q0}),
    .sum      (s),
    .carry    (co)
  );
endmodule

// q22dadd -- quad-rail NCL digit adder: adds two 3-rail MEAGs and a dual-rail signal.
//
// Result: s = quad-rail sum digit (total mod 4), co = dual-rail carry (total div 4). The
// largest total is 5, so the carry is at most 1 and fits a dual-rail signal.
// Operand naming: q* quad-rail digits (0..3), m* 3-rail MEAGs (0..2), ci dual-rail (0..1).
// The adder is input-complete: s and co become DATA only once every operand is DATA and
// return to NULL only once every operand is NULL. The operand types, the function and the
// carry encoding are the published ones; the gate netlist is this design's own: 18
// TH33 minterm gates and TH1n (OR) output rails (see ncl_digit_fn), instead of an
// area-optimised threshold-gate reduction.
// Timing: zero delay, combinational with hysteresis (no clock).
module q22dadd
  import ncl_pkg::*;
(
  input  m3_t  m0,
  input  m3_t  m1,
  input  dr_t  ci,
  output qr_t  s,
  output dr_t  co
);
  ncl_digit_fn #(.NQ(0), .N3(2), .ND(1), .CR(2)) u_fn (
    .in_rails ({{2'b00, ci}, {1'b0, m1}, {1'b0, m0}}),
    .sum      (s),
    .carry    (co)
  );
endmodule

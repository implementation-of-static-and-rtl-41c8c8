// q3dadd -- quad-rail NCL digit adder: adds a quad-rail digit and a dual-rail signal.
//
// Result: s = quad-rail sum digit (total mod 4), co = dual-rail carry (total div 4). The
// largest total is 4, so the carry is at most 1 and fits a dual-rail signal.
// Operand naming: q* quad-rail digits (0..3), m* 3-rail MEAGs (0..2), ci dual-rail (0..1).
// The adder is input-complete: s and co become DATA only once every operand is DATA and
// return to NULL only once every operand is NULL. The operand types, the function and the
// carry encoding are the published ones; the gate netlist is this design's own: 8
// TH22 minterm gates and TH1n (OR) output rails (see ncl_digit_fn), instead of an
// area-optimised threshold-gate reduction.
// Timing: zero delay, combinational with hysteresis (no clock).
module q3dadd
  import ncl_pkg::*;
(
  input  qr_t  q0,
  input  dr_t  ci,
  output qr_t  s,
  output dr_t  co
);
  ncl_digit_fn #(.NQ(1), .N3(0), .ND(1), .CR(2)) u_fn (
    .in_rails ({{2'b00, ci}, q0}),
    .sum      (s),
    .carry    (co)
  );
endmodule

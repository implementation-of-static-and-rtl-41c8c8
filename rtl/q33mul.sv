// q33mul -- quad-rail NCL digit multiplier (partial-product generator).
//
// Multiplies two quad-rail digits a, b (0..3). The product is at most 3*3 = 9 = 21 in
// base 4, so it is returned as a quad-rail low digit ppl (product mod 4, 0..3) and a
// 3-rail MEAG high digit pph (product div 4, only 0..2), saving a wire per high digit.
// The interface and function are the published ones; the inside is this design's own:
// sixteen TH22 minterm gates, one per (a, b) pair, and TH1n (OR) output rails
// (see ncl_digit_fn). Input-complete: outputs are DATA only after both inputs are DATA
// and NULL only after both are NULL.
// Timing: zero delay, combinational with hysteresis (no clock).
module q33mul
  import ncl_pkg::*;
(
  input  qr_t a,
  input  qr_t b,
  output qr_t ppl,
  output m3_t pph
);
  ncl_digit_fn #(.NQ(2), .N3(0), .ND(0), .CR(3), .MUL(1'b1)) u_fn (
    .in_rails ({b, a}),
    .sum      (ppl),
    .carry    (pph)
  );
endmodule

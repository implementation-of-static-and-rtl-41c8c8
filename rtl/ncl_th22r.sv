// ncl_th22r -- resettable TH22 gate (2-input C-element), the storage element of an NCL
// register. The output rises when both inputs are high, falls when both are low and
// otherwise holds. While rst is high the output is forced to RST_VAL: 0 gives the
// "TH22n" gate (reset to logic 0), 1 the "TH22d" gate (reset to logic 1).
// Interface: a = data rail, b = request from the next stage (Ki), rst active high.
// Timing: zero delay, level sensitive.
// In the complete MAC these gates sit inside handshake and accumulator loops, which lint
// reports as circular logic; the loops are the asynchronous protocol itself and settle
// because every gate only changes once per wavefront. Lint may also fail to recognise
// this always_latch as a latch; it is one (the output holds when a != b).
module ncl_th22r #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic z
);
  always_latch begin
    if (rst)          z = RST_VAL;
    else if (a & b)   z = 1'b1;
    else if (!(a | b)) z = 1'b0;
  end
endmodule

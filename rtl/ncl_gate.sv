// ncl_gate -- one of the 27 fundamental NCL threshold gates, selected by GATE.
//
// Each gate has a "set" function (the Boolean function listed for it in the standard NCL
// gate table, e.g. TH23: AB+AC+BC; TH34w2: AB+AC+AD+BCD) and hysteresis: once asserted the
// output stays high until every input has returned low. So
//     Z = set + Z_prev * (A+B+C+D)
// which is a latch: it is written as one here. THxor0, THand0 and TH24comp use the same
// hysteresis with their own set functions. TH1n gates reduce to OR gates.
// Interface: in[0..3] = A..D; inputs a gate does not have must be tied low, since the hold
// term ORs all four. No reset: a gate whose inputs are all NULL clears itself.
// Timing: zero delay; the transistor-level sizing of the static and semi-static versions
// has no logic-level counterpart and is not modelled.
// Lint may fail to recognise the always_latch below as a latch; it is one (the output
// holds while set is false and some input is still high).
module ncl_gate
  import ncl_pkg::*;
#(
  parameter gate_e GATE = TH23
) (
  input  logic [3:0] in,
  output logic       z
);
  logic a, b, c, d;
  logic set_f, hold_f;

  assign {d, c, b, a} = in;
  assign hold_f = |in;

  always_comb begin
    unique case (GATE)
      TH12:     set_f = a | b;
      TH22:     set_f = a & b;
      TH13:     set_f = a | b | c;
      TH23:     set_f = (a & b) | (a & c) | (b & c);
      TH33:     set_f = a & b & c;
      TH23W2:   set_f = a | (b & c);
      TH33W2:   set_f = (a & b) | (a & c);
      TH14:     set_f = a | b | c | d;
      TH24:     set_f = (a & b) | (a & c) | (a & d) | (b & c) | (b & d) | (c & d);
      TH34:     set_f = (a & b & c) | (a & b & d) | (a & c & d) | (b & c & d);
      TH44:     set_f = a & b & c & d;
      TH24W2:   set_f = a | (b & c) | (b & d) | (c & d);
      TH34W2:   set_f = (a & b) | (a & c) | (a & d) | (b & c & d);
      TH44W2:   set_f = (a & b & c) | (a & b & d) | (a & c & d);
      TH34W3:   set_f = a | (b & c & d);
      TH44W3:   set_f = (a & b) | (a & c) | (a & d);
      TH24W22:  set_f = a | b | (c & d);
      TH34W22:  set_f = (a & b) | (a & c) | (a & d) | (b & c) | (b & d);
      TH44W22:  set_f = (a & b) | (a & c & d) | (b & c & d);
      TH54W22:  set_f = (a & b & c) | (a & b & d);
      TH34W32:  set_f = a | (b & c) | (b & d);
      TH54W32:  set_f = (a & b) | (a & c & d);
      TH44W322: set_f = (a & b) | (a & c) | (a & d) | (b & c);
      TH54W322: set_f = (a & b) | (a & c) | (b & c & d);
      THXOR0:   set_f = (a & b) | (c & d);
      THAND0:   set_f = (a & b) | (b & c) | (a & d);
      TH24COMP: set_f = (a & c) | (b & c) | (a & d) | (b & d);
      default:  set_f = 1'b0;
    endcase
  end

  // Hysteresis: set when the set function holds, clear only when all inputs are low.
  always_latch begin
    if (set_f)        z = 1'b1;
    else if (!hold_f) z = 1'b0;
  end
endmodule

// ncl_pkg -- shared types and helpers for the quad-rail NULL Convention Logic (NCL)
// multiply-accumulate unit.
//
// Encodings (all one-hot, "all rails low" is NULL, the spacer between data words):
//   qr_t : quad-rail signal, 4 rails. Rail k high = DATAk = the 2-bit value k.
//   m3_t : 3-rail mutually exclusive assertion group (MEAG), values 0..2.
//   dr_t : dual-rail signal, values 0..1.
// Any two rails high at once is an illegal code word.
// gate_e names the 27 fundamental NCL threshold gates (TH<m><n>[w<weights>] and the
// three non-threshold ones THxor0, THand0, TH24comp). Inputs are called A,B,C,D in order.
package ncl_pkg;

  typedef logic [3:0] qr_t;
  typedef logic [2:0] m3_t;
  typedef logic [1:0] dr_t;


  typedef enum int {
    TH12, TH22, TH13, TH23, TH33, TH23W2, TH33W2,
    TH14, TH24, TH34, TH44, TH24W2, TH34W2, TH44W2, TH34W3, TH44W3,
    TH24W22, TH34W22, TH44W22, TH54W22, TH34W32, TH54W32,
    TH44W322, TH54W322, THXOR0, THAND0, TH24COMP
  } gate_e;

  // Number of inputs of a gate (2, 3 or 4).
  function automatic int gate_inputs(gate_e g);
    case (g)
      TH12, TH22:                                return 2;
      TH13, TH23, TH33, TH23W2, TH33W2:          return 3;
      default:                                   return 4;
    endcase
  endfunction

  // C-element (THnn) for n inputs.
  function automatic gate_e thnn(int n);
    case (n)
      2:       return TH22;
      3:       return TH33;
      default: return TH44;
    endcase
  endfunction

  // Encode a value as a one-hot code word of the given rail count.
  function automatic qr_t qr_enc(int unsigned v);
    return qr_t'(4'b0001 << v);
  endfunction

  // Decode a one-hot code word; returns the index of the asserted rail (0 if NULL).
  function automatic int unsigned rails_dec(logic [3:0] r);
    int unsigned v;
    v = 0;
    for (int unsigned k = 0; k < 4; k++) if (r[k]) v = k;
    return v;
  endfunction

endpackage

// ncl_digit_fn -- generic input-complete NCL function of up to four one-hot operands,
// the common core of the partial-product generator and of every digit adder.
//
// Operands: NQ quad-rail digits (0..3), then N3 3-rail MEAGs (0..2), then ND dual-rail
// signals (0..1), packed as in_rails[4k +: 4] for operand k (unused rails tied low).
// MUL = 0: the result value is the sum of all operands. MUL = 1 (needs NQ = 2 and nothing
// else): the value is their product.
// Result: sum = value mod 4 as a quad-rail digit, carry = value div 4 as a CR-rail one-hot
// group (CR = 2 dual-rail, CR = 3 3-rail MEAG).
// Structure: one THnn gate (C-element, n = number of operands) per combination of operand
// values ("minterm"), then each output rail is the OR (a TH1n gate, no hysteresis needed)
// of the minterms that produce it. A minterm fires only when every operand is DATA and
// stays high until every rail feeding it is low, so the outputs are DATA only after all
// inputs are DATA and NULL only after all inputs are NULL (input completeness).
// Timing: zero delay; one gate level plus the OR.
module ncl_digit_fn
  import ncl_pkg::*;
#(
  parameter int unsigned NQ  = 2,
  parameter int unsigned N3  = 0,
  parameter int unsigned ND  = 0,
  parameter int unsigned CR  = 2,
  parameter bit          MUL = 1'b0
) (
  input  logic [4*(NQ+N3+ND)-1:0] in_rails,
  output qr_t                     sum,
  output logic [CR-1:0]           carry
);
  localparam int unsigned K = NQ + N3 + ND;

  function automatic int unsigned radix(int k);
    return (k < int'(NQ)) ? 4 : (k < int'(NQ + N3)) ? 3 : 2;
  endfunction

  function automatic int unsigned n_comb();
    int unsigned n;
    n = 1;
    for (int unsigned k = 0; k < K; k++) n = n * radix(k);
    return n;
  endfunction

  localparam int unsigned NC = n_comb();

  // Value of operand k in combination c (mixed radix, operand 0 least significant).
  function automatic int unsigned digit(int unsigned c, int unsigned k);
    int unsigned v;
    v = c;
    for (int unsigned j = 0; j < k; j++) v = v / radix(j);
    return v % radix(k);
  endfunction

  function automatic int unsigned value(int unsigned c);
    int unsigned v;
    v = MUL ? 1 : 0;
    for (int unsigned k = 0; k < K; k++)
      v = MUL ? v * digit(c, k) : v + digit(c, k);
    return v;
  endfunction

  logic [NC-1:0] mt;

  for (genvar c = 0; c < NC; c++) begin : g_mt
    logic [3:0] gin;
    for (genvar k = 0; k < 4; k++) begin : g_in
      if (k < K) begin : g_used
        assign gin[k] = in_rails[4 * k + digit(c, k)];
      end else begin : g_tie
        assign gin[k] = 1'b0;
      end
    end
    ncl_gate #(.GATE(thnn(K))) u_mt (
      .in (gin),
      .z  (mt[c])
    );
  end

  // Minterms that give output value v at the sum (HIGH = 0) or carry (HIGH = 1) output.
  function automatic logic [NC-1:0] rail_mask(bit high, int unsigned v);
    logic [NC-1:0] msk = '0;
    for (int unsigned c = 0; c < NC; c++)
      msk[c] = high ? (value(c) / 4 == v) : (value(c) % 4 == v);
    return msk;
  endfunction

  // TH1n output rails.
  for (genvar r = 0; r < 4; r++) begin : g_sum
    localparam logic [NC-1:0] MSK = rail_mask(1'b0, r);
    assign sum[r] = |(mt & MSK);
  end
  for (genvar r = 0; r < CR; r++) begin : g_carry
    localparam logic [NC-1:0] MSK = rail_mask(1'b1, r);
    assign carry[r] = |(mt & MSK);
  end
endmodule

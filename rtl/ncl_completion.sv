// ncl_completion -- completion detector: a tree of C-elements over N acknowledge lines.
//
// The output goes high (rfd) only when all N inputs have gone high and low (rfn) only when
// all have gone low; in between it holds. Level 0 groups the inputs by four into
// resettable TH44 gates (TH33 or TH22 for a smaller last group, a plain wire for a single
// leftover line); each further level does the same with the outputs of the level below,
// so the tree has ceil(log4 N) gate levels. Because NCL acknowledges move monotonically
// within a phase (all rise, then all fall), the tree behaves as one N-input C-element.
// RST_VAL is the value every gate takes while rst is high; it must agree with the reset
// state of the registers whose ko lines feed the tree. Resettable gates here are this
// design's choice; the TH44 tree and its depth follow the published scheme.
// Timing: zero delay, level sensitive. In the complete MAC the tree sits inside handshake
// loops, which lint reports as circular logic; those loops are the asynchronous protocol.
module ncl_completion #(
  parameter int unsigned N       = 12,
  parameter bit          RST_VAL = 1'b1
) (
  input  logic         rst,
  input  logic [N-1:0] ko,
  output logic         ki
);
  // Width of tree level l (level 0 = the inputs).
  function automatic int unsigned lvl_width(int unsigned l);
    int unsigned w = N;
    for (int unsigned i = 0; i < l; i++) w = (w + 3) / 4;
    return w;
  endfunction

  function automatic int unsigned n_levels();
    int unsigned l = 0;
    while (lvl_width(l) > 1) l++;
    return (l == 0) ? 1 : l;
  endfunction

  localparam int unsigned L = n_levels();

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned WI = lvl_width(l);
    localparam int unsigned WO = (WI + 3) / 4;
    logic [WI-1:0] in_l;
    logic [WO-1:0] out_l;
    if (l == 0) begin : g_first
      assign in_l = ko;
    end else begin : g_chain
      assign in_l = g_lvl[l-1].out_l;
    end
    for (genvar g = 0; g < WO; g++) begin : g_grp
      localparam int unsigned LO = 4 * g;
      localparam int unsigned W  = (WI - LO >= 4) ? 4 : (WI - LO);
      if (W == 1) begin : g_wire
        assign out_l[g] = in_l[LO];
      end else begin : g_th
        always_latch begin
          if (rst)                 out_l[g] = RST_VAL;
          else if (&in_l[LO +: W])  out_l[g] = 1'b1;
          else if (~|in_l[LO +: W]) out_l[g] = 1'b0;
        end
      end
    end
  end

  assign ki = g_lvl[L-1].out_l[0];
endmodule

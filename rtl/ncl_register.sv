// ncl_register -- an N-signal NCL register stage of single-signal registers, each RAILS
// rails wide (4 for quad-rail, 2 for dual-rail).
//
// Every rail passes through a resettable TH22 gate whose second input is the request ki
// from the following stage's completion logic: DATA is passed only while ki is
// "request for data" (rfd, 1) and NULL only while ki is "request for null" (rfn, 0), so two
// DATA wavefronts always stay separated by a NULL one. Each signal also produces its own
// acknowledge ko[i] = NOR of its output rails: rfn (0) while it holds DATA, rfd (1) while
// it holds NULL. These ko lines go to a completion tree (ncl_completion).
// Reset: with RESET_DATA = 0 all rails reset low (NULL, TH22n gates); with RESET_DATA = 1
// every signal resets to DATA0 (rail 0 uses a TH22d gate). The accumulator loop needs one
// register reset to DATA0 so that the first sum adds to zero.
// Timing: zero delay, fully asynchronous (no clock).
module ncl_register #(
  parameter int unsigned N          = 12,
  parameter int unsigned RAILS      = 4,
  parameter bit          RESET_DATA = 1'b0
) (
  input  logic                        rst,
  input  logic                        ki,
  input  logic [N-1:0][RAILS-1:0]     d,
  output logic [N-1:0][RAILS-1:0]     q,
  output logic [N-1:0]                ko
);
  for (genvar i = 0; i < N; i++) begin : g_sig
    for (genvar r = 0; r < RAILS; r++) begin : g_rail
      ncl_th22r #(.RST_VAL(RESET_DATA && (r == 0))) u_th22 (
        .rst (rst),
        .a   (d[i][r]),
        .b   (ki),
        .z   (q[i][r])
      );
    end
    assign ko[i] = ~|q[i];
  end
endmodule

// ncl_mac -- non-pipelined, unsigned 24+8x8 quad-rail NULL Convention Logic
// multiply-accumulate unit: every operation computes ACC := (ACC + X*Y) mod 2^24 and
// raises OV for that one result when the sum does not fit in 24 bits.
//
// Data are quad-rail (one-hot, 4 rails per 2 bits; all rails low = NULL). X and Y are 4
// quad-rail digits (8 bits), the result is 12 quad-rail digits (24 bits), OV is dual-rail.
// There is no clock: every register stage exchanges a four-phase request/acknowledge
// handshake with its neighbours, and DATA and NULL wavefronts alternate.
//   x_in, y_in   -> X and Y input registers -> 16 Q33mul + carry-save adder array
//                -> 12-digit ripple-carry adder (+ accumulator register value)
//                -> output register (and the dual-rail OV register) -> result
//   result -> feedback register -> accumulator register -> back into the adder.
// The accumulator loop holds three registers so that one DATA and one NULL wavefront can
// circulate with a free stage between them. The feedback register resets to DATA0 (the
// initial accumulated value 0); all other registers reset to NULL.
// Completion trees (C-element trees over the registers' ko lines) make the requests:
//   ko      (to the producer) = completion of the X and Y register acknowledges;
//   input and accumulator registers' request = completion of output + OV registers;
//   feedback register's request = completion of the accumulator register;
//   output and OV registers' request = completion of {feedback register, ki}.
// Handshake: the producer may present DATA on x_in/y_in while ko = 1 and must return them
// to NULL after ko falls; the consumer sees a complete DATA result on result/ov, answers
// with ki = 0, and returns ki to 1 once result is NULL again.
// The block structure, widths and overflow behaviour follow the published design; the
// requests of the accumulator and feedback registers and the reset states are this
// design's reading of the block diagram.
// Lint reports circular combinational logic here: the request/acknowledge loops between
// stages and the accumulator ring are closed through the registers' latches by design.
module ncl_mac
  import ncl_pkg::*;
(
  input  logic       rst,
  input  qr_t [3:0]  x_in,
  input  qr_t [3:0]  y_in,
  output logic       ko,
  input  logic       ki,
  output qr_t [11:0] result,
  output dr_t        ov
);
  qr_t [3:0]  x_q, y_q;
  logic [3:0] x_ko, y_ko;
  qr_t [11:0] acc_q, fb_q, sum;
  logic [11:0] acc_ko, out_ko, fb_ko;
  qr_t [7:0]  prod;
  dr_t        cout;
  logic       ov_ko;
  logic       k_in, k_fb, k_out;

  // Input registers and their completion (external Ko)
  ncl_register #(.N(4)) u_xreg (.rst(rst), .ki(k_in), .d(x_in), .q(x_q), .ko(x_ko));
  ncl_register #(.N(4)) u_yreg (.rst(rst), .ki(k_in), .d(y_in), .q(y_q), .ko(y_ko));
  ncl_completion #(.N(8), .RST_VAL(1'b1)) u_comp_in (
    .rst(rst), .ko({y_ko, x_ko}), .ki(ko));

  // Multiplier and accumulating adder
  ncl_mul_array u_mul (.x(x_q), .y(y_q), .p(prod));
  ncl_acc_rca   u_rca (.acc(acc_q), .p(prod), .s(sum), .cout(cout));

  // Output register and overflow register
  ncl_register #(.N(12)) u_outreg (.rst(rst), .ki(k_out), .d(sum), .q(result), .ko(out_ko));
  ncl_register #(.N(1), .RAILS(2)) u_ovreg (.rst(rst), .ki(k_out), .d(cout), .q(ov),
                                            .ko(ov_ko));
  ncl_completion #(.N(13), .RST_VAL(1'b1)) u_comp_out (
    .rst(rst), .ko({ov_ko, out_ko}), .ki(k_in));

  // Feedback register (resets to DATA0 = accumulated value 0)
  ncl_register #(.N(12), .RESET_DATA(1'b1)) u_fbreg (
    .rst(rst), .ki(k_fb), .d(result), .q(fb_q), .ko(fb_ko));
  ncl_completion #(.N(13), .RST_VAL(1'b0)) u_comp_fb (
    .rst(rst), .ko({ki, fb_ko}), .ki(k_out));

  // Accumulator register
  ncl_register #(.N(12)) u_accreg (.rst(rst), .ki(k_in), .d(fb_q), .q(acc_q), .ko(acc_ko));
  ncl_completion #(.N(12), .RST_VAL(1'b1)) u_comp_acc (
    .rst(rst), .ko(acc_ko), .ki(k_fb));
endmodule

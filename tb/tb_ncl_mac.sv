// tb_ncl_mac -- end-to-end test of the quad-rail NCL multiply-accumulate unit.
//
// Acts as the four-phase producer and consumer around ncl_mac: presents X and Y as
// quad-rail DATA while ko is high, returns them to NULL after ko falls, waits for a
// complete DATA result, compares it (and OV) with a reference accumulator computed in
// plain integers, acknowledges with ki = 0 and re-requests with ki = 1 after the result
// has gone back to NULL. Every observed word is checked to be a legal one-hot code.
// Runs directed cases (zeros, 255*255 products, a run of maximal products that wraps the
// 24-bit accumulator and raises OV) and then random operands. Counts how often overflow
// and no-overflow results, the accumulator loop carrying a non-zero value and the
// ki-held-back case (output waiting on the consumer) occurred; a mechanism never seen is
// a failure.
module tb_ncl_mac;
  import ncl_pkg::*;

  logic       rst;
  qr_t [3:0]  x_in, y_in;
  logic       ko, ki;
  qr_t [11:0] result;
  dr_t        ov;

  ncl_mac dut (.rst(rst), .x_in(x_in), .y_in(y_in), .ko(ko), .ki(ki), .result(result), .ov(ov));

  int checks = 0, failures = 0;
  int n_ov = 0, n_noov = 0, n_accnz = 0, n_held = 0;
  longint unsigned acc_ref = 0;

  function automatic qr_t [3:0] enc8(logic [7:0] v);
    qr_t [3:0] r;
    for (int i = 0; i < 4; i++) r[i] = qr_enc(int'(v[2*i +: 2]));
    return r;
  endfunction

  function automatic bit all_data(qr_t [11:0] r, dr_t o);
    bit ok = (o == 2'b01) || (o == 2'b10);
    for (int i = 0; i < 12; i++) ok &= $onehot(r[i]);
    return ok;
  endfunction

  function automatic bit all_null(qr_t [11:0] r, dr_t o);
    return (r == '0) && (o == '0);
  endfunction

  function automatic logic [23:0] dec24(qr_t [11:0] r);
    logic [23:0] v = '0;
    for (int i = 0; i < 12; i++) v[2*i +: 2] = 2'(rails_dec(r[i]));
    return v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic mac_op(logic [7:0] xv, logic [7:0] yv, bit hold_ki);
    longint unsigned s;
    logic [23:0] got;
    wait (ko == 1'b1);
    #1 x_in = enc8(xv); y_in = enc8(yv);
    wait (ko == 1'b0);
    #1 x_in = '0; y_in = '0;            // producer returns to NULL early
    while (!all_data(result, ov)) #1;
    #1;
    check(all_data(result, ov), "result not a complete DATA word");
    s = acc_ref + longint'(xv) * longint'(yv);
    got = dec24(result);
    check(got == s[23:0], $sformatf("acc %0d + %0d*%0d: got %0d expected %0d",
                                    acc_ref, xv, yv, got, s[23:0]));
    check(ov == ((s >= (64'd1 << 24)) ? 2'b10 : 2'b01),
          $sformatf("ov %b for sum %0d", ov, s));
    if (s >= (64'd1 << 24)) n_ov++; else n_noov++;
    if (acc_ref != 0) n_accnz++;
    acc_ref = s & 64'hFF_FFFF;
    if (hold_ki) begin
      // Keep the result waiting: it must stay DATA while ki is rfd.
      #20;
      check(all_data(result, ov) && dec24(result) == got, "result not held while ki = 1");
      n_held++;
    end
    ki = 1'b0;
    while (!all_null(result, ov)) #1;
    #1 check(all_null(result, ov), "result did not return to NULL");
    ki = 1'b1;
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog (ko=%b ki=%b result=%h ov=%b acc=%h fb=%h k_in=%b k_fb=%b k_out=%b)",
             ko, ki, result, ov, dut.acc_q, dut.fb_q, dut.k_in, dut.k_fb, dut.k_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ki = 1'b1; x_in = '0; y_in = '0;
    #10 rst = 1'b0;
    #10;
    mac_op(8'd0, 8'd0, 1'b0);
    mac_op(8'd3, 8'd5, 1'b1);
    mac_op(8'd255, 8'd255, 1'b0);
    mac_op(8'd1, 8'd1, 1'b0);
    mac_op(8'd170, 8'd85, 1'b0);
    // 258 maximal products exceed 2^24 - 1: the accumulator wraps and OV is raised once.
    for (int i = 0; i < 260; i++) mac_op(8'd255, 8'd255, i == 100);
    for (int i = 0; i < 300; i++) mac_op(8'($urandom), 8'($urandom), (i % 50) == 0);
    check(n_ov > 0, "overflow never happened");
    check(n_noov > 0, "no result without overflow");
    check(n_accnz > 0, "accumulator never fed back a non-zero value");
    check(n_held > 0, "consumer hold never exercised");
    $display("mechanisms: overflow=%0d no_overflow=%0d nonzero_feedback=%0d ki_held=%0d",
             n_ov, n_noov, n_accnz, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

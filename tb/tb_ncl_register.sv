// tb_ncl_register -- self-checking test of an NCL register stage.
// A 12-signal quad-rail register reset to NULL and a 3-signal dual-rail register reset
// to DATA0 are driven with alternating DATA/NULL wavefronts and request levels. Checks:
// reset state; DATA passes only while ki = 1 (rfd) and NULL only while ki = 0 (rfn);
// an output holds while the request blocks it; ko is 0 exactly for signals holding DATA.
module tb_ncl_register;
  import ncl_pkg::*;
  logic rst, ki;
  qr_t [11:0] d, q;
  logic [11:0] ko;
  logic [2:0][1:0] dd, qd;
  logic [2:0] kod;

  ncl_register #(.N(12)) dut (.rst(rst), .ki(ki), .d(d), .q(q), .ko(ko));
  ncl_register #(.N(3), .RAILS(2), .RESET_DATA(1'b1)) dut2 (.rst(rst), .ki(ki), .d(dd), .q(qd), .ko(kod));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic qr_t [11:0] rand_word();
    qr_t [11:0] w;
    for (int i = 0; i < 12; i++) w[i] = qr_enc($urandom % 4);
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qr_t [11:0] w;
    rst = 1'b1; ki = 1'b1; d = '0; dd = '0;
    #1;
    check(q == '0 && ko == '1, "quad register reset to NULL");
    check(qd == {3{2'b01}} && kod == '0, "dual register reset to DATA0");
    rst = 1'b0;
    #1;
    for (int i = 0; i < 200; i++) begin
      w = rand_word();
      // DATA arrives while request is rfn: must be blocked
      ki = 1'b0; #1;
      d = w; dd = {2'b10, 2'b01, 2'b10}; #1;
      check(q == '0 && ko == '1, "DATA passed while ki = rfn");
      ki = 1'b1; #1;
      check(q == w && ko == '0, "DATA not passed on rfd");
      check(qd == {2'b10, 2'b01, 2'b10} && kod == '0, "dual DATA not passed");
      // NULL arrives while request is rfd: must hold DATA
      d = '0; dd = '0; #1;
      check(q == w, "DATA not held while ki = rfd");
      ki = 1'b0; #1;
      check(q == '0 && ko == '1 && qd == '0 && kod == '1, "NULL not passed on rfn");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

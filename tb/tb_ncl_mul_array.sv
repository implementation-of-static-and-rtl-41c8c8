// tb_ncl_mul_array -- exhaustive test of the 8x8 quad-rail multiplier array.
// For all 65536 operand pairs: NULL operands give a NULL product; x DATA with y NULL
// gives no output (completeness); both DATA give the one-hot digits of x*y; the product
// holds after x alone returns to NULL.
module tb_ncl_mul_array;
  import ncl_pkg::*;
  qr_t [3:0] x, y;
  qr_t [7:0] p;

  ncl_mul_array dut (.x(x), .y(y), .p(p));

  int checks = 0, failures = 0;

  function automatic qr_t [3:0] enc8(logic [7:0] v);
    qr_t [3:0] r;
    for (int i = 0; i < 4; i++) r[i] = qr_enc(int'(v[2*i +: 2]));
    return r;
  endfunction

  function automatic qr_t [7:0] enc16(logic [15:0] v);
    qr_t [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = qr_enc(int'(v[2*i +: 2]));
    return r;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; #1;
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x = enc8(8'(a)); #1;
        check(p == '0, $sformatf("%0d*%0d: output with y NULL", a, b));
        y = enc8(8'(b)); #1;
        check(p == enc16(16'(a * b)), $sformatf("%0d*%0d: got %h", a, b, p));
        x = '0; #1;
        check(p == enc16(16'(a * b)), $sformatf("%0d*%0d: output not held", a, b));
        y = '0; #1;
        check(p == '0, $sformatf("%0d*%0d: not NULL", a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

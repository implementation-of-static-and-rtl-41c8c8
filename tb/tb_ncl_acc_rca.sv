// tb_ncl_acc_rca -- self-checking test of the 12-digit accumulate ripple-carry adder.
// Random and corner operands (including sums just below and above 2^24) are applied as a
// NULL/DATA sequence; the sum digits and the dual-rail overflow carry are compared with
// integer addition, and completeness is checked with the product still NULL.
module tb_ncl_acc_rca;
  import ncl_pkg::*;
  qr_t [11:0] acc, s;
  qr_t [7:0]  p;
  dr_t        cout;

  ncl_acc_rca dut (.acc(acc), .p(p), .s(s), .cout(cout));

  int checks = 0, failures = 0, n_ov = 0;

  function automatic qr_t [11:0] enc24(logic [23:0] v);
    qr_t [11:0] r;
    for (int i = 0; i < 12; i++) r[i] = qr_enc(int'(v[2*i +: 2]));
    return r;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run(logic [23:0] a, logic [15:0] b);
    logic [24:0] sum = {1'b0, a} + {9'b0, b};
    qr_t [11:0] bq = enc24({8'b0, b});
    acc = enc24(a); #1;
    check(s == '0 && cout == '0, "output with product NULL");
    p = bq[7:0]; #1;
    check(s == enc24(sum[23:0]), $sformatf("%0d + %0d: sum", a, b));
    check(cout == (sum[24] ? 2'b10 : 2'b01), $sformatf("%0d + %0d: carry", a, b));
    if (sum[24]) n_ov++;
    acc = '0; p = '0; #1;
    check(s == '0 && cout == '0, "not NULL");
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc = '0; p = '0; #1;
    run(24'd0, 16'd0);
    run(24'hFFFFFF, 16'd0);
    run(24'hFFFFFF, 16'd1);
    run(24'hFF0000, 16'hFFFF);
    run(24'hFF0001, 16'hFFFF);
    for (int i = 0; i < 3000; i++) run(24'($urandom), 16'($urandom));
    check(n_ov > 0, "overflow never produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

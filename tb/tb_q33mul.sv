// tb_q33mul -- exhaustive self-checking test of q33mul.
//
// For every combination of operand values: all operands NULL -> outputs must be NULL;
// each operand but one DATA -> outputs must stay NULL (input completeness); all DATA ->
// outputs must be the one-hot code of the reference product (low
// digit, high digit) worked out with integer arithmetic; then one operand back to NULL ->
// outputs must hold DATA (hysteresis) until every operand is NULL.
module tb_q33mul;
  import ncl_pkg::*;
  logic [3:0] a;
  logic [3:0] b;
  logic [3:0] s;
  logic [2:0] co;

  q33mul dut (.a(a), .b(b), .ppl(s), .pph(co));

  int checks = 0, failures = 0;
  int unsigned v [2];
  localparam int unsigned RADIX [2] = '{4, 4};

  task automatic apply(logic [1:0] mask);
      a = (mask[0]) ? 4'(1 << v[0]) : '0;
      b = (mask[1]) ? 4'(1 << v[1]) : '0;
    #1;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned tot;
    for (int c = 0; c < 16; c++) begin
      int unsigned t = c;
      for (int k = 0; k < 2; k++) begin
        v[k] = t % RADIX[k];
        t = t / RADIX[k];
      end
      tot = v[0] * v[1];
      apply('0);
      check(s == '0 && co == '0, $sformatf("combination %0d: not NULL after NULL inputs", c));
      for (int k = 0; k < 2; k++) begin
        apply(2'((1 << 2) - 1) & ~(2'(1) << k));
        check(s == '0 && co == '0, $sformatf("combination %0d: early output, operand %0d NULL", c, k));
        apply('0);
      end
      apply('1);
      check(s == 4'(1 << (tot % 4)) && co == 3'(1 << (tot / 4)),
            $sformatf("combination %0d: s=%b co=%b expected value %0d", c, s, co, tot));
      apply(2'(1));
      check(s == 4'(1 << (tot % 4)), $sformatf("combination %0d: output dropped early", c));
    end
    apply('0);
    check(s == '0 && co == '0, "final NULL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

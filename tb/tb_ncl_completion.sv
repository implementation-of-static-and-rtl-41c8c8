// tb_ncl_completion -- self-checking test of the completion tree for several widths.
// The ko lines move the way register acknowledges do: from all low, one at a time in
// random order to all high, and back. The output must change only when the last line has
// moved (C-element behaviour); rst must force the reset value.
module tb_ncl_completion;
  logic rst;
  logic [12:0] ko13;
  logic [7:0]  ko8;
  logic [1:0]  ko2;
  logic ki13, ki8, ki2;

  ncl_completion #(.N(13), .RST_VAL(1'b0)) dut13 (.rst(rst), .ko(ko13), .ki(ki13));
  ncl_completion #(.N(8),  .RST_VAL(1'b1)) dut8  (.rst(rst), .ko(ko8),  .ki(ki8));
  ncl_completion #(.N(2),  .RST_VAL(1'b1)) dut2  (.rst(rst), .ko(ko2),  .ki(ki2));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // One phase: starting from all lines at !level, set the lines to level one by one in
  // random order; the outputs must keep their old value until the last line has moved.
  task automatic phase(bit level);
    int order [13];
    for (int i = 0; i < 13; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < 13; i++) begin
      int k = order[i];
      ko13[k] = level;
      if (k < 8) ko8[k] = level;
      if (k < 2) ko2[k] = level;
      #1;
      check(ki13 == ((i == 12) ? level : !level), $sformatf("N=13 line %0d of 13", i + 1));
      if (k < 8) r8++;
      if (k < 2) r2++;
      check(ki8 == ((r8 == 8) ? level : !level), "N=8");
      check(ki2 == ((r2 == 2) ? level : !level), "N=2");
    end
    r8 = 0; r2 = 0;
  endtask

  int r8, r2;

  initial begin
    rst = 1'b1; ko13 = '0; ko8 = '1; ko2 = '1;
    #1;
    check(ki13 == 1'b0 && ki8 == 1'b1 && ki2 == 1'b1, "reset values");
    ko8 = '0; ko2 = '0;
    #1;
    check(ki8 == 1'b1 && ki2 == 1'b1, "reset must override inputs");
    rst = 1'b0;
    #1;
    check(ki13 == 1'b0 && ki8 == 1'b0 && ki2 == 1'b0, "all-low inputs after reset");
    r8 = 0; r2 = 0;
    for (int i = 0; i < 200; i++) begin
      phase(1'b1);
      phase(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ncl_th22r -- self-checking test of the resettable TH22 gate (both reset values).
// Random walks on a, b and rst are compared with a C-element model: set when both inputs
// are high, clear when both are low, hold otherwise, forced to the reset value by rst.
module tb_ncl_th22r;
  logic rst, a, b;
  logic z0, z1, r0, r1;

  ncl_th22r #(.RST_VAL(1'b0)) dut0 (.rst(rst), .a(a), .b(b), .z(z0));
  ncl_th22r #(.RST_VAL(1'b1)) dut1 (.rst(rst), .a(a), .b(b), .z(z1));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; a = 1'b0; b = 1'b0; r0 = 1'b0; r1 = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      #1;
      checks += 2;
      if (z0 !== r0) begin failures++; $display("FAIL: TH22n step %0d z=%b exp %b", i, z0, r0); end
      if (z1 !== r1) begin failures++; $display("FAIL: TH22d step %0d z=%b exp %b", i, z1, r1); end
      rst = ($urandom % 16) == 0;
      a = 1'($urandom);
      b = 1'($urandom);
      if (rst) begin r0 = 1'b0; r1 = 1'b1; end
      else if (a & b) begin r0 = 1'b1; r1 = 1'b1; end
      else if (!a & !b) begin r0 = 1'b0; r1 = 1'b0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

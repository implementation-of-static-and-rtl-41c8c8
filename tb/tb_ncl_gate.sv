// tb_ncl_gate -- self-checking test of all 27 NCL threshold gates.
//
// One instance of each gate type. The reference model is written differently from the
// gate: for a threshold gate TH<m><n>w<w1..> the output sets when the weighted count of
// asserted inputs reaches m; THxor0, THand0 and TH24comp use their sum-of-products. Both
// set and hysteresis are modelled (stay high until every input is low). A random walk of
// input vectors, plus an exhaustive sweep from the all-low state, is applied to all gates.
module tb_ncl_gate;
  import ncl_pkg::*;

  localparam int NG = 27;
  logic [3:0] in [NG];
  logic [NG-1:0] z;
  logic [NG-1:0] zref;

  // threshold and weights of A..D; weight 0 = input absent; m = 0 marks a special gate
  localparam int unsigned M [NG] = '{1,2,1,2,3,2,3, 1,2,3,4,2,3,4,3,4, 2,3,4,5,3,5, 4,5, 0,0,0};
  localparam int unsigned W [NG][4] = '{
    '{1,1,0,0}, '{1,1,0,0}, '{1,1,1,0}, '{1,1,1,0}, '{1,1,1,0}, '{2,1,1,0}, '{2,1,1,0},
    '{1,1,1,1}, '{1,1,1,1}, '{1,1,1,1}, '{1,1,1,1}, '{2,1,1,1}, '{2,1,1,1}, '{2,1,1,1},
    '{3,1,1,1}, '{3,1,1,1}, '{2,2,1,1}, '{2,2,1,1}, '{2,2,1,1}, '{2,2,1,1}, '{3,2,1,1},
    '{3,2,1,1}, '{3,2,2,1}, '{3,2,2,1}, '{1,1,1,1}, '{1,1,1,1}, '{1,1,1,1}};

  for (genvar g = 0; g < NG; g++) begin : g_gate
    ncl_gate #(.GATE(gate_e'(g))) u_g (.in(in[g]), .z(z[g]));
  end

  int checks = 0, failures = 0;

  function automatic bit set_ref(int g, logic [3:0] v);
    int unsigned s = 0;
    logic a = v[0], b = v[1], c = v[2], d = v[3];
    case (g)
      24: return (a & b) | (c & d);                           // THxor0
      25: return (a & b) | (b & c) | (a & d);                 // THand0
      26: return (a | b) & (c | d);                           // TH24comp
      default: begin
        for (int k = 0; k < 4; k++) if (v[k]) s += W[g][k];
        return s >= M[g];
      end
    endcase
  endfunction

  task automatic drive(logic [3:0] v);
    for (int g = 0; g < NG; g++) begin
      logic [3:0] vm;
      for (int k = 0; k < 4; k++) vm[k] = v[k] & (W[g][k] != 0);
      in[g] = vm;
      if (set_ref(g, vm)) zref[g] = 1'b1;
      else if (vm == '0)  zref[g] = 1'b0;
    end
    #1;
    for (int g = 0; g < NG; g++) begin
      checks++;
      if (z[g] !== zref[g]) begin
        failures++;
        if (failures < 10) $display("FAIL: gate %s in=%b z=%b expected %b",
                                    gate_e'(g), in[g], z[g], zref[g]);
      end
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
    zref = '0;
    drive(4'b0000);
    for (int v = 1; v < 16; v++) begin
      drive(4'(v));
      drive(4'b0000);
    end
    for (int i = 0; i < 2000; i++) drive(4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

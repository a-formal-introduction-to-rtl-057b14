// tb_b_gate: instantiates all sixteen primitive gates and checks each one
// on every input combination against its truth table, written out here as
// "output is 1 when ..." rules.
module tb_b_gate;
  import hdl_prim_pkg::*;
  logic [3:0] x;
  logic [15:0] y;
  int checks = 0, failures = 0;

  b_gate #(.FN(B_BUF))   g0  (.in(x[0:0]), .out(y[0]));
  b_gate #(.FN(B_NOT))   g1  (.in(x[0:0]), .out(y[1]));
  b_gate #(.FN(B_NAND))  g2  (.in(x[1:0]), .out(y[2]));
  b_gate #(.FN(B_NAND3)) g3  (.in(x[2:0]), .out(y[3]));
  b_gate #(.FN(B_NAND4)) g4  (.in(x[3:0]), .out(y[4]));
  b_gate #(.FN(B_OR))    g5  (.in(x[1:0]), .out(y[5]));
  b_gate #(.FN(B_OR3))   g6  (.in(x[2:0]), .out(y[6]));
  b_gate #(.FN(B_OR4))   g7  (.in(x[3:0]), .out(y[7]));
  b_gate #(.FN(B_EQV))   g8  (.in(x[1:0]), .out(y[8]));
  b_gate #(.FN(B_XOR))   g9  (.in(x[1:0]), .out(y[9]));
  b_gate #(.FN(B_AND))   g10 (.in(x[1:0]), .out(y[10]));
  b_gate #(.FN(B_AND3))  g11 (.in(x[2:0]), .out(y[11]));
  b_gate #(.FN(B_AND4))  g12 (.in(x[3:0]), .out(y[12]));
  b_gate #(.FN(B_NOR))   g13 (.in(x[1:0]), .out(y[13]));
  b_gate #(.FN(B_NOR3))  g14 (.in(x[2:0]), .out(y[14]));
  b_gate #(.FN(B_NOR4))  g15 (.in(x[3:0]), .out(y[15]));

  function automatic logic [15:0] expected(logic [3:0] v);
    int ones2, ones3, ones4;
    ones2 = v[0] + v[1];
    ones3 = ones2 + v[2];
    ones4 = ones3 + v[3];
    return {ones4 == 0, ones3 == 0, ones2 == 0,           // nor4 nor3 nor
            ones4 == 4, ones3 == 3, ones2 == 2,           // and4 and3 and
            ones2 == 1, ones2 != 1,                       // xor eqv
            ones4 > 0, ones3 > 0, ones2 > 0,              // or4 or3 or
            ones4 != 4, ones3 != 3, ones2 != 2,           // nand4 nand3 nand
            v[0] == 0, v[0] == 1};                        // not buf
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (y[k] !== expected(x)[k]) begin
          failures++;
          $display("FAIL gate %0d inputs %b out %0d", k, x, y[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

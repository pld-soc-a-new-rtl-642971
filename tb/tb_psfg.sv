// tb_psfg: exhaustive check of the 3-variable PSFG.
// For every input pattern and every column programming (top 0/1, any EXOR
// connection set) the column output must equal the symmetric function value
// at the number of high inputs, and the first-plane outputs must be the
// threshold functions (>=1, >=2, ==3). The five two-variable functions
// (NOR, XOR, AND, OR, NAND with c = 0) are checked by name as well.
module tb_psfg;
  import pld_pkg::*;
  import pld_tb_pkg::*;

  logic [2:0]      x;
  logic [1:0]      top;
  logic [1:0][2:0] en;
  logic [2:0]      t;
  logic [1:0]      f;
  int checks = 0, failures = 0;

  psfg dut (.x(x), .top(top), .en(en), .t(t), .f(f));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: x=%b top=%b en=%b got %b exp %b", what, x, top, en, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = 0; xi < 8; xi++) begin
      for (int p = 0; p < 16; p++) begin
        x = 3'(xi);
        top = {p[3], p[3]};
        en  = {p[2:0], ~p[2:0]};
        #1;
        check(t[0], $countones(x) >= 1, "t0");
        check(t[1], $countones(x) >= 2, "t1");
        check(t[2], $countones(x) == 3, "t2");
        check(f[0], sym_val(top[0], en[0], $countones(x)), "col0");
        check(f[1], sym_val(top[1], en[1], $countones(x)), "col1");
      end
      // full adder: sum = S13 on column 0, carry = S23 on column 1
      x = 3'(xi); top = 2'b00; en = {3'b010, 3'b111}; #1;
      check(f[0], ^x, "sum");
      check(f[1], (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]), "carry");
    end
    // two-variable functions with c tied to 0
    for (int ab = 0; ab < 4; ab++) begin
      logic a, b;
      a = ab[0]; b = ab[1];
      x = {1'b0, b, a};
      top = 2'b01; en = {3'b011, 3'b001}; #1;     // NOR, XOR
      check(f[0], ~(a | b), "NOR");
      check(f[1], a ^ b, "XOR");
      top = 2'b00; en = {3'b001, 3'b010}; #1;     // AND, OR
      check(f[0], a & b, "AND");
      check(f[1], a | b, "OR");
      top = 2'b01; en = {3'b000, 3'b010}; #1;     // NAND on column 0
      check(f[0], ~(a & b), "NAND");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

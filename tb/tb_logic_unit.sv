// tb_logic_unit: checks one Logic Unit against the reference model.
// Part 1: 4000 cycles of random configurations and random pin values; the
// outputs q are compared every cycle with lu_ref, which also tracks the
// flip-flop state. Part 2: the LU programmed as a bit-serial adder (PSFG
// column 0 = sum, column 1 = carry fed back through flip-flop 1) adds random
// 16-bit numbers sent LSB first; sum bit i appears on q[0] one cycle after
// operand bit i (one-cycle latency).
module tb_logic_unit;
  import pld_pkg::*;
  import pld_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  lu_cfg_t cfg;
  logic [2:0] d, q, ff_m, dn_m, q_m;
  logic g;
  logic [1:0] cas;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic_unit dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .d(d), .g(g), .cas(cas), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = lu_idle(); d = '0; g = 0; cas = '0;
    ff_m = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // ---- part 1: random configurations against the model
    for (int i = 0; i < 4000; i++) begin
      if (i % 8 == 0) cfg = lu_random();
      d = 3'($urandom); g = 1'($urandom); cas = 2'($urandom);
      #1;
      lu_ref(cfg, d, g, cas, ff_m, dn_m, q_m);
      checks++;
      if (q !== q_m) begin
        failures++;
        if (failures < 10) $display("FAIL random cfg=%h d=%b g=%b cas=%b q=%b exp %b", cfg, d, g, cas, q, q_m);
      end
      @(posedge clk);
      ff_m = dn_m;
      #1;
    end
    // ---- part 2: bit-serial adder
    cfg = lu_mac(GATE_ONE);
    rst_n = 1'b0; #1; rst_n = 1'b1; ff_m = '0;
    for (int n = 0; n < 50; n++) begin
      logic [15:0] a, b;
      logic [16:0] s;
      a = 16'($urandom); b = 16'($urandom); s = '0;
      for (int i = 0; i < 17; i++) begin
        d = {1'b0, (i < 16) ? b[i] : 1'b0, (i < 16) ? a[i] : 1'b0};
        @(posedge clk); #1;
        s[i] = q[0];            // registered sum of bit i
      end
      checks++;
      if (s !== {1'b0, a} + {1'b0, b}) begin
        failures++;
        $display("FAIL adder %0d + %0d gave %0d", a, b, s);
      end
      // carry is 0 after the 17th (zero) bit pair, ready for the next sum
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

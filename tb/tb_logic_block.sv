// tb_logic_block: checks the five Logic Units of a Logic Block together.
// Each LU gets its own random configuration and random pins, and every
// output of every LU is compared each cycle with the reference model, so a
// swapped configuration or pin between LUs is caught.
module tb_logic_block;
  import pld_pkg::*;
  import pld_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  lu_cfg_t [4:0] cfg;
  logic [4:0][2:0] d, q, ff_m;
  logic [4:0] g;
  logic [4:0][1:0] cas;
  int checks = 0, failures = 0, cycles = 0;

  logic_block dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .d(d), .g(g), .cas(cas), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0][2:0] dn_m, q_m;
    for (int l = 0; l < 5; l++) cfg[l] = lu_idle();
    d = '0; g = '0; cas = '0; ff_m = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      if (i % 16 == 0) for (int l = 0; l < 5; l++) cfg[l] = lu_random();
      d = 15'($urandom); g = 5'($urandom); cas = 10'($urandom);
      #1;
      for (int l = 0; l < 5; l++) begin
        lu_ref(cfg[l], d[l], g[l], cas[l], ff_m[l], dn_m[l], q_m[l]);
        checks++;
        if (q[l] !== q_m[l]) begin
          failures++;
          if (failures < 10) $display("FAIL LU%0d q=%b exp %b", l, q[l], q_m[l]);
        end
      end
      @(posedge clk);
      ff_m = dn_m;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

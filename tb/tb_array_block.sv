// tb_array_block: checks the two programmable delay lines of the Array
// Block. Random bit streams enter both channels; for random tap settings
// (changed every 100 cycles, including the extremes 0 and DEPTH-1) each
// output must equal its input delayed by tap+1 cycles, taken from a history
// kept by the testbench. Also checks the full 32-cycle delay explicitly.
module tb_array_block;
  import pld_pkg::*;

  localparam int DEPTH = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  ab_cfg_t cfg;
  logic [1:0] din, dout;
  logic [1:0][63:0] hist;   // hist[k][i]: din[k] i+1 cycles ago
  int checks = 0, failures = 0, cycles = 0;

  array_block dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .din(din), .dout(dout));

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
    cfg = '0; din = '0; hist = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      if (i % 100 == 0) begin
        if (i == 0)        cfg.tap = {5'd31, 5'd0};
        else if (i == 100) cfg.tap = {5'd0, 5'd31};
        else               cfg.tap = {5'($urandom), 5'($urandom)};
      end
      din = 2'($urandom);
      #1;
      if (i >= 40) begin
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (dout[k] !== hist[k][cfg.tap[k]]) begin
            failures++;
            if (failures < 10) $display("FAIL ch%0d tap %0d got %b exp %b", k, cfg.tap[k], dout[k], hist[k][cfg.tap[k]]);
          end
        end
      end
      @(posedge clk);
      for (int k = 0; k < 2; k++) hist[k] = {hist[k][62:0], din[k]};
      #1;
    end
    // a single 1 through the longest delay: seen exactly 32 cycles later
    cfg.tap = {5'd31, 5'd31};
    din = 2'b00; repeat (40) @(posedge clk);
    #1 din = 2'b11; @(posedge clk); #1 din = 2'b00;
    for (int c = 1; c <= 40; c++) begin
      checks++;
      if (dout !== ((c == 32) ? 2'b11 : 2'b00)) begin
        failures++;
        $display("FAIL pulse at cycle %0d dout=%b", c, dout);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

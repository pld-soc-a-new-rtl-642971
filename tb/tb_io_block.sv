// tb_io_block: checks every configuration of an I/O block. With random pad
// and fabric bits each cycle, to_fab must be pad_i (direct) or pad_i of the
// previous cycle (registered), pad_o likewise for from_fab, and pad_oe must
// follow out_en.
module tb_io_block;
  import pld_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  iob_cfg_t cfg;
  logic pad_i, pad_o, pad_oe, from_fab, to_fab;
  logic pad_i_d, from_fab_d;
  int checks = 0, failures = 0, cycles = 0;

  io_block dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .pad_i(pad_i), .pad_o(pad_o),
                .pad_oe(pad_oe), .from_fab(from_fab), .to_fab(to_fab));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s cfg=%b got %b exp %b", what, cfg, got, exp);
    end
  endtask

  initial begin
    cfg = '0; pad_i = 0; from_fab = 0; pad_i_d = 0; from_fab_d = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      cfg = iob_cfg_t'(i / 100);
      pad_i = 1'($urandom); from_fab = 1'($urandom);
      #1;
      if (i % 100 != 0) begin
        check(to_fab, cfg.in_reg  ? pad_i_d    : pad_i,    "to_fab");
        check(pad_o,  cfg.out_reg ? from_fab_d : from_fab, "pad_o");
      end
      check(pad_oe, cfg.out_en, "pad_oe");
      @(posedge clk);
      pad_i_d = pad_i; from_fab_d = from_fab;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

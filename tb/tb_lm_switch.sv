// tb_lm_switch: checks the LM connection switch. For random source vectors
// and random selections (including indices past the last source) each sink
// must carry the selected source, or 0 when the index is out of range or the
// switch is disabled (configuration in progress).
module tb_lm_switch;
  import pld_pkg::*;

  logic en;
  logic [NSNK-1:0][SELW-1:0] sel;
  logic [NSRC-1:0] src;
  logic [NSNK-1:0] snk;
  int checks = 0, failures = 0;

  lm_switch dut (.en(en), .cfg_sel(sel), .src(src), .snk(snk));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      en = (i % 10) != 9;
      for (int s = 0; s < int'(NSNK); s++) sel[s] = SELW'($urandom);
      src = {$urandom, $urandom};
      #1;
      for (int s = 0; s < int'(NSNK); s++) begin
        logic e;
        int k;
        k = int'(sel[s]);
        e = (en && k < int'(NSRC)) ? ((src >> k) & 1) != 0 : 1'b0;
        checks++;
        if (snk[s] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL sink %0d sel %0d en %b got %b exp %b", s, k, en, snk[s], e);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

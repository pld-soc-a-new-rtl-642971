// tb_logic_module: one Logic Module programmed as a 4-bit serial-parallel
// multiplier, the bit-level systolic structure the LU is meant for.
//   LU i (i = 0..3) is a multiplier cell: x0 = a & b[i] (a on west track 0,
//   b[i] on global line i used as the AND-gate control), x1 = partial sum
//   from LU i+1 (0 for LU 3), x2 = own carry. LU 0's sum is product bit t,
//   one cycle after operand bit a[t] (a sent LSB first, then 4 zeros).
//   The product stream leaves on east track 0 and, through Array Block
//   channel 0 set to a delay of 6, on east track 1.
//   North track 2 is routed straight through to south track 3, and LU 4 is
//   a 4-input parity: PSFG inputs from north tracks 0..2, column top from
//   the cascade pin (north track 3), unregistered, out on south track 0.
// Checks: every product bit for 200 random operand pairs, the delayed copy,
// the route-through and the parity, and that nothing leaves while en = 0.
// Second configuration: a 4-bit ripple-carry adder with no registers. LU i
// adds a[i] (west track i), b[i] (north track i) and the carry of LU i-1
// (carry-in of LU 0 from global line 0); sums leave on east tracks 0..3 and
// the carry-out on south track 0 in the same cycle. All 512 input
// combinations are checked.
module tb_logic_module;
  import pld_pkg::*;
  import pld_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  lm_cfg_t cfg;
  logic [GLOBALS-1:0] gin;
  logic [3:0][TRACKS-1:0] in_trk, out_trk;
  int checks = 0, failures = 0, cycles = 0;

  logic_module dut (.clk(clk), .rst_n(rst_n), .en(en), .cfg(cfg), .gin(gin),
                    .in_trk(in_trk), .out_trk(out_trk));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d: got %b exp %b", what, cycles, got, exp);
    end
  endtask

  localparam int DLY = 6;
  logic [63:0] stream;     // product bits as they left LU 0, newest in bit 0

  initial begin
    cfg = '0;
    for (int l = 0; l < 5; l++) cfg.lu[l] = lu_idle();
    for (int l = 0; l < 4; l++) begin
      cfg.lu[l] = lu_mac(GATE_G);
      cfg.sel[snk_lu(l, PIN_D0)] = src_in(SIDE_W, 0);
      cfg.sel[snk_lu(l, PIN_G)]  = src_global(l);
      cfg.sel[snk_lu(l, PIN_D1)] = (l == 3) ? SELW'(0) : src_lu(l + 1, 0);
    end
    // LU 4: parity of four north tracks through the cascade input
    cfg.lu[4].in_src = {IN_D, IN_D, IN_D};
    cfg.lu[4].gate   = {GATE_ONE, GATE_ONE, GATE_ONE};
    cfg.lu[4].col[0].top = TOP_CAS;
    cfg.lu[4].col[0].en  = 3'b111;
    cfg.lu[4].reg_src[0] = REG_COL0;
    cfg.lu[4].out_reg[0] = 1'b0;
    for (int k = 0; k < 3; k++) cfg.sel[snk_lu(4, k)] = src_in(SIDE_N, k);
    cfg.sel[snk_lu(4, PIN_CAS0)] = src_in(SIDE_N, 3);
    cfg.sel[snk_out(SIDE_S, 0)] = src_lu(4, 0);
    // product out, direct and through the Array Block
    cfg.sel[snk_out(SIDE_E, 0)] = src_lu(0, 0);
    cfg.sel[snk_ab(0)]          = src_lu(0, 0);
    cfg.ab.tap[0]               = AB_TAPW'(DLY - 1);
    cfg.sel[snk_out(SIDE_E, 1)] = src_ab(0);
    // route-through
    cfg.sel[snk_out(SIDE_S, 3)] = src_in(SIDE_N, 2);

    gin = '0; in_trk = '0; stream = '0;
    // disabled switch: all outputs 0
    in_trk = '1; #1;
    check(out_trk == '0, 1'b1, "disabled outputs");
    in_trk = '0;
    repeat (2) @(posedge clk);
    #1 en = 1'b1; rst_n = 1'b1;

    for (int n = 0; n < 200; n++) begin
      logic [3:0] a, b;
      logic [7:0] p, exp_p;
      a = 4'($urandom); b = 4'($urandom);
      if (n == 0) begin a = 4'hf; b = 4'hf; end
      exp_p = 8'(a * b);
      gin = b;
      for (int t = 0; t < 8; t++) begin
        logic [TRACKS-1:0] nt;
        in_trk[SIDE_W][0] = (t < 4) ? a[t] : 1'b0;
        nt = 4'($urandom);
        in_trk[SIDE_N] = nt;
        #1;
        check(out_trk[SIDE_S][3], nt[2], "route-through");
        check(out_trk[SIDE_S][0], ^nt, "cascaded parity");
        @(posedge clk); #1;
        p[t] = out_trk[SIDE_E][0];
        stream = {stream[62:0], p[t]};
        if (n > 0 || t >= DLY) check(out_trk[SIDE_E][1], stream[DLY], "AB delayed product");
      end
      check(p == exp_p, 1'b1, "product");
      if (p != exp_p) $display("  %0d * %0d = %0d, got %0d", a, b, exp_p, p);
    end
    // ---- ripple-carry adder
    cfg = '0;
    for (int l = 0; l < 5; l++) cfg.lu[l] = lu_idle();
    for (int l = 0; l < 4; l++) begin
      cfg.lu[l].in_src = {IN_D, IN_D, IN_D};
      cfg.lu[l].gate   = {GATE_ONE, GATE_ONE, GATE_ONE};
      cfg.lu[l].col[0].en = 3'b111;             // sum
      cfg.lu[l].col[1].en = 3'b010;             // carry
      cfg.lu[l].reg_src[0] = REG_COL0;
      cfg.lu[l].reg_src[1] = REG_COL1;
      cfg.lu[l].out_reg    = 3'b000;            // combinational outputs
      cfg.sel[snk_lu(l, PIN_D0)] = src_in(SIDE_W, l);
      cfg.sel[snk_lu(l, PIN_D1)] = src_in(SIDE_N, l);
      cfg.sel[snk_lu(l, PIN_D2)] = (l == 0) ? src_global(0) : src_lu(l - 1, 1);
      cfg.sel[snk_out(SIDE_E, l)] = src_lu(l, 0);
    end
    cfg.sel[snk_out(SIDE_S, 0)] = src_lu(3, 1);
    for (int v = 0; v < 512; v++) begin
      logic [3:0] a, b;
      logic ci;
      logic [4:0] s;
      {ci, b, a} = 9'(v);
      in_trk = '0;
      in_trk[SIDE_W] = a; in_trk[SIDE_N] = b; gin = {3'b000, ci};
      #1;
      s = {out_trk[SIDE_S][0], out_trk[SIDE_E]};
      check(s == 5'(a) + 5'(b) + 5'(ci), 1'b1, "ripple-carry sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_as_pld: end-to-end test of the whole PLD at its default size (3 x 3
// Logic Modules, 48 I/O blocks), programmed through the configuration chain.
//
// Image 1 holds three circuits at once:
//   A  8 x 8-bit serial-parallel multiplier with a constant coefficient B
//      (B's bits are the LUs' AND-gate controls). Cells 0..4 are LUs 0..4 of
//      LM(1,0), cells 5..7 are LUs 0..2 of LM(1,1). Operand a enters on west
//      pad (row 1, track 0) LSB first followed by 8 zeros and is passed on to
//      LM(1,1) over an inter-LM track; the partial sum of cell 5 returns over
//      another. The product leaves LU 0 through Array Block channel 0 (delay
//      DLY) and a registered west pad (row 1, track 2): product bit t is on
//      the pad DLY+1 cycles after it left LU 0, DLY+2 cycles after a[t].
//   B  4-input parity of the global lines: LU 0 of LM(0,0), three inputs in
//      the PSFG and the fourth through the column's cascade input,
//      registered, on north pad (column 0, track 0).
//   C  bit-serial adder in LM(2,2): operands from two south pads (registered
//      inputs), sum routed north through LM(1,2) and LM(0,2) to north pad
//      (column 2, track 3).
// Image 2 is image 1 with another coefficient; while it is shifted in, the
// bits leaving the chain must be image 1 (configuration read-back).
// Each mechanism is counted and must occur: configuration loads, read-back
// bits, multiplier products, Array Block delayed samples, cascade parities,
// adder sums over multi-hop routes.
module tb_as_pld;
  import pld_pkg::*;
  import pld_tb_pkg::*;

  localparam int ROWS = 3, COLS = 3;
  localparam int NIO = 2 * (ROWS + COLS) * TRACKS;
  localparam int CFG_BITS = ROWS * COLS * LM_CFG_BITS + NIO * IOB_CFG_BITS;
  localparam int BASE_N = 0, BASE_E = COLS * TRACKS, BASE_S = (COLS + ROWS) * TRACKS,
                 BASE_W = (2 * COLS + ROWS) * TRACKS;
  localparam int DLY = 4;
  localparam int PAD_A   = BASE_W + 1 * TRACKS + 0;
  localparam int PAD_P   = BASE_W + 1 * TRACKS + 2;
  localparam int PAD_PAR = BASE_N + 0 * TRACKS + 0;
  localparam int PAD_X   = BASE_S + 2 * TRACKS + 0;
  localparam int PAD_Y   = BASE_S + 2 * TRACKS + 1;
  localparam int PAD_SUM = BASE_N + 2 * TRACKS + 3;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b1, cfg_din = 1'b0;
  logic cfg_dout;
  logic [GLOBALS-1:0] gin = '0;
  logic [NIO-1:0] pad_i = '0, pad_o, pad_oe;
  int checks = 0, failures = 0, cycles = 0;
  int n_cfg = 0, n_readback = 0, n_prod = 0, n_abdelay = 0, n_parity = 0, n_sum = 0;

  as_pld dut (.clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_din(cfg_din),
              .cfg_dout(cfg_dout), .gin(gin), .pad_i(pad_i), .pad_o(pad_o),
              .pad_oe(pad_oe));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  // ------------------------------------------------------------ image
  function automatic logic [CFG_BITS-1:0] build_image(input logic [7:0] coef);
    lm_cfg_t  lm [ROWS][COLS];
    iob_cfg_t io [NIO];
    logic [CFG_BITS-1:0] v;
    int pos;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        lm[r][c] = '0;
        for (int l = 0; l < 5; l++) lm[r][c].lu[l] = lu_idle();
      end
    for (int i = 0; i < NIO; i++) io[i] = '0;

    // A: multiplier, cells 0..4 in LM(1,0), cells 5..7 in LM(1,1)
    for (int i = 0; i < 8; i++) begin
      int c, l;
      c = (i < 5) ? 0 : 1;
      l = (i < 5) ? i : i - 5;
      lm[1][c].lu[l] = lu_mac(coef[i] ? GATE_ONE : GATE_ZERO);
      lm[1][c].sel[snk_lu(l, PIN_D0)] = src_in(SIDE_W, 0);
      if (i == 7)      lm[1][c].sel[snk_lu(l, PIN_D1)] = SELW'(0);
      else if (i == 4) lm[1][c].sel[snk_lu(l, PIN_D1)] = src_in(SIDE_E, 1);
      else             lm[1][c].sel[snk_lu(l, PIN_D1)] = src_lu(l + 1, 0);
    end
    lm[1][0].sel[snk_out(SIDE_E, 0)] = src_in(SIDE_W, 0);   // a -> LM(1,1)
    lm[1][1].sel[snk_out(SIDE_W, 1)] = src_lu(0, 0);        // S5 -> LM(1,0)
    lm[1][0].sel[snk_ab(0)]          = src_lu(0, 0);
    lm[1][0].ab.tap[0]               = AB_TAPW'(DLY - 1);
    lm[1][0].sel[snk_out(SIDE_W, 2)] = src_ab(0);
    io[PAD_P].out_en = 1'b1; io[PAD_P].out_reg = 1'b1;

    // B: parity of the global lines, cascade into column 0
    lm[0][0].lu[0].in_src = {IN_D, IN_D, IN_D};
    lm[0][0].lu[0].gate   = {GATE_ONE, GATE_ONE, GATE_ONE};
    lm[0][0].lu[0].col[0].top = TOP_CAS;
    lm[0][0].lu[0].col[0].en  = 3'b111;
    lm[0][0].lu[0].reg_src[0] = REG_COL0;
    lm[0][0].lu[0].out_reg[0] = 1'b1;
    for (int k = 0; k < 3; k++) lm[0][0].sel[snk_lu(0, k)] = src_global(k);
    lm[0][0].sel[snk_lu(0, PIN_CAS0)] = src_global(3);
    lm[0][0].sel[snk_out(SIDE_N, 0)]  = src_lu(0, 0);
    io[PAD_PAR].out_en = 1'b1;

    // C: bit-serial adder in LM(2,2), sum routed north two hops
    lm[2][2].lu[0] = lu_mac(GATE_ONE);
    lm[2][2].sel[snk_lu(0, PIN_D0)] = src_in(SIDE_S, 0);
    lm[2][2].sel[snk_lu(0, PIN_D1)] = src_in(SIDE_S, 1);
    lm[2][2].sel[snk_out(SIDE_N, 3)] = src_lu(0, 0);
    lm[1][2].sel[snk_out(SIDE_N, 3)] = src_in(SIDE_S, 3);
    lm[0][2].sel[snk_out(SIDE_N, 3)] = src_in(SIDE_S, 3);
    io[PAD_X].in_reg = 1'b1;
    io[PAD_Y].in_reg = 1'b1;
    io[PAD_SUM].out_en = 1'b1;

    pos = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        v[pos +: LM_CFG_BITS] = lm[r][c];
        pos += LM_CFG_BITS;
      end
    for (int i = 0; i < NIO; i++) begin
      v[pos +: IOB_CFG_BITS] = io[i];
      pos += IOB_CFG_BITS;
    end
    return v;
  endfunction

  // Shift an image in; if rb is set, compare what leaves the chain with old.
  task automatic load(input logic [CFG_BITS-1:0] img, input logic rb,
                      input logic [CFG_BITS-1:0] old);
    @(negedge clk);
    cfg_en = 1'b1;
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      cfg_din = img[i];
      if (rb) begin
        check(cfg_dout == old[i], "configuration read-back");
        n_readback++;
      end
      @(negedge clk);
    end
    cfg_en = 1'b0;
    check(pad_oe[PAD_P] && pad_oe[PAD_PAR] && pad_oe[PAD_SUM] && !pad_oe[PAD_A],
          "pad directions after load");
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    n_cfg++;
  endtask

  // Run the three circuits side by side for nfr frames of F cycles. Frame k
  // sends a[7:0] then zeros to A, x and y (16 bits, then one zero pair) to C.
  // The expected output streams are worked out per frame from integer
  // arithmetic, then compared bit by bit at the pads with each circuit's
  // latency.
  localparam int F = 17;
  task automatic run(input logic [7:0] coef, input int nfr);
    int tot;
    logic a_s [], x_s [], y_s [], p_s [], s_s [];
    logic [3:0] g_s [];
    logic [15:0] pw [];
    logic [15:0] prod, got_p;
    logic [16:0] sum, got_s;
    tot = (nfr + 1) * F;
    a_s = new[tot]; x_s = new[tot]; y_s = new[tot]; p_s = new[tot]; s_s = new[tot];
    g_s = new[tot]; pw = new[nfr + 1];
    for (int t = 0; t < tot; t++) begin
      a_s[t] = 0; x_s[t] = 0; y_s[t] = 0; p_s[t] = 0; s_s[t] = 0;
      g_s[t] = 4'($urandom);
    end
    for (int k = 0; k < nfr; k++) begin
      logic [7:0] a;
      logic [15:0] x, y;
      a = (k == 0) ? 8'hff : 8'($urandom);
      x = 16'($urandom); y = 16'($urandom);
      prod = 16'(a) * 16'(coef);
      pw[k] = prod;
      sum  = {1'b0, x} + {1'b0, y};
      for (int j = 0; j < F; j++) begin
        if (j < 8)  a_s[k*F + j] = a[j];
        if (j < 16) begin
          x_s[k*F + j] = x[j];
          y_s[k*F + j] = y[j];
          p_s[k*F + j] = prod[j];
        end
        s_s[k*F + j] = sum[j];
      end
    end
    for (int t = 0; t < tot; t++) begin
      pad_i[PAD_A] = a_s[t];
      pad_i[PAD_X] = x_s[t];
      pad_i[PAD_Y] = y_s[t];
      gin = g_s[t];
      @(posedge clk); #1;
      // B: registered parity of the lines sampled at this edge
      check(pad_o[PAD_PAR] == ^g_s[t], "cascade parity");
      n_parity++;
      // A: product bit leaves the pad DLY+1 edges after LU 0 produced it
      if (t >= DLY + 1) begin
        int u, j;
        u = t - DLY - 1;
        j = u % F;
        got_p[j % 16] = pad_o[PAD_P];
        check(pad_o[PAD_P] == p_s[u], "product bit");
        n_abdelay++;
        if (j == 15 && u / F < nfr) begin
          check(got_p == pw[u / F], "product word");
          if (got_p != pw[u / F]) $display("  product %0d, expected %0d", got_p, pw[u / F]);
          n_prod++;
        end
      end
      // C: IOB input register + LU sum register: bit u shows after edge u+1
      if (t >= 1) begin
        int u, j;
        u = t - 1;
        j = u % F;
        got_s[j] = pad_o[PAD_SUM];
        check(pad_o[PAD_SUM] == s_s[u], "serial sum bit");
        if (j == F - 1 && u / F < nfr) n_sum++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    logic [CFG_BITS-1:0] img1, img2;
    img1 = build_image(8'hb5);
    img2 = build_image(8'h3e);
    repeat (2) @(posedge clk);
    load(img1, 1'b0, '0);
    run(8'hb5, 12);
    load(img2, 1'b1, img1);
    run(8'h3e, 12);
    $display("config loads %0d, read-back bits %0d, products %0d, AB-delayed bits %0d, parities %0d, serial sums %0d",
             n_cfg, n_readback, n_prod, n_abdelay, n_parity, n_sum);
    check(n_cfg == 2 && n_readback == CFG_BITS && n_prod > 0 && n_abdelay > 0 &&
          n_parity > 0 && n_sum > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

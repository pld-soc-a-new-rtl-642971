// tb_pld_iir: a recursive (IIR) filter with four 4-bit coefficients on 4-bit
// input samples, run on the PLD at its default size (3 x 3 LMs):
//   y(n) = ( b0*x(n) + b1*x(n-1) + a1*y(n-1) + a2*y(n-2) ) >> 4
// All values are unsigned; a1 + a2 <= 12 keeps y below 2**7.
//
// Mapping (bit-serial, each sample a frame of F = 16 bits, LSB first):
//   - four 4-cell serial-parallel multipliers, coefficients as AND-gate
//     constants: b0 in LM(0,0), b1 in LM(0,1), a2 in LM(1,1), a1 in LM(1,0)
//   - x(n-1) from Array Block channel 0 of LM(0,0) (16 bits)
//   - three bit-serial adders (LU 4 of LM(0,0), LM(1,0), LM(1,1)) give the
//     sum S, 2 cycles after the products
//   - LU 0 of LM(1,2) passes S through an AND gate whose other input is
//     global line 0, a frame mask that is 0 for the four fraction bits. The
//     masked stream, read from frame bit 4 on, is y(n): the >> 4 costs no
//     logic, only timing.
//   - y feeds back through the Array Block of LM(1,2): channel 0 (8 bits)
//     gives y(n-1) and channel 1 (24 bits) y(n-2), aligned with the next
//     frames of x. The loop is x frame -> product (1) -> adders (2) ->
//     mask (1) -> skip 4 fraction bits -> delay 8 = exactly one frame.
//   - y leaves on the east pad of row 1 (track 0), registered: y(n) bit i is
//     on the pad 8 cycles after x(n) bit i entered.
// Uses 20 of the 45 LUs and 3 Array Block channels; the feedback and
// feed-forward paths run in opposite directions across the array.
// Three random coefficient sets, 12 samples each; every output bit and
// word is checked against the recursion computed here on integers.
module tb_pld_iir;
  import pld_pkg::*;
  import pld_tb_pkg::*;

  localparam int ROWS = 3, COLS = 3;
  localparam int NIO = 2 * (ROWS + COLS) * TRACKS;
  localparam int CFG_BITS = ROWS * COLS * LM_CFG_BITS + NIO * IOB_CFG_BITS;
  localparam int BASE_E = COLS * TRACKS, BASE_W = (2 * COLS + ROWS) * TRACKS;
  localparam int F = 16;            // bits per sample frame
  localparam int NS = 12;           // samples per run
  localparam int LAT = 8;
  localparam int PAD_X = BASE_W + 0 * TRACKS + 0;
  localparam int PAD_Y = BASE_E + 1 * TRACKS + 0;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b1, cfg_din = 1'b0;
  logic cfg_dout;
  logic [GLOBALS-1:0] gin = '0;
  logic [NIO-1:0] pad_i = '0, pad_o, pad_oe;
  int checks = 0, failures = 0, cycles = 0, n_words = 0;

  as_pld dut (.clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_din(cfg_din),
              .cfg_dout(cfg_dout), .gin(gin), .pad_i(pad_i), .pad_o(pad_o),
              .pad_oe(pad_oe));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 30000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // 4-cell multiplier with constant weight w in LUs 0..3 of lm
  function automatic void put_mult(ref lm_cfg_t lm, input logic [3:0] w,
                                   input logic [SELW-1:0] xs);
    for (int i = 0; i < 4; i++) begin
      lm.lu[i] = lu_mac(w[i] ? GATE_ONE : GATE_ZERO);
      lm.sel[snk_lu(i, PIN_D0)] = xs;
      lm.sel[snk_lu(i, PIN_D1)] = (i == 3) ? SELW'(0) : src_lu(i + 1, 0);
    end
  endfunction

  function automatic void put_add(ref lm_cfg_t lm, input logic [SELW-1:0] s0,
                                  input logic [SELW-1:0] s1);
    lm.lu[4] = lu_mac(GATE_ONE);
    lm.sel[snk_lu(4, PIN_D0)] = s0;
    lm.sel[snk_lu(4, PIN_D1)] = s1;
  endfunction

  // c = {a2, a1, b1, b0}
  function automatic logic [CFG_BITS-1:0] build_image(input logic [3:0][3:0] c);
    lm_cfg_t  lm [ROWS][COLS];
    iob_cfg_t io [NIO];
    logic [CFG_BITS-1:0] v;
    int pos;
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < COLS; k++) begin
        lm[r][k] = '0;
        for (int l = 0; l < 5; l++) lm[r][k].lu[l] = lu_idle();
      end
    for (int i = 0; i < NIO; i++) io[i] = '0;
    // feed-forward: x(n), x(n-1)
    lm[0][0].sel[snk_ab(0)] = src_in(SIDE_W, 0);
    lm[0][0].ab.tap[0]      = AB_TAPW'(F - 1);
    lm[0][0].sel[snk_out(SIDE_E, 0)] = src_ab(0);
    put_mult(lm[0][0], c[0], src_in(SIDE_W, 0));
    put_mult(lm[0][1], c[1], src_in(SIDE_W, 0));
    // feedback: y(n-1) into LM(1,0), y(n-2) into LM(1,1)
    put_mult(lm[1][0], c[2], src_in(SIDE_E, 0));
    put_mult(lm[1][1], c[3], src_in(SIDE_E, 1));
    lm[1][1].sel[snk_out(SIDE_W, 0)] = src_in(SIDE_E, 0);
    // adder tree
    lm[0][1].sel[snk_out(SIDE_W, 1)] = src_lu(0, 0);
    put_add(lm[0][0], src_lu(0, 0), src_in(SIDE_E, 1));
    lm[0][0].sel[snk_out(SIDE_S, 1)] = src_lu(4, 0);
    lm[1][0].sel[snk_out(SIDE_E, 3)] = src_in(SIDE_N, 1);
    lm[1][1].sel[snk_out(SIDE_W, 1)] = src_lu(0, 0);
    put_add(lm[1][0], src_lu(0, 0), src_in(SIDE_E, 1));
    lm[1][0].sel[snk_out(SIDE_E, 2)] = src_lu(4, 0);
    put_add(lm[1][1], src_in(SIDE_W, 2), src_in(SIDE_W, 3));
    lm[1][1].sel[snk_out(SIDE_E, 0)] = src_lu(4, 0);
    // frame mask (the >> 4), y delays, output
    lm[1][2].lu[0].in_src[0] = IN_D;
    lm[1][2].lu[0].gate[0]   = GATE_G;
    lm[1][2].lu[0].col[0].top = TOP_ZERO;
    lm[1][2].lu[0].col[0].en  = 3'b001;
    lm[1][2].lu[0].reg_src[0] = REG_COL0;
    lm[1][2].lu[0].out_reg[0] = 1'b1;
    lm[1][2].sel[snk_lu(0, PIN_D0)] = src_in(SIDE_W, 0);
    lm[1][2].sel[snk_lu(0, PIN_G)]  = src_global(0);
    lm[1][2].sel[snk_ab(0)] = src_lu(0, 0);
    lm[1][2].sel[snk_ab(1)] = src_lu(0, 0);
    lm[1][2].ab.tap[0] = AB_TAPW'(F - 8 - 1);
    lm[1][2].ab.tap[1] = AB_TAPW'(2 * F - 8 - 1);
    lm[1][2].sel[snk_out(SIDE_W, 0)] = src_ab(0);
    lm[1][2].sel[snk_out(SIDE_W, 1)] = src_ab(1);
    lm[1][2].sel[snk_out(SIDE_E, 0)] = src_lu(0, 0);
    io[PAD_Y].out_en = 1'b1;
    io[PAD_Y].out_reg = 1'b1;

    pos = 0;
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < COLS; k++) begin
        v[pos +: LM_CFG_BITS] = lm[r][k];
        pos += LM_CFG_BITS;
      end
    for (int i = 0; i < NIO; i++) begin
      v[pos +: IOB_CFG_BITS] = io[i];
      pos += IOB_CFG_BITS;
    end
    return v;
  endfunction

  task automatic load(input logic [CFG_BITS-1:0] img);
    @(negedge clk);
    cfg_en = 1'b1;
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      cfg_din = img[i];
      @(negedge clk);
    end
    cfg_en = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    for (int set = 0; set < 3; set++) begin
      logic [3:0][3:0] c;
      logic [3:0] x [NS];
      int y [NS];
      int tot;
      logic [F-1:0] got;
      if (set == 0) c = {4'd6, 4'd5, 4'd15, 4'd15};
      else begin
        c[0] = 4'($urandom); c[1] = 4'($urandom);
        c[2] = 4'($urandom_range(0, 12));
        c[3] = 4'($urandom_range(0, 12 - int'(c[2])));
      end
      for (int n = 0; n < NS; n++) x[n] = (set == 0) ? 4'hf : 4'($urandom);
      for (int n = 0; n < NS; n++) begin
        int acc;
        acc = int'(c[0]) * int'(x[n]);
        if (n >= 1) acc += int'(c[1]) * int'(x[n-1]) + int'(c[2]) * y[n-1];
        if (n >= 2) acc += int'(c[3]) * y[n-2];
        y[n] = acc >> 4;
      end
      load(build_image(c));
      checks++;
      if (!pad_oe[PAD_Y] || pad_oe[PAD_X]) failures++;
      tot = NS * F + LAT;
      got = '0;
      for (int t = 0; t < tot; t++) begin
        int n, j;
        n = t / F; j = t % F;
        pad_i[PAD_X] = (n < NS && j < 4) ? x[n][j] : 1'b0;
        gin[0] = ((t - 3 + F) % F) >= 4;
        @(posedge clk); #1;
        if (t >= LAT) begin
          int u, un, uj;
          logic e;
          u = t - LAT; un = u / F; uj = u % F;
          e = ((y[un] >> uj) & 1) != 0;
          got[uj] = pad_o[PAD_Y];
          checks++;
          if (pad_o[PAD_Y] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL set %0d output %0d bit %0d", set, un, uj);
          end
          if (uj == F - 1) begin
            checks++;
            n_words++;
            if (int'(got) != y[un]) begin
              failures++;
              $display("FAIL set %0d y(%0d): got %0d exp %0d", set, un, got, y[un]);
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("filter outputs checked: %0d", n_words);
    if (n_words == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pld_conv2d: 2D convolution with a 2 x 2 mask, 4-bit pixels and 4-bit
// weights, run on the PLD at its default size (3 x 3 LMs).
//
// Mapping (bit-serial, each pixel a frame of F bits sent LSB first, 4 data
// bits then zeros; the image is streamed in raster order, IMW pixels a row):
//   y(n) = w00*x(n) + w01*x(n-1) + w10*x(n-IMW) + w11*x(n-IMW-1)
//   - four 4-cell serial-parallel multipliers, weights as AND-gate constants:
//       w00 in LM(0,0), w01 in LM(0,1), w10 in LM(1,1), w11 in LM(1,0)
//   - the pixel delays are Array Block channels: LM(0,0) ch0 = 1 pixel
//     (F bits), LM(0,0) ch1 = one image row (IMW*F bits), LM(1,0) ch0 = one
//     more pixel after the row delay
//   - three bit-serial adders (LU 4 of LM(0,0), LM(1,0), LM(1,1)) sum the
//     four product streams as a tree
//   - x enters on the west pad of row 0 (track 0); y leaves through LM(1,2)
//     on the east pad of row 1 (track 0), registered.
// Latency: y bit u is on the pad 3 cycles after pixel bit u entered
// (multiplier register, two adder levels, pad register).
// Uses 19 of the 45 LUs (16 multiplier cells, 3 adders) and 3 Array Block
// channels.
// Three random weight sets, each on a random 3 x 5 image, each loaded as a
// new configuration; every output bit and every output word is checked
// against the convolution computed here on integers.
module tb_pld_conv2d;
  import pld_pkg::*;
  import pld_tb_pkg::*;

  localparam int ROWS = 3, COLS = 3;
  localparam int NIO = 2 * (ROWS + COLS) * TRACKS;
  localparam int CFG_BITS = ROWS * COLS * LM_CFG_BITS + NIO * IOB_CFG_BITS;
  localparam int BASE_E = COLS * TRACKS, BASE_W = (2 * COLS + ROWS) * TRACKS;
  localparam int F = 10;            // bits per pixel frame (4*15*15 < 2**10)
  localparam int IMW = 3;           // image width in pixels (row delay 30 <= 32)
  localparam int IMH = 5;
  localparam int NPIX = IMW * IMH;
  localparam int LAT = 3;
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

  // 4-cell multiplier with constant weight w in LUs 0..3 of lm, operand
  // on local source xs
  function automatic void put_mult(ref lm_cfg_t lm, input logic [3:0] w,
                                   input logic [SELW-1:0] xs);
    for (int i = 0; i < 4; i++) begin
      lm.lu[i] = lu_mac(w[i] ? GATE_ONE : GATE_ZERO);
      lm.sel[snk_lu(i, PIN_D0)] = xs;
      lm.sel[snk_lu(i, PIN_D1)] = (i == 3) ? SELW'(0) : src_lu(i + 1, 0);
    end
  endfunction

  // bit-serial adder in LU 4 of lm
  function automatic void put_add(ref lm_cfg_t lm, input logic [SELW-1:0] s0,
                                  input logic [SELW-1:0] s1);
    lm.lu[4] = lu_mac(GATE_ONE);
    lm.sel[snk_lu(4, PIN_D0)] = s0;
    lm.sel[snk_lu(4, PIN_D1)] = s1;
  endfunction

  function automatic logic [CFG_BITS-1:0] build_image(input logic [3:0][3:0] w);
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
    // pixel delays
    lm[0][0].sel[snk_ab(0)] = src_in(SIDE_W, 0);
    lm[0][0].ab.tap[0]      = AB_TAPW'(F - 1);
    lm[0][0].sel[snk_ab(1)] = src_in(SIDE_W, 0);
    lm[0][0].ab.tap[1]      = AB_TAPW'(IMW * F - 1);
    lm[0][0].sel[snk_out(SIDE_E, 0)] = src_ab(0);           // x(n-1) -> LM(0,1)
    lm[0][0].sel[snk_out(SIDE_S, 0)] = src_ab(1);           // x(n-IMW) -> LM(1,0)
    lm[1][0].sel[snk_out(SIDE_E, 0)] = src_in(SIDE_N, 0);   //   and on to LM(1,1)
    lm[1][0].sel[snk_ab(0)] = src_in(SIDE_N, 0);
    lm[1][0].ab.tap[0]      = AB_TAPW'(F - 1);              // x(n-IMW-1)
    // multipliers
    put_mult(lm[0][0], w[0], src_in(SIDE_W, 0));
    put_mult(lm[0][1], w[1], src_in(SIDE_W, 0));
    put_mult(lm[1][1], w[2], src_in(SIDE_W, 0));
    put_mult(lm[1][0], w[3], src_ab(0));
    // adder tree
    lm[0][1].sel[snk_out(SIDE_W, 1)] = src_lu(0, 0);        // p01 -> LM(0,0)
    put_add(lm[0][0], src_lu(0, 0), src_in(SIDE_E, 1));
    lm[0][0].sel[snk_out(SIDE_S, 1)] = src_lu(4, 0);        // s0 -> LM(1,0)
    lm[1][0].sel[snk_out(SIDE_E, 3)] = src_in(SIDE_N, 1);   //   and on to LM(1,1)
    lm[1][1].sel[snk_out(SIDE_W, 1)] = src_lu(0, 0);        // p10 -> LM(1,0)
    put_add(lm[1][0], src_lu(0, 0), src_in(SIDE_E, 1));
    lm[1][0].sel[snk_out(SIDE_E, 2)] = src_lu(4, 0);        // s1 -> LM(1,1)
    put_add(lm[1][1], src_in(SIDE_W, 2), src_in(SIDE_W, 3));
    lm[1][1].sel[snk_out(SIDE_E, 0)] = src_lu(4, 0);        // y -> LM(1,2)
    lm[1][2].sel[snk_out(SIDE_E, 0)] = src_in(SIDE_W, 0);   //   -> east pad
    io[PAD_Y].out_en = 1'b1;
    io[PAD_Y].out_reg = 1'b1;

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
      logic [3:0][3:0] w;
      logic [3:0] x [NPIX];
      int y [NPIX + IMW + 2];
      int tot;
      logic [F-1:0] got;
      w = (set == 0) ? 16'hffff : 16'($urandom);
      for (int n = 0; n < NPIX; n++) x[n] = (set == 0) ? 4'hf : 4'($urandom);
      // reference: the raster-stream form of the 2 x 2 convolution
      for (int n = 0; n < NPIX + IMW + 2; n++) begin
        int acc;
        acc = 0;
        if (n < NPIX)                      acc += int'(w[0]) * int'(x[n]);
        if (n >= 1 && n - 1 < NPIX)        acc += int'(w[1]) * int'(x[n-1]);
        if (n >= IMW && n - IMW < NPIX)    acc += int'(w[2]) * int'(x[n-IMW]);
        if (n >= IMW+1 && n-IMW-1 < NPIX)  acc += int'(w[3]) * int'(x[n-IMW-1]);
        y[n] = acc;
      end
      load(build_image(w));
      check_oe: begin
        checks++;
        if (!pad_oe[PAD_Y] || pad_oe[PAD_X]) failures++;
      end
      tot = (NPIX + IMW + 2) * F + LAT;
      got = '0;
      for (int t = 0; t < tot; t++) begin
        int n, j;
        n = t / F; j = t % F;
        pad_i[PAD_X] = (n < NPIX && j < 4) ? x[n][j] : 1'b0;
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
              $display("FAIL set %0d output %0d: got %0d exp %0d", set, un, got, y[un]);
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("convolution outputs checked: %0d", n_words);
    if (n_words == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

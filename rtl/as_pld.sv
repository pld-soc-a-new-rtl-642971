// as_pld: the application-specific PLD, top level.
//
// A ROWS x COLS array of Logic Modules (LMs). Each LM talks to its four
// neighbours over TRACKS inter-LM tracks per side and direction; LM (r,c)'s
// outgoing north track t is LM (r-1,c)'s incoming south track t, and so on.
// Tracks that leave the array end in I/O blocks (IOBs), one per track
// position, so there are NIO = 2*(ROWS+COLS)*TRACKS pads. The global
// interconnection carries clk, rst_n and GLOBALS primary-input lines (gin)
// to every LM.
//
// Pad numbering: north edge first (column c, track t at c*TRACKS+t), then
// east (row r), south (column c) and west (row r), each edge starting at
// index 0 of its row/column.
//
// Configuration: one shift chain, cfg_din -> LM(0,0) -> LM(0,1) -> ... ->
// LM(ROWS-1,COLS-1) -> IOB 0 -> ... -> IOB NIO-1 -> cfg_dout. While cfg_en is
// high the chain shifts one bit per rising clk edge and every switch output
// of the fabric is held at 0; to load an image V (CFG_BITS bits, the last
// element of the chain in the most significant bits) shift V[CFG_BITS-1]
// first. After loading, drop cfg_en and pulse rst_n to clear the user
// flip-flops.
//
// The LM / IOB / global-line organisation follows the architecture
// description; the array size (the drawing shows 3 x 3 LMs), the one-IOB-per-
// track edge, the global input pins and the serial configuration are this
// design's choices.
//
// Lint note: lint reports circular combinational logic on the inter-LM tracks.
// Any programmable mesh has such static paths (a track may be routed east and
// back west); a configuration that registers every loop, as a systolic mapping
// does, has no real loop. During configuration all switch outputs are 0.
module as_pld
  import pld_pkg::*;
#(
  parameter int unsigned ROWS = 3,
  parameter int unsigned COLS = 3,
  localparam int unsigned NIO = 2 * (ROWS + COLS) * TRACKS,
  localparam int unsigned CFG_BITS = ROWS * COLS * LM_CFG_BITS + NIO * IOB_CFG_BITS
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration port
  input  logic               cfg_en,
  input  logic               cfg_din,
  output logic               cfg_dout,
  // global primary inputs
  input  logic [GLOBALS-1:0] gin,
  // I/O pads
  input  logic [NIO-1:0]     pad_i,
  output logic [NIO-1:0]     pad_o,
  output logic [NIO-1:0]     pad_oe
);

  localparam int unsigned BASE_N = 0;
  localparam int unsigned BASE_E = COLS * TRACKS;
  localparam int unsigned BASE_S = (COLS + ROWS) * TRACKS;
  localparam int unsigned BASE_W = (2 * COLS + ROWS) * TRACKS;

  logic fab_en;
  assign fab_en = ~cfg_en;

  // ------------------------------------------------ configuration chain
  logic [ROWS*COLS:0] lm_chain;
  logic [NIO:0]       io_chain;
  lm_cfg_t  lm_cfg  [ROWS][COLS];
  iob_cfg_t iob_cfg [NIO];

  assign lm_chain[0] = cfg_din;

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_cr
    for (genvar c = 0; c < int'(COLS); c++) begin : g_cc
      cfg_seg #(.WIDTH(LM_CFG_BITS)) u_seg (
        .clk     (clk),
        .shift_en(cfg_en),
        .sin     (lm_chain[r*COLS + c]),
        .sout    (lm_chain[r*COLS + c + 1]),
        .q       (lm_cfg[r][c])
      );
    end
  end

  assign io_chain[0] = lm_chain[ROWS*COLS];
  for (genvar i = 0; i < int'(NIO); i++) begin : g_cio
    cfg_seg #(.WIDTH(IOB_CFG_BITS)) u_seg (
      .clk     (clk),
      .shift_en(cfg_en),
      .sin     (io_chain[i]),
      .sout    (io_chain[i+1]),
      .q       (iob_cfg[i])
    );
  end
  assign cfg_dout = io_chain[NIO];

  // ------------------------------------------------------- LM array
  logic [3:0][TRACKS-1:0] in_trk  [ROWS][COLS];
  logic [3:0][TRACKS-1:0] out_trk [ROWS][COLS];
  logic [NIO-1:0] io_to_fab, io_from_fab;

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_r
    for (genvar c = 0; c < int'(COLS); c++) begin : g_c
      logic_module u_lm (
        .clk    (clk),
        .rst_n  (rst_n),
        .en     (fab_en),
        .cfg    (lm_cfg[r][c]),
        .gin    (gin),
        .in_trk (in_trk[r][c]),
        .out_trk(out_trk[r][c])
      );

      // north
      if (r == 0) begin : g_n_io
        assign in_trk[r][c][SIDE_N] = io_to_fab[BASE_N + c*TRACKS +: TRACKS];
        assign io_from_fab[BASE_N + c*TRACKS +: TRACKS] = out_trk[r][c][SIDE_N];
      end else begin : g_n_lm
        assign in_trk[r][c][SIDE_N] = out_trk[r-1][c][SIDE_S];
      end
      // south
      if (r == ROWS-1) begin : g_s_io
        assign in_trk[r][c][SIDE_S] = io_to_fab[BASE_S + c*TRACKS +: TRACKS];
        assign io_from_fab[BASE_S + c*TRACKS +: TRACKS] = out_trk[r][c][SIDE_S];
      end else begin : g_s_lm
        assign in_trk[r][c][SIDE_S] = out_trk[r+1][c][SIDE_N];
      end
      // west
      if (c == 0) begin : g_w_io
        assign in_trk[r][c][SIDE_W] = io_to_fab[BASE_W + r*TRACKS +: TRACKS];
        assign io_from_fab[BASE_W + r*TRACKS +: TRACKS] = out_trk[r][c][SIDE_W];
      end else begin : g_w_lm
        assign in_trk[r][c][SIDE_W] = out_trk[r][c-1][SIDE_E];
      end
      // east
      if (c == COLS-1) begin : g_e_io
        assign in_trk[r][c][SIDE_E] = io_to_fab[BASE_E + r*TRACKS +: TRACKS];
        assign io_from_fab[BASE_E + r*TRACKS +: TRACKS] = out_trk[r][c][SIDE_E];
      end else begin : g_e_lm
        assign in_trk[r][c][SIDE_E] = out_trk[r][c+1][SIDE_W];
      end
    end
  end

  // -------------------------------------------------------- I/O ring
  for (genvar i = 0; i < int'(NIO); i++) begin : g_io
    io_block u_iob (
      .clk     (clk),
      .rst_n   (rst_n),
      .cfg     (iob_cfg[i]),
      .pad_i   (pad_i[i]),
      .pad_o   (pad_o[i]),
      .pad_oe  (pad_oe[i]),
      .from_fab(io_from_fab[i]),
      .to_fab  (io_to_fab[i])
    );
  end

endmodule

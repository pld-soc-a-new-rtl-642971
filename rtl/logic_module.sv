// logic_module: one Logic Module (LM), the tile of the PLD array.
//
// A Logic Block of five Logic Units, an Array Block, and an lm_switch that
// drives every LU pin, both Array Block inputs and the LM's outgoing
// inter-LM tracks from its local signals. Sides are numbered N=0, E=1, S=2,
// W=3; track t of a side carries one bit in each direction (in_trk / out_trk).
// The global lines (gin) reach every LM unchanged.
//
// The composition (LB of five LUs plus one AB, hierarchical global / inter-LM /
// intra-LM routing) follows the architecture description; the track count,
// the global line count and the full-multiplexer switch are this design's
// choices. Timing: LU and AB flip-flops load on the rising clk edge; routing
// is combinational. en low (configuration in progress) forces every switch
// output to 0.
//
// Lint note: the combinational loops lint reports through this module are the
// programmable routing's (LU outputs may be routed back to LU inputs and
// tracks to neighbours and back); see lm_switch.
module logic_module
  import pld_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  lm_cfg_t                       cfg,
  input  logic [GLOBALS-1:0]            gin,
  input  logic [3:0][TRACKS-1:0]        in_trk,
  output logic [3:0][TRACKS-1:0]        out_trk
);

  logic [NSRC-1:0] src;
  logic [NSNK-1:0] snk;

  logic [LU_PER_LM-1:0][2:0]           lu_d;
  logic [LU_PER_LM-1:0]                lu_g;
  logic [LU_PER_LM-1:0][PSFG_COLS-1:0] lu_cas;
  logic [LU_PER_LM-1:0][LU_FF-1:0]     lu_q;
  logic [AB_CH-1:0]                    ab_in, ab_out;

  always_comb begin
    src = '0;
    src[0] = 1'b0;
    src[1] = 1'b1;
    src[SRC_G +: GLOBALS]                 = gin;
    src[SRC_IN +: 4*TRACKS]               = in_trk;
    src[SRC_LU +: LU_PER_LM*LU_FF]        = lu_q;
    src[SRC_AB +: AB_CH]                  = ab_out;
  end

  lm_switch u_sw (
    .en     (en),
    .cfg_sel(cfg.sel),
    .src    (src),
    .snk    (snk)
  );

  always_comb begin
    for (int i = 0; i < int'(LU_PER_LM); i++) begin
      lu_d[i]   = snk[SNK_LU + i*LU_PINS +: 3];
      lu_g[i]   = snk[SNK_LU + i*LU_PINS + PIN_G];
      lu_cas[i] = snk[SNK_LU + i*LU_PINS + PIN_CAS0 +: PSFG_COLS];
    end
    ab_in   = snk[SNK_AB +: AB_CH];
    out_trk = snk[SNK_OUT +: 4*TRACKS];
  end

  logic_block u_lb (
    .clk  (clk),
    .rst_n(rst_n),
    .cfg  (cfg.lu),
    .d    (lu_d),
    .g    (lu_g),
    .cas  (lu_cas),
    .q    (lu_q)
  );

  array_block u_ab (
    .clk  (clk),
    .rst_n(rst_n),
    .cfg  (cfg.ab),
    .din  (ab_in),
    .dout (ab_out)
  );

endmodule

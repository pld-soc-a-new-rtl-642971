// pld_pkg: shared sizes, configuration record types and routing-index helpers
// for the application-specific PLD.
//
// The fabric is built from Logic Modules (LMs). Each LM holds a Logic Block of
// LU_PER_LM Logic Units (each a 3-variable programmable symmetric function
// generator, PSFG, with three flip-flops), one Array Block (two AB_DEPTH-bit
// shift registers) and a switch that feeds every pin from the LM's local
// signals. Five LUs per LM, three flip-flops per LU and two 32-bit shift
// registers per Array Block follow the architecture description; the number of
// tracks per LM side (TRACKS), the number of global input lines (GLOBALS), the
// number of PSFG output columns (PSFG_COLS) and all configuration encodings are
// this design's own choices.
//
// Every programmable element keeps its configuration in a packed struct so that
// a configuration image can be built field by field and shifted in serially.
package pld_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned LU_PER_LM = 5;   // Logic Units in a Logic Block
  localparam int unsigned LU_FF     = 3;   // flip-flops / output muxes per LU
  localparam int unsigned PSFG_VARS = 3;   // inputs of a PSFG
  localparam int unsigned PSFG_COLS = 2;   // programmed EXOR columns per PSFG
  localparam int unsigned AB_DEPTH  = 32;  // bits per Array Block shift register
  localparam int unsigned AB_CH     = 2;   // shift registers per Array Block
  localparam int unsigned AB_TAPW   = $clog2(AB_DEPTH);
  localparam int unsigned TRACKS    = 4;   // inter-LM tracks per side and direction
  localparam int unsigned GLOBALS   = 4;   // global primary-input lines

  // ------------------------------------------------------- PSFG column setup
  // Column top value: constant, cascade input (EXOR-based Davio expansion) or
  // the column's own flip-flop (self loop).
  typedef enum logic [1:0] {
    TOP_ZERO = 2'd0,
    TOP_ONE  = 2'd1,
    TOP_CAS  = 2'd2,
    TOP_FB   = 2'd3
  } top_src_e;

  typedef struct packed {
    top_src_e   top;
    logic [2:0] en;   // en[k]: EXOR in threshold row k (k=0: >=1, 1: >=2, 2: >=3 inputs high)
  } psfg_col_cfg_t;

  // ------------------------------------------------------------ LU setup
  // Second input of each input-control AND gate.
  typedef enum logic [1:0] {
    GATE_ONE  = 2'd0,   // pass the data input
    GATE_ZERO = 2'd1,   // force the PSFG input to 0
    GATE_G    = 2'd2,   // AND with the LU's routed gate signal g
    GATE_NG   = 2'd3    // AND with the complement of g
  } gate_e;

  // Source of each PSFG input (before its AND gate).
  typedef enum logic [1:0] {
    IN_D   = 2'd0,      // routed data input d[k]
    IN_FF0 = 2'd1,      // LU flip-flop 0 (internal feedback)
    IN_FF1 = 2'd2,
    IN_FF2 = 2'd3
  } in_src_e;

  // D input of each LU flip-flop / output multiplexer.
  typedef enum logic [1:0] {
    REG_COL0 = 2'd0,    // PSFG column 0
    REG_COL1 = 2'd1,    // PSFG column 1
    REG_D    = 2'd2,    // routed data input d[k] (delay / route-through)
    REG_ZERO = 2'd3
  } reg_src_e;

  typedef struct packed {
    logic    [LU_FF-1:0]     out_reg;  // 1: output k is the flip-flop, 0: its D input
    reg_src_e [LU_FF-1:0]    reg_src;
    psfg_col_cfg_t [PSFG_COLS-1:0] col;
    gate_e   [PSFG_VARS-1:0] gate;
    in_src_e [PSFG_VARS-1:0] in_src;
  } lu_cfg_t;

  // ------------------------------------------------------------ AB setup
  // Output of channel k is tap[k] of its shift register: a delay of tap[k]+1.
  typedef struct packed {
    logic [AB_CH-1:0][AB_TAPW-1:0] tap;
  } ab_cfg_t;

  // ------------------------------------------------------- switch indices
  // Local signals of an LM, in this order:
  //   0, 1                          constants 0 and 1
  //   SRC_G   + i                   global line i
  //   SRC_IN  + side*TRACKS + t     incoming track t of side (N=0,E=1,S=2,W=3)
  //   SRC_LU  + lu*LU_FF + k        output k of LU lu
  //   SRC_AB  + ch                  Array Block channel ch
  localparam int unsigned SRC_G   = 2;
  localparam int unsigned SRC_IN  = SRC_G + GLOBALS;
  localparam int unsigned SRC_LU  = SRC_IN + 4 * TRACKS;
  localparam int unsigned SRC_AB  = SRC_LU + LU_PER_LM * LU_FF;
  localparam int unsigned NSRC    = SRC_AB + AB_CH;
  localparam int unsigned SELW    = $clog2(NSRC);

  // Pins an LM switch drives, in this order:
  //   SNK_LU  + lu*LU_PINS + p      LU pin p: 0..2 d[0..2], 3 g, 4..5 cas[0..1]
  //   SNK_AB  + ch                  Array Block input ch
  //   SNK_OUT + side*TRACKS + t     outgoing track t of side
  localparam int unsigned LU_PINS = PSFG_VARS + 1 + PSFG_COLS;
  localparam int unsigned SNK_LU  = 0;
  localparam int unsigned SNK_AB  = LU_PER_LM * LU_PINS;
  localparam int unsigned SNK_OUT = SNK_AB + AB_CH;
  localparam int unsigned NSNK    = SNK_OUT + 4 * TRACKS;

  localparam int unsigned SIDE_N = 0, SIDE_E = 1, SIDE_S = 2, SIDE_W = 3;

  typedef struct packed {
    logic [NSNK-1:0][SELW-1:0]  sel;   // source index of every switch output
    lu_cfg_t [LU_PER_LM-1:0]    lu;
    ab_cfg_t                    ab;
  } lm_cfg_t;

  // ------------------------------------------------------------ IOB setup
  typedef struct packed {
    logic out_en;   // drive the pad from the fabric
    logic out_reg;  // register the outgoing bit
    logic in_reg;   // register the incoming bit
  } iob_cfg_t;

  localparam int unsigned LM_CFG_BITS  = $bits(lm_cfg_t);
  localparam int unsigned IOB_CFG_BITS = $bits(iob_cfg_t);

  // Index helpers for building configurations.
  function automatic logic [SELW-1:0] src_global(int unsigned i);
    return SELW'(SRC_G + i);
  endfunction
  function automatic logic [SELW-1:0] src_in(int unsigned side, int unsigned t);
    return SELW'(SRC_IN + side * TRACKS + t);
  endfunction
  function automatic logic [SELW-1:0] src_lu(int unsigned lu, int unsigned k);
    return SELW'(SRC_LU + lu * LU_FF + k);
  endfunction
  function automatic logic [SELW-1:0] src_ab(int unsigned ch);
    return SELW'(SRC_AB + ch);
  endfunction
  function automatic int unsigned snk_lu(int unsigned lu, int unsigned pin);
    return SNK_LU + lu * LU_PINS + pin;
  endfunction
  function automatic int unsigned snk_ab(int unsigned ch);
    return SNK_AB + ch;
  endfunction
  function automatic int unsigned snk_out(int unsigned side, int unsigned t);
    return SNK_OUT + side * TRACKS + t;
  endfunction

  // LU pin numbers for snk_lu()
  localparam int unsigned PIN_D0 = 0, PIN_D1 = 1, PIN_D2 = 2, PIN_G = 3,
                          PIN_CAS0 = 4, PIN_CAS1 = 5;

endpackage

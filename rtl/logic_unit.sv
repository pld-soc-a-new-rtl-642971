// logic_unit: one Logic Unit (LU) of the PLD, the fabric's basic cell.
//
// Structure (after the architecture's LU drawing): a 3-variable PSFG, three
// two-input AND gates that control the PSFG inputs, three flip-flops and three
// output multiplexers that choose between a flip-flop and its D input.
//
//   PSFG input k = src(in_src[k]) & gate(gate[k])
//       src  : the routed data pin d[k], or one of the LU's own flip-flops
//              (internal feedback, e.g. the carry self-loop of a full adder)
//       gate : constant 1, constant 0, the routed pin g, or ~g
//              (a constant coefficient bit or a broadcast data bit)
//   PSFG column j top = 0, 1, cas[j] (cascade pin) or flip-flop j
//   flip-flop k D  = PSFG column 0, column 1, d[k] (route-through) or 0
//   q[k]           = out_reg[k] ? flip-flop k : its D input
//
// With gate[0]=GATE_G, in_src[2]=IN_FF1, column 0 = S13 (sum) and column 1 =
// S23 (carry) the LU is one cell of a bit-serial / serial-parallel multiplier.
//
// Timing: the flip-flops load on every rising clk edge; rst_n clears them
// asynchronously. Paths from d/g/cas to an unregistered q are combinational.
// Feedback uses the flip-flops, never q, so an LU has no combinational loop of
// its own. The source encodings, the g pin and the cascade pins are this
// design's choices; the architecture fixes only the counts of gates, flip-flops and
// multiplexers.
//
// Lint note: inside a full array, lint reports combinational loops through the
// d -> q paths of this module. They are loops of the programmable routing, not
// of the LU, and are closed only by a configuration that routes an
// unregistered output back to its own input (see lm_switch).
module logic_unit
  import pld_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  lu_cfg_t              cfg,
  input  logic [2:0]           d,
  input  logic                 g,
  input  logic [PSFG_COLS-1:0] cas,
  output logic [LU_FF-1:0]     q
);

  logic [LU_FF-1:0]     ff, dnext;
  logic [2:0]           x, t;
  logic [PSFG_COLS-1:0] top, f;
  logic [PSFG_COLS-1:0][2:0] en;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      logic s, gt;
      unique case (cfg.in_src[k])
        IN_D:    s = d[k];
        IN_FF0:  s = ff[0];
        IN_FF1:  s = ff[1];
        default: s = ff[2];
      endcase
      unique case (cfg.gate[k])
        GATE_ONE:  gt = 1'b1;
        GATE_ZERO: gt = 1'b0;
        GATE_G:    gt = g;
        default:   gt = ~g;
      endcase
      x[k] = s & gt;
    end
    for (int j = 0; j < int'(PSFG_COLS); j++) begin
      unique case (cfg.col[j].top)
        TOP_ZERO: top[j] = 1'b0;
        TOP_ONE:  top[j] = 1'b1;
        TOP_CAS:  top[j] = cas[j];
        default:  top[j] = ff[j];
      endcase
      en[j] = cfg.col[j].en;
    end
  end

  psfg #(.COLS(PSFG_COLS)) u_psfg (
    .x  (x),
    .top(top),
    .en (en),
    .t  (t),
    .f  (f)
  );

  always_comb begin
    for (int k = 0; k < int'(LU_FF); k++) begin
      unique case (cfg.reg_src[k])
        REG_COL0: dnext[k] = f[0];
        REG_COL1: dnext[k] = f[1];
        REG_D:    dnext[k] = d[k];
        default:  dnext[k] = 1'b0;
      endcase
      q[k] = cfg.out_reg[k] ? ff[k] : dnext[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ff <= '0;
    else        ff <= dnext;
  end

endmodule

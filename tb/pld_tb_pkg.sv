// pld_tb_pkg: reference models and configuration helpers shared by the
// testbenches of the PLD.
//
// lu_ref computes what a Logic Unit should do from first principles: the
// PSFG inputs are formed from the configuration, a column's value is looked up
// from the number of inputs that are high (a symmetric function depends on
// nothing else), and the output muxes pick flip-flop or D input. The helpers
// build LU configurations for the cells used in the tests (full adder with a
// carry self-loop, gated multiplier cell, delay cell).
package pld_tb_pkg;
  import pld_pkg::*;

  // value of a symmetric function given as top/en at input weight n
  function automatic logic sym_val(input logic top, input logic [2:0] en, input int n);
    logic v;
    v = top;
    if (n >= 1 && en[0]) v = ~v;
    if (n >= 2 && en[1]) v = ~v;
    if (n >= 3 && en[2]) v = ~v;
    return v;
  endfunction

  function automatic void lu_ref(
    input  lu_cfg_t    cfg,
    input  logic [2:0] d,
    input  logic       g,
    input  logic [1:0] cas,
    input  logic [2:0] ff,
    output logic [2:0] dn,
    output logic [2:0] q
  );
    logic [2:0] x;
    logic [1:0] f;
    int n;
    for (int k = 0; k < 3; k++) begin
      logic s, gt;
      case (cfg.in_src[k])
        IN_D:    s = d[k];
        IN_FF0:  s = ff[0];
        IN_FF1:  s = ff[1];
        default: s = ff[2];
      endcase
      case (cfg.gate[k])
        GATE_ONE:  gt = 1'b1;
        GATE_ZERO: gt = 1'b0;
        GATE_G:    gt = g;
        default:   gt = !g;
      endcase
      x[k] = s && gt;
    end
    n = $countones(x);
    for (int j = 0; j < 2; j++) begin
      logic tv;
      case (cfg.col[j].top)
        TOP_ZERO: tv = 1'b0;
        TOP_ONE:  tv = 1'b1;
        TOP_CAS:  tv = cas[j];
        default:  tv = ff[j];
      endcase
      f[j] = sym_val(tv, cfg.col[j].en, n);
    end
    for (int k = 0; k < 3; k++) begin
      case (cfg.reg_src[k])
        REG_COL0: dn[k] = f[0];
        REG_COL1: dn[k] = f[1];
        REG_D:    dn[k] = d[k];
        default:  dn[k] = 1'b0;
      endcase
      q[k] = cfg.out_reg[k] ? ff[k] : dn[k];
    end
  endfunction

  function automatic lu_cfg_t lu_random();
    lu_cfg_t c;
    c = lu_cfg_t'({$urandom, $urandom});
    return c;
  endfunction

  // Idle LU: all outputs 0.
  function automatic lu_cfg_t lu_idle();
    lu_cfg_t c;
    c = '0;
    for (int k = 0; k < 3; k++) begin
      c.reg_src[k] = REG_ZERO;
      c.gate[k]    = GATE_ZERO;
    end
    return c;
  endfunction

  // Serial-parallel multiplier cell (also a bit-serial full adder):
  //   PSFG x0 = d0 & gate (gate = g or constant coefficient bit)
  //   PSFG x1 = d1 (partial sum from the next cell)
  //   PSFG x2 = ff1 (own carry, self loop)
  //   ff0 = sum (S13, parity), ff1 = carry (S23, majority); q0 = sum, q1 = carry
  function automatic lu_cfg_t lu_mac(input gate_e gate0);
    lu_cfg_t c;
    c = lu_idle();
    c.in_src[0] = IN_D;   c.gate[0] = gate0;
    c.in_src[1] = IN_D;   c.gate[1] = GATE_ONE;
    c.in_src[2] = IN_FF1; c.gate[2] = GATE_ONE;
    c.col[0].top = TOP_ZERO; c.col[0].en = 3'b111;   // S13: odd number high
    c.col[1].top = TOP_ZERO; c.col[1].en = 3'b010;   // S23: two or more high
    c.reg_src[0] = REG_COL0; c.out_reg[0] = 1'b1;
    c.reg_src[1] = REG_COL1; c.out_reg[1] = 1'b1;
    return c;
  endfunction

endpackage

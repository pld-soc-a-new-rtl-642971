// logic_block: the Logic Block (LB) of a Logic Module: LU_PER_LM (five) Logic
// Units side by side. Each LU has its own configuration record and pins; the
// LB flattens their outputs into one vector, output k of LU i at bit
// i*LU_FF + k, which is the order the LM switch uses for its local signals.
// Five LUs per LB follows the architecture description. All timing is that of
// the LUs (registered outputs load on the rising clk edge).
module logic_block
  import pld_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  lu_cfg_t [LU_PER_LM-1:0]            cfg,
  input  logic    [LU_PER_LM-1:0][2:0]       d,
  input  logic    [LU_PER_LM-1:0]            g,
  input  logic    [LU_PER_LM-1:0][PSFG_COLS-1:0] cas,
  output logic    [LU_PER_LM-1:0][LU_FF-1:0] q
);

  for (genvar i = 0; i < int'(LU_PER_LM); i++) begin : g_lu
    logic_unit u_lu (
      .clk  (clk),
      .rst_n(rst_n),
      .cfg  (cfg[i]),
      .d    (d[i]),
      .g    (g[i]),
      .cas  (cas[i]),
      .q    (q[i])
    );
  end

endmodule

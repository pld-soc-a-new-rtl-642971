// lm_switch: the programmable connection switches of one Logic Module.
//
// It joins the intra-LM connection (LU and Array Block pins) and the LM's
// drivers of the inter-LM connection (outgoing tracks on each of its four
// sides). Every driven pin ("sink") is a multiplexer over the LM's local
// signals ("sources"): constants 0/1, the global lines, the incoming tracks of
// all four sides, the 15 LU outputs and the two Array Block outputs (index
// layout in pld_pkg). cfg_sel[s] is the source index of sink s. An outgoing
// track may select an incoming one, which routes a signal through the LM, so
// long connections are chains of LM hops, as in a 2D mesh.
//
// While en is low (the chip is being configured) every sink is forced to 0, so
// that a half-loaded configuration cannot close a combinational loop.
//
// A full multiplexer per sink is this design's simplest reading of the
// programmable switch points, whose exact population is not specified. Because
// any LU output may be routed back to any LU input, the static netlist of the
// fabric contains combinational paths that a lint tool sees as loops; a working
// configuration breaks them with the LU flip-flops. Purely combinational.
module lm_switch
  import pld_pkg::*;
(
  input  logic                       en,
  input  logic [NSNK-1:0][SELW-1:0]  cfg_sel,
  input  logic [NSRC-1:0]            src,
  output logic [NSNK-1:0]            snk
);

  always_comb begin
    for (int s = 0; s < int'(NSNK); s++) begin
      if (!en || int'(cfg_sel[s]) >= int'(NSRC)) snk[s] = 1'b0;
      else                                      snk[s] = src[cfg_sel[s]];
    end
  end

endmodule

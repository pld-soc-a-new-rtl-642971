// io_block: a configurable I/O block on the edge of the PLD.
//
// One pad position joined to one incoming and one outgoing inter-LM track of
// the edge Logic Module. The pad is modelled as separate in / out / output-
// enable signals (no tri-state inside the chip).
//   to_fab  = in_reg  ? pad_i registered : pad_i     (drives the LM's in-track)
//   pad_o   = out_reg ? from_fab registered : from_fab
//   pad_oe  = out_en
// The architecture names configurable I/O blocks without their contents; this
// input/output register choice and the enable are this design's own. The two
// flip-flops load on the rising clk edge and clear on rst_n low.
module io_block
  import pld_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  iob_cfg_t cfg,
  input  logic     pad_i,
  output logic     pad_o,
  output logic     pad_oe,
  input  logic     from_fab,
  output logic     to_fab
);

  logic in_q, out_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q  <= 1'b0;
      out_q <= 1'b0;
    end else begin
      in_q  <= pad_i;
      out_q <= from_fab;
    end
  end

  always_comb begin
    to_fab = cfg.in_reg  ? in_q  : pad_i;
    pad_o  = cfg.out_reg ? out_q : from_fab;
    pad_oe = cfg.out_en;
  end

endmodule

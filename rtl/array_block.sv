// array_block: the Array Block (AB) of a Logic Module.
//
// Two DEPTH-bit shift registers, each followed by a multiplexer that picks one
// of its taps. It delays bit streams between Logic Blocks so that operands and
// intermediate results of a bit-level systolic computation meet in the right
// cycle. Channel k shifts din[k] in on every rising clk edge and drives
//   dout[k] = din[k] delayed by cfg.tap[k] + 1 cycles   (1 .. DEPTH).
// Two 32-bit shift registers and two multiplexers follow the architecture
// description. Reading the multiplexer as a tap select, the per-channel delay
// setting, the reset (rst_n clears both registers asynchronously) and the
// fixed shift direction are this design's choices.
module array_block
  import pld_pkg::*;
#(
  parameter int unsigned DEPTH = AB_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ab_cfg_t          cfg,
  input  logic [AB_CH-1:0] din,
  output logic [AB_CH-1:0] dout
);

  logic [AB_CH-1:0][DEPTH-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else
      for (int k = 0; k < int'(AB_CH); k++)
        sr[k] <= {sr[k][DEPTH-2:0], din[k]};
  end

  always_comb begin
    for (int k = 0; k < int'(AB_CH); k++)
      dout[k] = (int'(cfg.tap[k]) < int'(DEPTH)) ? sr[k][cfg.tap[k]] : sr[k][DEPTH-1];
  end

endmodule

// cfg_seg: one segment of the configuration shift chain.
//
// A WIDTH-bit register that, while shift_en is high, moves one bit per rising
// clk edge from sin into bit 0 and out of bit WIDTH-1 to sout. Segments are
// chained sin -> sout to form the chip's configuration memory; after the
// whole image has been shifted in, shift_en is dropped and q holds the
// element's configuration. The register is not reset: a full image is always
// shifted in before use. Serial loading is this design's choice; the
// architecture does not describe how the device is programmed.
module cfg_seg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             shift_en,
  input  logic             sin,
  output logic             sout,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (shift_en) begin
      q <= (q << 1) | WIDTH'(sin);
    end
  end

  assign sout = q[WIDTH-1];

endmodule

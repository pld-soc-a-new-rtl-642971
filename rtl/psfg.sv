// psfg: 3-variable programmable symmetric function generator.
//
// First plane: a triangle of three two-input cells, each giving the OR of its
// inputs to the right and their AND downwards. Cell (a,b) feeds cell (a|b, c),
// whose AND output meets the first cell's AND output in the third cell. The
// three row outputs are the positive unate symmetric (threshold) functions
//   t[0] = S123 = at least one input high
//   t[1] = S23  = at least two inputs high
//   t[2] = S3   = all three inputs high.
// Second plane: COLS programmed columns. Column j starts from a top value and
// passes down the three rows; at row k it is EXOR-ed with t[k] when en[j][k]
// is set. With a top value of 0 or 1 the column can give any of the 16
// symmetric functions of three variables (tying one input to 0 gives the
// two-variable NOR, XOR, AND, OR, NAND). The top value may also be an external
// signal, so PSFGs cascade for symmetric functions of more inputs.
//
// The plane structure and the threshold rows follow the architecture
// description; two columns per PSFG follows its drawing of one PSFG slice
// (carry S23 and sum S13 of a full adder). Purely combinational.
module psfg
  import pld_pkg::*;
#(
  parameter int unsigned COLS = PSFG_COLS
) (
  input  logic [2:0]           x,      // a = x[0], b = x[1], c = x[2]
  input  logic [COLS-1:0]      top,    // top value of each column
  input  logic [COLS-1:0][2:0] en,     // EXOR connections of each column
  output logic [2:0]           t,      // first-plane threshold outputs
  output logic [COLS-1:0]      f       // column outputs
);

  // First plane: OR right, AND down.
  logic or1, and1, and2;
  always_comb begin
    or1  = x[0] | x[1];          // cell 1 (a, b)
    and1 = x[0] & x[1];
    t[0] = or1 | x[2];           // cell 2 (a+b, c)
    and2 = or1 & x[2];
    t[1] = and1 | and2;          // cell 3 (ab, (a+b)c)
    t[2] = and1 & and2;
  end

  // Second plane: one EXOR chain per column.
  always_comb begin
    for (int j = 0; j < int'(COLS); j++) begin
      logic v;
      v = top[j];
      for (int k = 0; k < 3; k++) v = v ^ (en[j][k] & t[k]);
      f[j] = v;
    end
  end

endmodule

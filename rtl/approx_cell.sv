// approx_cell: one-bit adder cell, exact or inexact.
//
// With CELL = CELL_FA it is an ordinary full adder. Any other value selects one
// of the ten inexact adder cells (AMA1-4, AXA1-3, InXA1-3); these trade a wrong
// sum or carry on some input combinations for far fewer transistors and less
// switching. The cell list comes from the design description; the Boolean
// function behind each inexact cell is this design's own choice and lives in
// dct_pkg::cell_eval().
//
// Interface: a, b, ci in; s (sum) and co (carry) out. Purely combinational.
module approx_cell
  import dct_pkg::*;
#(
  parameter cell_e CELL = CELL_FA
) (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    {co, s} = cell_eval(CELL, a, b, ci);
  end

endmodule

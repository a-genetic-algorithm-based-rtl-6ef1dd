// approx_adder: configurable inexact ripple-carry adder / subtractor.
//
// A WIDTH-bit ripple-carry chain whose NAB least significant positions use the
// inexact cell CELL and whose remaining WIDTH-NAB positions use exact full-adder
// cells. NAB = 0 gives an exact adder; NAB = WIDTH makes every position inexact.
// Replacing cells leaves the carry chain, and so the logic depth, unchanged.
//
// With SUB = 1 the block computes a - b as a + ~b + 1 (operand b inverted,
// carry-in of the lowest cell tied to 1); the same cells do the work, so the
// approximation acts on subtractions too. The result wraps modulo 2^WIDTH:
// the carry out of the top cell is dropped, which lint reports as an unused
// bit of the carry vector.
//
// Interface: a, b (WIDTH bits, two's complement) in, s out. Purely combinational;
// the pipeline registers are in the instantiating block.
module approx_adder
  import dct_pkg::*;
#(
  parameter int    WIDTH = dct_pkg::W,
  parameter int    NAB   = 0,
  parameter cell_e CELL  = CELL_INXA2,
  parameter bit    SUB   = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s
);

  if (NAB < 0 || NAB > WIDTH) begin : g_bad_nab
    $error("approx_adder: NAB must lie in 0..WIDTH");
  end

  logic [WIDTH-1:0] b_in;
  logic [WIDTH:0]   c;

  assign b_in = SUB ? ~b : b;
  assign c[0] = SUB;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    approx_cell #(.CELL(i < NAB ? CELL : CELL_FA)) u_cell (
      .a (a[i]),
      .b (b_in[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

endmodule

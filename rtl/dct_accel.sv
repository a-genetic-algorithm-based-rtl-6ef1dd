// dct_accel: approximate JPEG DCT accelerator (BC12 algorithm, 8x8 tiles).
//
// Takes one 8x8 tile of 8-bit samples of one colour channel per clock cycle
// and returns its 64 integer DCT coefficients six cycles later. Inside:
//   1. level shift: each sample p (0..255) becomes p - 128, an inversion of
//      its top bit, so every intermediate value fits a 14-bit two's-complement
//      word (largest magnitude 64 * 128 = 8192);
//   2. dct2d: row transforms, transposition wiring, column transforms, each
//      one-dimensional transform a three-stage pipeline of 14 approximate
//      adders;
//   3. hf_filter: zeroes the DISCARD highest-frequency anti-diagonals.
// The scaling by the DCT's diagonal matrix and the quantization are left to
// the quantizer of the encoder, which combines both in one table.
//
// A configuration of the accelerator is NAB (approximate bits) and CELL
// (inexact cell kind) for each of the 14 additions, plus DISCARD: the
// 2 * 14 + 1 knobs an automatic design-space exploration tunes. The defaults
// are the exact design (no approximate bits, nothing discarded).
//
// The BC12 transform, the structure, the 14-bit adders and the latency follow
// the design description. The level shift, the valid flag and the port
// layout are this design's own choices.
//
// Interface: pix[r][c] with in_valid, sampled on the rising edge of clk;
// coef[u][v] (u vertical, v horizontal frequency) with out_valid, registered,
// six cycles later. rst_n (active low, asynchronous) clears the valid flags.
// Lint notes rst_n as used both synchronously and asynchronously; that comes
// from the lockstep assertion in dct2d, not from any flop.
module dct_accel
  import dct_pkg::*;
#(
  parameter nab_vec_t  NAB     = '0,
  parameter cell_vec_t CELL    = {N_OP{4'(CELL_INXA2)}},
  parameter int        DISCARD = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pix_tile_t  pix,
  output logic       out_valid,
  output coef_tile_t coef
);

  coef_tile_t x, f;

  always_comb begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        x[r][c] = coef_t'($signed({~pix[r][c][7], pix[r][c][6:0]}));
  end

  dct2d #(.NAB(NAB), .CELL(CELL)) u_dct2d (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .out_valid(out_valid),
    .f        (f)
  );

  hf_filter #(.DISCARD(DISCARD)) u_filter (
    .f_in (f),
    .f_out(coef)
  );

endmodule

// dct2d: two-dimensional 8x8 BC12 integer DCT, F = T * X * T'.
//
// Eight dct1d blocks transform the eight rows of the input tile in parallel.
// Their results are transposed by wiring alone, and eight more dct1d blocks
// transform the resulting columns. The two stages are separated only by the
// first stage's output registers, so the block takes one whole tile per
// clock cycle and delivers it six cycles later (three per one-dimensional
// stage). All sixteen dct1d instances share one approximation configuration
// (NAB and CELL per addition), as the configuration describes the
// one-dimensional transform.
//
// The row/transpose/column structure, the full parallelism and the six-cycle
// latency follow the design description. The output orientation is this
// design's choice: f[u][v] holds vertical frequency u and horizontal
// frequency v, with f[0][0] the DC term; the column stage produces the
// transposed result, and a second wiring transpose restores this order.
// The scaling matrix of the exact DCT is not applied here; it belongs to the
// quantizer that follows in a JPEG encoder.
//
// An assertion checks that the sixteen valid pipelines stay in lockstep.
// Because it is disabled while reset is low, lint reports rst_n as used
// both synchronously and asynchronously; the flops themselves use it
// asynchronously only.
//
// Interface: x[r][c] is pixel row r, column c (already level shifted),
// sampled with in_valid; f and out_valid are registered outputs.
module dct2d
  import dct_pkg::*;
#(
  parameter nab_vec_t  NAB  = '0,
  parameter cell_vec_t CELL = {N_OP{4'(CELL_INXA2)}}
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  coef_tile_t x,
  output logic       out_valid,
  output coef_tile_t f
);

  coef_tile_t y;     // y[r][k]: row r after the first transform
  coef_tile_t yt;    // yt[c][r] = y[r][c]
  coef_tile_t z;     // z[c][u] = F[u][c]
  logic [N-1:0] row_valid, col_valid;

  for (genvar r = 0; r < N; r++) begin : g_row
    dct1d #(.NAB(NAB), .CELL(CELL)) u_row (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .x        (x[r]),
      .out_valid(row_valid[r]),
      .f        (y[r])
    );
  end

  // Transposition: wiring only.
  always_comb begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        yt[c][r] = y[r][c];
  end

  for (genvar c = 0; c < N; c++) begin : g_col
    dct1d #(.NAB(NAB), .CELL(CELL)) u_col (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (row_valid[c]),
      .x        (yt[c]),
      .out_valid(col_valid[c]),
      .f        (z[c])
    );
  end

  always_comb begin
    for (int u = 0; u < N; u++)
      for (int v = 0; v < N; v++)
        f[u][v] = z[v][u];
  end

  assign out_valid = &col_valid;

  // The sixteen valid pipelines run in lockstep; a split would mean a
  // broken instance.
  a_valid_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (row_valid == '0 || row_valid == '1) && (col_valid == '0 || col_valid == '1));

endmodule

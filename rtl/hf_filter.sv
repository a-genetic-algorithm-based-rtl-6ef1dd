// hf_filter: high-frequency filter on an 8x8 block of DCT coefficients.
//
// Coefficients of high spatial frequency carry little visible information,
// so a JPEG encoder may drop them before quantization. This block keeps
// coefficient f[u][v] when u + v < 15 - DISCARD and forces it to zero
// otherwise: DISCARD counts how many anti-diagonals of the block, starting
// from the highest-frequency corner, are discarded. DISCARD = 0 passes the
// block unchanged; DISCARD = 14 keeps only the DC term.
//
// That the filter zeroes high-frequency coefficients, and that the number of
// discarded frequencies is a tuning knob, follows the design description;
// measuring it in anti-diagonals is this design's choice. Because the mask is
// a parameter, synthesis removes the gated coefficients and the logic that
// only feeds them.
//
// Interface: combinational, f_in to f_out; adds no latency.
module hf_filter
  import dct_pkg::*;
#(
  parameter int DISCARD = 0
) (
  input  coef_tile_t f_in,
  output coef_tile_t f_out
);

  if (DISCARD < 0 || DISCARD > 2 * N - 2) begin : g_bad_discard
    $error("hf_filter: DISCARD must lie in 0..14");
  end

  always_comb begin
    for (int u = 0; u < N; u++)
      for (int v = 0; v < N; v++)
        f_out[u][v] = (u + v < 2 * N - 1 - DISCARD) ? f_in[u][v] : '0;
  end

endmodule

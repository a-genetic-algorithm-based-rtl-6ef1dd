// tb_dct2d: checks the two-dimensional transform and its six-cycle latency.
//
// An exact instance is compared with the direct product T * X * T', and an
// instance with an approximate configuration with the row/column reference
// model. Tiles of level-shifted pixels stream in on most cycles with random
// idle cycles; each result must appear six clock edges after its tile.
module tb_dct2d;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int TNAB  [14] = '{3, 1, 4, 2, 0, 3, 5, 1, 2, 6, 0, 3, 4, 2};
  localparam int TKIND [14] = '{9, 9, 2, 5, 1, 10, 3, 8, 6, 7, 4, 9, 1, 2};
  localparam int NT = 400;

  function automatic nab_vec_t pack_vec(int v [14]);
    nab_vec_t p;
    for (int i = 0; i < 14; i++) p[i] = 4'(v[i]);
    return p;
  endfunction

  logic       clk = 0, rst_n = 0, in_valid = 0;
  coef_tile_t x, fe, fa;
  logic       ve, va;
  int         checks = 0, failures = 0, cycle = 0, approx_diffs = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct2d u_exact (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                 .out_valid(ve), .f(fe));
  dct2d #(.NAB(pack_vec(TNAB)), .CELL(pack_vec(TKIND))) u_approx (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(va), .f(fa));

  int exp_e [NT][8][8];
  int exp_a [NT][8][8];
  int exp_c [NT];
  int wr = 0, rd = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard at the falling edge. A tile driven while cycle == m is taken
  // at rising edge m; its result is held after rising edge m + 5.
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (ve !== va) failures++;
      if (ve) begin
        if (rd == wr) begin
          failures++;
          $display("unexpected output at cycle %0d", cycle);
        end else begin
          checks++;
          if (cycle - exp_c[rd] != 6) begin
            failures++;
            $display("latency %0d, want 6", cycle - exp_c[rd]);
          end
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++) begin
              checks += 2;
              if (int'(fe[u][v]) != exp_e[rd][u][v]) begin
                failures++;
                if (failures < 10)
                  $display("exact F[%0d][%0d] got %0d want %0d", u, v, fe[u][v], exp_e[rd][u][v]);
              end
              if (int'(fa[u][v]) != exp_a[rd][u][v]) begin
                failures++;
                if (failures < 10)
                  $display("approx F[%0d][%0d] got %0d want %0d", u, v, fa[u][v], exp_a[rd][u][v]);
              end
              if (fa[u][v] != fe[u][v]) approx_diffs++;
            end
          rd++;
        end
      end
    end
  end

  initial begin
    tile_t  t, e, a;
    cfg14_t tn, tk;
    foreach (tn[i]) begin
      tn[i] = TNAB[i];
      tk[i] = TKIND[i];
    end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) x[r][c] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (wr < NT) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0 && wr > 4) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) begin
            // extremes first (all 0, all 255 after level shift), then random
            t[r][c] = (wr == 0) ? -128 : (wr == 1) ? 127 :
                      (wr == 2) ? (((r + c) % 2 == 1) ? 127 : -128) :
                                  $urandom_range(0, 255) - 128;
            x[r][c] = coef_t'(t[r][c]);
          end
        e = exact_dct2d(t);
        a = ref_dct2d(t, tn, tk);
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            exp_e[wr][u][v] = e[u][v];
            exp_a[wr][u][v] = a[u][v];
          end
        exp_c[wr] = cycle;
        wr++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (rd != wr) begin
      failures++;
      $display("%0d results never appeared", wr - rd);
    end
    checks++;
    if (approx_diffs == 0) failures++;
    $display("approximate coefficients differing from exact: %0d", approx_diffs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

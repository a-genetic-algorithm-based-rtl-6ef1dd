// tb_dct_accel: end-to-end test of the accelerator in an approximate
// configuration.
//
// The accelerator is built with a mixed per-addition configuration (several
// cell kinds, 0 to 6 approximate bits) and DISCARD = 3. Random 8-bit tiles
// plus the two full-scale tiles (all 0, all 255) stream in with random idle
// cycles; every output tile is compared with the reference model (level
// shift, row/column transform with the same inexact cells, anti-diagonal
// mask) and must arrive six clock edges after its input. Halfway through,
// reset is asserted with tiles in flight: those tiles must never appear.
//
// Counted and required at least once: approximate coefficients differing
// from the exact transform, coefficients zeroed by the filter, idle input
// cycles, back-to-back tiles, full-scale DC terms, in-flight tiles flushed
// by reset.
module tb_dct_accel;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int TNAB  [14] = '{4, 4, 2, 3, 0, 5, 1, 6, 2, 3, 4, 1, 2, 5};
  localparam int TKIND [14] = '{9, 3, 2, 5, 1, 10, 8, 6, 7, 4, 9, 2, 1, 3};
  localparam int DISC  = 3;
  localparam int NT    = 300;

  function automatic nab_vec_t pack_vec(int v [14]);
    nab_vec_t p;
    for (int i = 0; i < 14; i++) p[i] = 4'(v[i]);
    return p;
  endfunction

  logic       clk = 0, rst_n = 0, in_valid = 0;
  pix_tile_t  pix;
  coef_tile_t coef;
  logic       out_valid;
  int         checks = 0, failures = 0, cycle = 0;
  int         n_approx = 0, n_filtered = 0, n_idle = 0, n_b2b = 0;
  int         n_fullscale = 0, n_flushed = 0, n_tiles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct_accel #(.NAB(pack_vec(TNAB)), .CELL(pack_vec(TKIND)), .DISCARD(DISC)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pix(pix),
    .out_valid(out_valid), .coef(coef));

  int exp_f [NT][8][8];
  int exp_c [NT];
  int wr = 0, rd = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
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
            checks++;
            if (int'(coef[u][v]) != exp_f[rd][u][v]) begin
              failures++;
              if (failures < 10)
                $display("tile %0d F[%0d][%0d] got %0d want %0d",
                         rd, u, v, coef[u][v], exp_f[rd][u][v]);
            end
          end
        n_tiles++;
        rd++;
      end
    end
  end

  task automatic send_tile(int kind, inout cfg14_t tn, inout cfg14_t tk);
    tile_t t, e, a;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        pix[r][c] = (kind == 0) ? 8'd0 : (kind == 1) ? 8'd255 : 8'($urandom);
        t[r][c]   = int'(pix[r][c]) - 128;
      end
    in_valid = 1;
    e = exact_dct2d(t);
    a = ref_dct2d(t, tn, tk);
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        if (a[u][v] != e[u][v]) n_approx++;
        if (14 - (u + v) < DISC) begin
          if (a[u][v] != 0) n_filtered++;
          a[u][v] = 0;
        end
      end
    if (kind < 2 && (e[0][0] == -8192 || e[0][0] == 8128)) n_fullscale++;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) exp_f[wr][u][v] = a[u][v];
    exp_c[wr] = cycle;
    wr++;
  endtask

  initial begin
    cfg14_t tn, tk;
    bit     prev_valid;
    foreach (tn[i]) begin
      tn[i] = TNAB[i];
      tk[i] = TKIND[i];
    end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) pix[r][c] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    prev_valid = 0;
    for (int n = 0; wr < NT; n++) begin
      @(negedge clk);
      if (n == 150) begin
        // Reset with tiles in flight: drop what the pipeline holds.
        in_valid = 0;
        rst_n    = 0;
        n_flushed = wr - rd;
        wr = rd;
        @(negedge clk);
        rst_n = 1;
        prev_valid = 0;
      end else if (n > 3 && $urandom_range(0, 3) == 0) begin
        in_valid = 0;
        n_idle++;
        prev_valid = 0;
      end else begin
        send_tile(n < 2 ? n : 2, tn, tk);
        if (prev_valid) n_b2b++;
        prev_valid = 1;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (rd != wr) begin
      failures++;
      $display("%0d results never appeared", wr - rd);
    end
    $display("tiles=%0d approx_diffs=%0d filtered=%0d idle=%0d back_to_back=%0d fullscale=%0d flushed=%0d",
             n_tiles, n_approx, n_filtered, n_idle, n_b2b, n_fullscale, n_flushed);
    checks += 7;
    if (n_tiles == 0)     failures++;
    if (n_approx == 0)    failures++;
    if (n_filtered == 0)  failures++;
    if (n_idle == 0)      failures++;
    if (n_b2b == 0)       failures++;
    if (n_fullscale != 2) failures++;
    if (n_flushed == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

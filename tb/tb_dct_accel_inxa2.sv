// tb_dct_accel_inxa2: the accelerator in the configuration of the earlier
// manual study (every one of the 14 additions with 4 approximate bits of
// cell InXA2), transforming a generated 256 x 256-pixel channel.
//
// Every output tile is compared bit for bit with the reference model built
// from the same inexact cells. The testbench also measures how far the
// approximate coefficients stray from the exact transform (mean and largest
// absolute difference) and requires that the deviation is non-zero but
// stays small next to the full coefficient range of +-8192.
module tb_dct_accel_inxa2;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int IMG = 256;
  localparam int NT  = (IMG / 8) * (IMG / 8);

  logic       clk = 0, rst_n = 0, in_valid = 0;
  pix_tile_t  pix;
  coef_tile_t coef;
  logic       out_valid;
  int         checks = 0, failures = 0;
  longint     sum_abs = 0;
  int         max_abs = 0;

  always #5 clk = ~clk;

  dct_accel #(.NAB({N_OP{4'd4}}), .CELL({N_OP{4'(CELL_INXA2)}})) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pix(pix),
    .out_valid(out_valid), .coef(coef));

  int exp_a [NT][8][8];
  int exp_e [NT][8][8];
  int wr = 0, rd = 0;

  initial begin
    repeat (NT * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (rd == wr) begin
        failures++;
      end else begin
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            int d;
            checks++;
            if (int'(coef[u][v]) != exp_a[rd][u][v]) begin
              failures++;
              if (failures < 10)
                $display("tile %0d F[%0d][%0d] got %0d want %0d",
                         rd, u, v, coef[u][v], exp_a[rd][u][v]);
            end
            d = int'(coef[u][v]) - exp_e[rd][u][v];
            if (d < 0) d = -d;
            sum_abs += longint'(d);
            if (d > max_abs) max_abs = d;
          end
        rd++;
      end
    end
  end

  initial begin
    tile_t  t, e, a;
    cfg14_t tn, tk;
    int     px;
    foreach (tn[i]) begin
      tn[i] = 4;
      tk[i] = 9;   // InXA2
    end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) pix[r][c] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int ty = 0; ty < IMG / 8; ty++)
      for (int tx = 0; tx < IMG / 8; tx++) begin
        @(negedge clk);
        in_valid = 1;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) begin
            int y, x;
            y  = ty * 8 + r;
            x  = tx * 8 + c;
            // smooth shading, a bright disc and mild noise
            px = x / 2 + (((x - 128) * (x - 128) + (y - 100) * (y - 100) < 2500) ? 90 : 0)
                 + $urandom_range(0, 7);
            if (px > 255) px = 255;
            pix[r][c] = 8'(px);
            t[r][c]   = px - 128;
          end
        e = exact_dct2d(t);
        a = ref_dct2d(t, tn, tk);
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            exp_e[wr][u][v] = e[u][v];
            exp_a[wr][u][v] = a[u][v];
          end
        wr++;
      end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (rd != NT) begin
      failures++;
      $display("%0d of %0d tiles returned", rd, NT);
    end
    $display("deviation from exact: mean %0d.%03d, max %0d (coefficient range +-8192)",
             int'(sum_abs / (NT * 64)), int'((sum_abs * 1000 / (NT * 64)) % 1000), max_abs);
    checks += 2;
    if (sum_abs == 0) failures++;
    if (max_abs > 512) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dct_accel_full: the accelerator at its default parameters (the exact
// design) transforming a whole 512 x 512-pixel image, one colour channel.
//
// The image is generated in the testbench: a diagonal gradient with a
// checkerboard of sharp edges and some noise, so both low and high
// frequencies are present. Its 4096 tiles enter back to back, one per clock
// cycle; every coefficient is compared with the direct product T * X * T'
// of the level-shifted tile, and the run must end 4096 + 6 cycles after the
// first tile.
module tb_dct_accel_full;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int IMG = 512;
  localparam int NT  = (IMG / 8) * (IMG / 8);

  logic       clk = 0, rst_n = 0, in_valid = 0;
  pix_tile_t  pix;
  coef_tile_t coef;
  logic       out_valid;
  int         checks = 0, failures = 0, cycle = 0;
  int         first_in = -1, last_out = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct_accel u_dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pix(pix),
                   .out_valid(out_valid), .coef(coef));

  int image [IMG][IMG];
  int exp_f [NT][8][8];
  int wr = 0, rd = 0;

  initial begin
    repeat (10000) @(posedge clk);
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
            checks++;
            if (int'(coef[u][v]) != exp_f[rd][u][v]) begin
              failures++;
              if (failures < 10)
                $display("tile %0d F[%0d][%0d] got %0d want %0d",
                         rd, u, v, coef[u][v], exp_f[rd][u][v]);
            end
          end
        rd++;
        last_out = cycle;
      end
    end
  end

  initial begin
    tile_t t, e;
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        image[y][x] = (x + y) / 4 + ((((x / 4) + (y / 4)) % 2 == 1) ? 60 : 0)
                      + $urandom_range(0, 15);
        if (image[y][x] > 255) image[y][x] = 255;
      end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) pix[r][c] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int ty = 0; ty < IMG / 8; ty++)
      for (int tx = 0; tx < IMG / 8; tx++) begin
        @(negedge clk);
        if (first_in < 0) first_in = cycle;
        in_valid = 1;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) begin
            pix[r][c] = 8'(image[ty * 8 + r][tx * 8 + c]);
            t[r][c]   = image[ty * 8 + r][tx * 8 + c] - 128;
          end
        e = exact_dct2d(t);
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) exp_f[wr][u][v] = e[u][v];
        wr++;
      end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (rd != NT) begin
      failures++;
      $display("%0d of %0d tiles returned", rd, NT);
    end
    // one tile per cycle: last result 6 edges after the last tile
    checks++;
    if (last_out - first_in != NT - 1 + 6) begin
      failures++;
      $display("throughput: %0d cycles from first input to last output, want %0d",
               last_out - first_in, NT - 1 + 6);
    end
    $display("image %0dx%0d: %0d tiles in %0d cycles", IMG, IMG, rd, last_out - first_in + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

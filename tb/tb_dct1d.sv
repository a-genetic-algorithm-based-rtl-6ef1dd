// tb_dct1d: checks the pipelined one-dimensional BC12 transform.
//
// Two instances run side by side on the same input stream: one exact (all
// NAB = 0), compared with the direct matrix product f = T * x, and one with a
// mixed approximate configuration, compared with the reference dataflow
// model. Inputs arrive on most cycles with random idle cycles between them;
// every result must appear exactly three cycles after its input.
module tb_dct1d;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int TNAB  [14] = '{2, 3, 0, 4, 1, 5, 2, 6, 3, 0, 4, 2, 5, 7};
  localparam int TKIND [14] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 9, 3, 2, 8};

  function automatic nab_vec_t pack_vec(int v [14]);
    nab_vec_t p;
    for (int i = 0; i < 14; i++) p[i] = 4'(v[i]);
    return p;
  endfunction

  localparam nab_vec_t  A_NAB  = pack_vec(TNAB);
  localparam cell_vec_t A_CELL = pack_vec(TKIND);

  logic  clk = 0, rst_n = 0, in_valid = 0;
  coef_t x [N];
  coef_t fe [N], fa [N];
  logic  ve, va;
  int    checks = 0, failures = 0, cycle = 0, approx_diffs = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct1d u_exact (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                 .out_valid(ve), .f(fe));
  dct1d #(.NAB(A_NAB), .CELL(A_CELL)) u_approx (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(va), .f(fa));

  // Expected results in input order: written by the stimulus, read by the
  // scoreboard.
  int exp_e [4096][8];
  int exp_a [4096][8];
  int exp_c [4096];
  int wr = 0, rd = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard, sampled at the falling edge, away from the registers.
  // An input driven while cycle == m is captured by the first register bank at
  // rising edge m; the third bank holds the result after rising edge m + 2,
  // when cycle == m + 3: three clock edges of latency.
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
          if (cycle - exp_c[rd] != 3) begin
            failures++;
            $display("latency %0d, want 3", cycle - exp_c[rd]);
          end
          for (int k = 0; k < 8; k++) begin
            checks += 2;
            if (int'(fe[k]) != exp_e[rd][k]) begin
              failures++;
              $display("exact f%0d got %0d want %0d", k, fe[k], exp_e[rd][k]);
            end
            if (int'(fa[k]) != exp_a[rd][k]) begin
              failures++;
              $display("approx f%0d got %0d want %0d", k, fa[k], exp_a[rd][k]);
            end
            if (fa[k] != fe[k]) approx_diffs++;
          end
          rd++;
        end
      end
    end
  end

  initial begin
    vec8_t  v, e, a;
    cfg14_t tn, tk;
    foreach (tn[i]) begin
      tn[i] = TNAB[i];
      tk[i] = TKIND[i];
    end
    for (int k = 0; k < 8; k++) x[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0 && n > 10) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        for (int k = 0; k < 8; k++) begin
          // level-shifted pixels, then a few vectors at the full row range
          v[k] = (n < 4) ? ((n % 2 == 1) ? 127 : -128) :
                 (n < 2000) ? $urandom_range(0, 255) - 128 :
                              $urandom_range(0, 2040) - 1020;
          x[k] = coef_t'(v[k]);
        end
        for (int kk = 0; kk < 8; kk++) begin
          e[kk] = 0;
          for (int j = 0; j < 8; j++) e[kk] += t_bc12(kk, j) * v[j];
        end
        a = ref_dct1d(v, tn, tk);
        for (int k = 0; k < 8; k++) begin
          exp_e[wr][k] = e[k];
          exp_a[wr][k] = a[k];
        end
        exp_c[wr] = cycle;
        wr++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
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

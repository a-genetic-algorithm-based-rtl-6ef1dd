// tb_hf_filter: checks the coefficient mask for several filter settings.
//
// Instances with DISCARD = 0, 1, 5 and 14 receive the same random blocks.
// A coefficient must pass unchanged when fewer than DISCARD anti-diagonals
// lie at or beyond it (counted from the corner f[7][7]) and be zero
// otherwise; the number of kept coefficients is checked against a count
// made by hand for each setting.
module tb_hf_filter;
  import dct_pkg::*;

  localparam int ND = 4;
  localparam int DISC [ND] = '{0, 1, 5, 14};
  // kept coefficients: 64, 64 - 1, 64 - (1+2+3+4+5), 1
  localparam int KEPT [ND] = '{64, 63, 49, 1};

  coef_tile_t fin;
  coef_tile_t fout [ND];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < ND; k++) begin : g_dut
    hf_filter #(.DISCARD(DISC[k])) u_dut (.f_in(fin), .f_out(fout[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kept;
    for (int n = 0; n < 200; n++) begin
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          fin[u][v] = coef_t'($urandom_range(1, 16383));   // never zero
        end
      #1;
      for (int k = 0; k < ND; k++) begin
        kept = 0;
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            // anti-diagonals from the corner: index 14 - (u + v)
            checks++;
            if (14 - (u + v) < DISC[k]) begin
              if (fout[k][u][v] != '0) failures++;
            end else begin
              if (fout[k][u][v] != fin[u][v]) failures++;
            end
          end
        kept = 0;
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++)
            if (fout[k][u][v] != '0) kept++;
        checks++;
        if (kept != KEPT[k]) begin
          failures++;
          $display("DISCARD=%0d kept %0d, want %0d", DISC[k], kept, KEPT[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

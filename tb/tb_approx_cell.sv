// tb_approx_cell: exhaustive check of every adder cell kind.
//
// Instantiates approx_cell once per cell kind, applies all eight input
// combinations and compares sum and carry with truth tables written out in
// dct_ref_pkg.
module tb_approx_cell;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int NC = 11;

  logic          a, b, ci;
  logic [NC-1:0] s, co;
  int            checks = 0, failures = 0;

  for (genvar k = 0; k < NC; k++) begin : g_cell
    approx_cell #(.CELL(cell_e'(k))) u_dut (.a(a), .b(b), .ci(ci), .s(s[k]), .co(co[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] t;
    int          inexact;
    for (int n = 0; n < 8; n++) begin
      {a, b, ci} = 3'(n);
      #1;
      for (int k = 0; k < NC; k++) begin
        t = cell_tab(k);
        checks++;
        if (s[k] !== t[n] || co[k] !== t[8 + n]) begin
          failures++;
          $display("cell %0d inputs %03b: got s=%b co=%b, want s=%b co=%b",
                   k, n[2:0], s[k], co[k], t[n], t[8 + n]);
        end
      end
    end
    // Every inexact cell must differ from the full adder somewhere.
    for (int k = 1; k < NC; k++) begin
      inexact = 0;
      for (int n = 0; n < 8; n++) begin
        t = cell_tab(k);
        if (t[n] != cell_tab(0)[n] || t[8 + n] != cell_tab(0)[8 + n]) inexact++;
      end
      checks++;
      if (inexact == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

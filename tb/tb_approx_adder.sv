// tb_approx_adder: random and corner-case check of approx_adder.
//
// Seven instances cover exact add and subtract, partial approximation with
// several cell kinds, and the fully approximate adder. Each output is
// compared with the bit-serial reference model in dct_ref_pkg; the exact
// instances are also compared with ordinary integer arithmetic.
module tb_approx_adder;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int NI = 7;
  localparam int NABS  [NI] = '{0, 0, 4, 6, 3, 14, 8};
  localparam int KINDS [NI] = '{0, 0, 9, 3, 5, 8, 7};
  localparam bit SUBS  [NI] = '{0, 1, 0, 1, 1, 0, 1};

  logic [13:0] a, b;
  logic [13:0] s [NI];
  int checks = 0, failures = 0, approx_diffs = 0;

  for (genvar k = 0; k < NI; k++) begin : g_dut
    approx_adder #(.WIDTH(14), .NAB(NABS[k]), .CELL(cell_e'(KINDS[k])), .SUB(SUBS[k]))
      u_dut (.a(a), .b(b), .s(s[k]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    int want, ai, bi, exact;
    ai = int'($signed(a));
    bi = int'($signed(b));
    for (int k = 0; k < NI; k++) begin
      want = ref_add(ai, bi, SUBS[k], NABS[k], KINDS[k]);
      checks++;
      if (int'($signed(s[k])) != want) begin
        failures++;
        if (failures < 10)
          $display("inst %0d a=%0d b=%0d: got %0d want %0d", k, ai, bi, $signed(s[k]), want);
      end
      exact = SUBS[k] ? ai - bi : ai + bi;
      exact = int'($signed(14'(exact)));
      if (NABS[k] == 0) begin
        checks++;
        if (int'($signed(s[k])) != exact) failures++;
      end else if (int'($signed(s[k])) != exact) begin
        approx_diffs++;
      end
    end
  endtask

  initial begin
    a = '0; b = '0; #1 check_all();
    a = '1; b = '1; #1 check_all();
    a = 14'h1FFF; b = 14'h2000; #1 check_all();
    for (int n = 0; n < 5000; n++) begin
      a = 14'($urandom);
      b = 14'($urandom);
      #1 check_all();
    end
    // The inexact instances must actually deviate from exact arithmetic.
    checks++;
    if (approx_diffs == 0) failures++;
    $display("approximate results differing from exact: %0d", approx_diffs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

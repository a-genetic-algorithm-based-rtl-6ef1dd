// dct1d: pipelined eight-point BC12 integer DCT built from approximate adders.
//
// Computes, for the input vector x0..x7,
//   f0 = x0+x1+x2+x3+x4+x5+x6+x7      f1 = x0-x7
//   f2 = x0-x1-x2+x3+x4-x5-x6+x7      f3 = x4-x3
//   f4 = x0-x3-x4+x7                  f5 = x5-x2
//   f6 = x2-x1+x5-x6                  f7 = x6-x1
// with 14 additions arranged in three pipeline stages that share the
// butterfly terms:
//   stage 1  op0  a0 = x0+x7   op1 a1 = x1+x6   op2 a2 = x2+x5   op3 a3 = x3+x4
//            op4  f1 = x0-x7   op5 f3 = x4-x3   op6 f5 = x5-x2   op7 f7 = x6-x1
//   stage 2  op8  b0 = a0+a3   op9 b1 = a1+a2   op10 f4 = a0-a3  op11 f6 = a2-a1
//   stage 3  op12 f0 = b0+b1   op13 f2 = b0-b1
// Operation i is an approx_adder with NAB[i] approximate bits of cell kind
// CELL[i]. A register bank follows every stage, so a result leaves three
// clock cycles after its input, and a new vector is accepted every cycle.
// Results already final in stage 1 or 2 ride along in the later registers.
//
// The equations, the 14-bit adders, the three-stage pipeline and its latency
// follow the design description; the grouping of the additions into stages,
// the valid flag and the active-low reset of that flag are this design's own.
//
// Interface: x[8] and in_valid sampled on the rising clock edge; f[8] and
// out_valid registered. rst_n clears only the valid pipeline.
module dct1d
  import dct_pkg::*;
#(
  parameter nab_vec_t  NAB  = '0,
  parameter cell_vec_t CELL = {N_OP{4'(CELL_INXA2)}}
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  coef_t     x [N],
  output logic      out_valid,
  output coef_t     f [N]
);

  // ---- stage 1: butterflies ------------------------------------------------
  logic [W-1:0] s1 [8];

  // {operand a index, operand b index, subtract} of each stage-1 operation
  localparam int S1_A [8] = '{0, 1, 2, 3, 0, 4, 5, 6};
  localparam int S1_B [8] = '{7, 6, 5, 4, 7, 3, 2, 1};
  localparam bit S1_S [8] = '{0, 0, 0, 0, 1, 1, 1, 1};

  for (genvar i = 0; i < 8; i++) begin : g_s1
    approx_adder #(
      .WIDTH(W), .NAB(int'(NAB[i])), .CELL(cell_e'(CELL[i])), .SUB(S1_S[i])
    ) u_add (
      .a(x[S1_A[i]]), .b(x[S1_B[i]]), .s(s1[i])
    );
  end

  // a0..a3 = r1[0..3]; f1, f3, f5, f7 = r1[4..7]
  coef_t r1 [8];
  logic  v1;

  always_ff @(posedge clk) begin
    for (int i = 0; i < 8; i++) r1[i] <= coef_t'(s1[i]);
  end

  // ---- stage 2: second butterfly level --------------------------------------
  logic [W-1:0] s2 [4];

  approx_adder #(.WIDTH(W), .NAB(int'(NAB[8])),  .CELL(cell_e'(CELL[8])),  .SUB(1'b0))
    u_op8  (.a(r1[0]), .b(r1[3]), .s(s2[0]));   // b0 = a0 + a3
  approx_adder #(.WIDTH(W), .NAB(int'(NAB[9])),  .CELL(cell_e'(CELL[9])),  .SUB(1'b0))
    u_op9  (.a(r1[1]), .b(r1[2]), .s(s2[1]));   // b1 = a1 + a2
  approx_adder #(.WIDTH(W), .NAB(int'(NAB[10])), .CELL(cell_e'(CELL[10])), .SUB(1'b1))
    u_op10 (.a(r1[0]), .b(r1[3]), .s(s2[2]));   // f4 = a0 - a3
  approx_adder #(.WIDTH(W), .NAB(int'(NAB[11])), .CELL(cell_e'(CELL[11])), .SUB(1'b1))
    u_op11 (.a(r1[2]), .b(r1[1]), .s(s2[3]));   // f6 = a2 - a1

  coef_t b0_q, b1_q, f1_q2, f3_q2, f4_q2, f5_q2, f6_q2, f7_q2;
  logic  v2;

  always_ff @(posedge clk) begin
    b0_q  <= coef_t'(s2[0]);
    b1_q  <= coef_t'(s2[1]);
    f4_q2 <= coef_t'(s2[2]);
    f6_q2 <= coef_t'(s2[3]);
    f1_q2 <= r1[4];
    f3_q2 <= r1[5];
    f5_q2 <= r1[6];
    f7_q2 <= r1[7];
  end

  // ---- stage 3: DC and f2 ---------------------------------------------------
  logic [W-1:0] s3 [2];

  approx_adder #(.WIDTH(W), .NAB(int'(NAB[12])), .CELL(cell_e'(CELL[12])), .SUB(1'b0))
    u_op12 (.a(b0_q), .b(b1_q), .s(s3[0]));     // f0 = b0 + b1
  approx_adder #(.WIDTH(W), .NAB(int'(NAB[13])), .CELL(cell_e'(CELL[13])), .SUB(1'b1))
    u_op13 (.a(b0_q), .b(b1_q), .s(s3[1]));     // f2 = b0 - b1

  always_ff @(posedge clk) begin
    f[0] <= coef_t'(s3[0]);
    f[1] <= f1_q2;
    f[2] <= coef_t'(s3[1]);
    f[3] <= f3_q2;
    f[4] <= f4_q2;
    f[5] <= f5_q2;
    f[6] <= f6_q2;
    f[7] <= f7_q2;
  end

  // ---- valid pipeline ---------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
    end
  end

endmodule

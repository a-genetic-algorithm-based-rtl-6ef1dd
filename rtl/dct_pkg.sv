// dct_pkg: types and constants shared by the approximate BC12 DCT accelerator.
//
// The accelerator computes the multiplier-less BC12 8x8 integer DCT with adders
// whose least significant bits may be produced by inexact adder cells (IACs).
// Every one of the 14 additions of the one-dimensional transform has two knobs:
// the number of approximate bits (NAB) and the kind of inexact cell. These two
// knobs per addition, plus the number of discarded high frequencies, make up one
// configuration of the design.
//
// Data words are 14 bits wide, as are the adders. The cell list (a full adder
// and ten inexact cells from three families) follows the design description;
// the Boolean functions of the inexact cells are not part of it and are this
// design's own stand-ins, collected in cell_eval() so they can be replaced in
// one place.
package dct_pkg;

  // Width of every adder and of every coefficient word.
  localparam int W = 14;
  // Number of additions in one BC12 one-dimensional transform.
  localparam int N_OP = 14;
  // Transform size.
  localparam int N = 8;

  typedef logic signed [W-1:0] coef_t;
  typedef coef_t coef_vec_t [N];
  typedef coef_t coef_tile_t [N][N];
  typedef logic [7:0] pixel_t;
  typedef pixel_t pix_tile_t [N][N];

  // Adder cell kinds. FA is the exact full-adder cell.
  typedef enum logic [3:0] {
    CELL_FA    = 4'd0,
    CELL_AMA1  = 4'd1,
    CELL_AMA2  = 4'd2,
    CELL_AMA3  = 4'd3,
    CELL_AMA4  = 4'd4,
    CELL_AXA1  = 4'd5,
    CELL_AXA2  = 4'd6,
    CELL_AXA3  = 4'd7,
    CELL_INXA1 = 4'd8,
    CELL_INXA2 = 4'd9,
    CELL_INXA3 = 4'd10
  } cell_e;

  // Per-addition configuration vectors; element i configures addition i of
  // the one-dimensional transform (see dct1d for the numbering).
  typedef logic [N_OP-1:0][3:0] nab_vec_t;
  typedef logic [N_OP-1:0][3:0] cell_vec_t;

  // Transistor count of each cell kind, used by the reward estimate:
  // saved = sum_i nab_i * (T_FA - T_cell_i).
  function automatic int unsigned cell_transistors(cell_e c);
    case (c)
      CELL_FA:    return 58;
      CELL_AMA1:  return 20;
      CELL_AMA2:  return 14;
      CELL_AMA3:  return 11;
      CELL_AMA4:  return 14;
      CELL_AXA1:  return 8;
      CELL_AXA2:  return 6;
      CELL_AXA3:  return 8;
      CELL_INXA1: return 6;
      CELL_INXA2: return 8;
      CELL_INXA3: return 6;
      default:    return 58;
    endcase
  endfunction

  // One-bit cell function: returns {cout, sum}.
  function automatic logic [1:0] cell_eval(cell_e c, logic a, logic b, logic ci);
    logic maj, x;
    maj = (a & b) | (a & ci) | (b & ci);
    x   = a ^ b;
    case (c)
      CELL_FA:    return {maj, x ^ ci};
      // Mirror-adder family: fewer transistors in the sum / carry stacks.
      CELL_AMA1:  return {b | (a & ci), (a & b & ci) | (~(b | (a & ci)) & ci)};
      CELL_AMA2:  return {maj, ~maj};
      CELL_AMA3:  return {b | (a & ci), ~(b | (a & ci))};
      CELL_AMA4:  return {a, (~a & (b | ci)) | (a & b & ci)};
      // XOR/XNOR-based family: sum from the XNOR of the operands.
      CELL_AXA1:  return {a, ~x};
      CELL_AXA2:  return {x ? ci : a, ~x};
      CELL_AXA3:  return {x ? ci : a, ci & ~x};
      // Inexact-adder family: carry taken straight from one operand.
      CELL_INXA1: return {a, x};
      CELL_INXA2: return {a, ci};
      CELL_INXA3: return {a, b ^ ci};
      default:    return {maj, x ^ ci};
    endcase
  endfunction

endpackage

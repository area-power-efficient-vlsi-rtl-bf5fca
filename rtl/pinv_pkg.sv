// pinv_pkg: types and constants shared by the pseudo-inverse datapath.
//
// Data words are 16Q8 two's-complement numbers (1 sign bit, 7 integer bits,
// 8 fraction bits), the number system of the design. A complex entry of the
// pre-/post-array is a packed pair {re, im} of such words (32 bits).
// CORDIC angles use their own 16-bit format with 13 fraction bits (radians,
// range about +-4 rad); that format is a choice of this implementation.
// The array geometry defaults to a 4x4 MIMO system (M = N = 4).
package pinv_pkg;

  localparam int unsigned DW    = 16;  // data word width (16Q8)
  localparam int unsigned DFRAC = 8;   // data fraction bits
  localparam int unsigned AW    = 16;  // angle word width
  localparam int unsigned AFRAC = 13;  // angle fraction bits
  localparam int unsigned NCELL = 13;  // CORDIC micro-cells
  localparam int unsigned GUARD = 2;   // extra integer bits inside the CORDIC
  localparam int unsigned FGUARD = 4;  // extra fraction bits inside the CORDIC

  localparam int unsigned M_TX = 4;    // transmit antennas (columns of H)
  localparam int unsigned N_RX = 4;    // receive antennas (rows of H)

  typedef logic signed [DW-1:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  typedef enum logic {
    VECTORING = 1'b0,
    ROTATION  = 1'b1
  } cordic_mode_e;

  // Direction controls of one micro-cell.
  //   cw    : 1 = rotate (x,y) clockwise by atan(2^-i), 0 = counter-clockwise
  //   z_add : 1 = z + atan(2^-i), 0 = z - atan(2^-i)
  typedef struct packed {
    logic cw;
    logic z_add;
  } cell_ctrl_t;

  // Elementary angle atan(2^-i) in the angle format: round(atan(2^-i) * 2^13).
  function automatic logic signed [AW-1:0] atan_const(int unsigned i);
    case (i)
      0:  return 16'sd6434;
      1:  return 16'sd3798;
      2:  return 16'sd2007;
      3:  return 16'sd1019;
      4:  return 16'sd511;
      5:  return 16'sd256;
      6:  return 16'sd128;
      7:  return 16'sd64;
      8:  return 16'sd32;
      9:  return 16'sd16;
      10: return 16'sd8;
      11: return 16'sd4;
      12: return 16'sd2;
      default: return 16'sd0;  // no elementary angle is used past cell 12
    endcase
  endfunction

  // Q16 product/accumulator (32 bits) back to a 16Q8 word: round half up,
  // then saturate.
  function automatic word_t q16_to_word(logic signed [2*DW-1:0] a);
    logic signed [2*DW-1:0] r;
    r = (a + (2*DW)'(1 <<< (DFRAC-1))) >>> DFRAC;
    if (r > (2*DW)'(32767))       return word_t'(16'sh7fff);
    else if (r < -(2*DW)'(32768)) return word_t'(16'sh8000);
    else                          return word_t'(r);
  endfunction

endpackage

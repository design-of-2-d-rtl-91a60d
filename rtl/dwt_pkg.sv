// dwt_pkg: types and constants shared by the 2-D DWT processor.
//
// The processor transforms a square grey-scale image in place with the
// lifting form of either the reversible 5/3 wavelet or the 9/7 wavelet.
// Sample words in the RAM are COEF_W-bit two's-complement integers. Inside
// the 1-D lifting unit the 9/7 path carries FRAC fractional bits; the 9/7
// lifting constants are held as signed Q1.CF fixed-point numbers.
//
// The four 9/7 lifting constants are the standard JPEG 2000 values
// (alpha = -1.586134342, beta = -0.052980118, gamma = 0.882911075,
// delta = 0.443506852), each multiplied by 2**CF and rounded to the nearest
// integer. The word widths and fixed-point formats are this design's own
// choice.
package dwt_pkg;

  localparam int PIX_W  = 8;   // input pixel width (grey scale)
  localparam int COEF_W = 16;  // RAM / coefficient word width
  localparam int ACC_W  = 32;  // lifting datapath width
  localparam int FRAC   = 8;   // fractional bits of the 9/7 datapath
  localparam int CF     = 14;  // fractional bits of the 9/7 constants

  localparam logic signed [15:0] K_ALPHA = -16'sd25987;
  localparam logic signed [15:0] K_BETA  = -16'sd868;
  localparam logic signed [15:0] K_GAMMA =  16'sd14466;
  localparam logic signed [15:0] K_DELTA =  16'sd7266;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Wavelet filter selected at initialisation.
  typedef enum logic {
    FILT_53 = 1'b0,  // reversible 5/3
    FILT_97 = 1'b1   // 9/7
  } filter_e;

  // Bus register map (word addresses).
  typedef enum logic [1:0] {
    REG_CTRL   = 2'd0,  // write: bit0 = start; read: status
    REG_CONFIG = 2'd1,  // bit0 = filter, bits 3:1 = number of levels
    REG_PIXEL  = 2'd2,  // write: pixel into RAM at the pointer, pointer++
    REG_ADDR   = 2'd3   // write/read: pixel pointer
  } reg_addr_e;

  // Rounded arithmetic right shift of a product by CF bits.
  function automatic acc_t mul_const(input acc_t x, input logic signed [15:0] k);
    logic signed [ACC_W+15:0] p;
    p = (ACC_W+16)'(x) * (ACC_W+16)'(k);
    p = p + (ACC_W+16)'(1 << (CF - 1));
    return acc_t'(p >>> CF);
  endfunction

  // Clamp a datapath value to a RAM word.
  function automatic coef_t sat_coef(input acc_t x);
    if (x > acc_t'(32767))       return coef_t'(32767);
    else if (x < acc_t'(-32768)) return coef_t'(-32768);
    else                         return coef_t'(x);
  endfunction

endpackage

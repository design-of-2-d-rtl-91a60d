// band_h_proc: lifting step that produces the high-pass (detail, H band)
// coefficients.
//
// A detail step updates one odd-indexed sample from its two even-indexed
// neighbours. For the 5/3 wavelet this is the predict step
//   Y[2n+1] = X[2n+1] - floor((X[2n] + X[2n+2]) / 2),
// for the 9/7 wavelet it is the first (alpha) or third (gamma) step
//   Y[2n+1] = Y[2n+1] + k * (Y[2n] + Y[2n+2]),  k = alpha or gamma,
// where the product is taken in fixed point (constant Q1.CF, rounded to the
// nearest datapath LSB). The equations follow the lifting scheme; the
// floor rounding of the 5/3 halving and the fixed-point formats are this
// design's choice.
//
// Interface: purely combinational. center = odd sample, left/right = the
// even neighbours (the caller applies the symmetric boundary extension).
// second_step selects gamma instead of alpha in 9/7 mode; it is ignored in
// 5/3 mode.
module band_h_proc
  import dwt_pkg::*;
(
  input  filter_e filter,
  input  logic    second_step,
  input  acc_t    center,
  input  acc_t    left,
  input  acc_t    right,
  output acc_t    result
);

  acc_t sum;

  always_comb begin
    sum = left + right;
    if (filter == FILT_53)
      result = center - (sum >>> 1);
    else
      result = center + mul_const(sum, second_step ? K_GAMMA : K_ALPHA);
  end

endmodule

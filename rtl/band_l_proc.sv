// band_l_proc: lifting step that produces the low-pass (approximation,
// L band) coefficients.
//
// An approximation step updates one even-indexed sample from its two
// odd-indexed (detail) neighbours. For the 5/3 wavelet this is the update
// step
//   Z[2n] = X[2n] + floor((Y[2n-1] + Y[2n+1]) / 4),
// for the 9/7 wavelet it is the second (beta) or fourth (delta) step
//   Y[2n] = Y[2n] + k * (Y[2n-1] + Y[2n+1]),  k = beta or delta,
// with the product in fixed point (constant Q1.CF, rounded). The equations
// follow the lifting scheme; the floor rounding of the 5/3 quarter weight
// and the fixed-point formats are this design's choice.
//
// Interface: purely combinational. center = even sample, left/right = the
// odd neighbours (symmetric extension done by the caller). second_step
// selects delta instead of beta in 9/7 mode; ignored in 5/3 mode.
module band_l_proc
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
      result = center + (sum >>> 2);
    else
      result = center + mul_const(sum, second_step ? K_DELTA : K_BETA);
  end

endmodule

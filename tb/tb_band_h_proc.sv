// tb_band_h_proc: checks the H-band (detail) lifting step against
// independently computed values: the 5/3 predict step with floor halving
// (exact), and the 9/7 alpha and gamma steps against the real-valued
// constants (tolerance: one LSB plus the constant's quantisation error).
module tb_band_h_proc;
  import dwt_pkg::*;

  filter_e filter;
  logic    second_step;
  acc_t    center, left, right, result;
  int checks = 0, failures = 0;

  band_h_proc dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k, expect_r, tol;
    longint expect_i;
    for (int t = 0; t < 3000; t++) begin
      filter      = filter_e'(t % 2);
      second_step = 1'((t / 2) % 2);
      center = acc_t'($signed($urandom_range(0, 2_000_000)) - 1_000_000);
      left   = acc_t'($signed($urandom_range(0, 2_000_000)) - 1_000_000);
      right  = acc_t'($signed($urandom_range(0, 2_000_000)) - 1_000_000);
      #1;
      checks++;
      if (filter == FILT_53) begin
        expect_i = longint'(center) - longint'($floor((real'(left) + real'(right)) / 2.0));
        if (longint'(result) != expect_i) begin
          failures++;
          $display("FAIL 5/3 c=%0d l=%0d r=%0d got %0d exp %0d", center, left, right, result, expect_i);
        end
      end else begin
        k = second_step ? 0.882911075 : -1.586134342;
        expect_r = real'(center) + k * (real'(left) + real'(right));
        tol = 1.0 + (real'(left) + real'(right)) * (real'(left) + real'(right) < 0 ? -1.0 : 1.0) / 32768.0;
        if ((real'(result) - expect_r) > tol || (expect_r - real'(result)) > tol) begin
          failures++;
          $display("FAIL 9/7 step=%0d got %0d exp %f", second_step, result, expect_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

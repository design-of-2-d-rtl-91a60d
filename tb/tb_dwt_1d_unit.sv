// tb_dwt_1d_unit: sends lines of length 2, 4, 6, 16 and 64 through the 1-D
// lifting unit in both filter modes and compares the low-band-then-high-band
// output with a reference computed here: integer 5/3 lifting (exact) and
// double-precision 9/7 lifting (within one LSB). Symmetric extension at
// both ends is exercised by every line. It also checks the timing: the
// first output P*len/2 + 2 cycles after the last input (P = 2 or 4), len
// consecutive output cycles, and in_ready low from the line's end until
// the output has finished.
module tb_dwt_1d_unit;
  import dwt_pkg::*;
  localparam int MAX_LEN = 64;

  logic       clk = 1'b0, rst;
  filter_e    filter;
  logic [6:0] len;
  logic       in_valid, in_ready, out_valid;
  coef_t      in_data, out_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  dwt_1d_unit #(.MAX_LEN(MAX_LEN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic void ref_line(input bit f97, input int n, ref int x[MAX_LEN],
                                   ref real y[MAX_LEN]);
    real e[MAX_LEN/2], o[MAX_LEN/2];
    int ie[MAX_LEN/2], io[MAX_LEN/2];
    int h = n / 2;
    if (!f97) begin
      for (int i = 0; i < h; i++) begin
        int r = (i + 1 < h) ? x[2*i + 2] : x[2*i];
        io[i] = x[2*i + 1] - int'($floor((real'(x[2*i]) + real'(r)) / 2.0));
      end
      for (int i = 0; i < h; i++)
        ie[i] = x[2*i] + int'($floor((real'((i > 0) ? io[i-1] : io[0]) + real'(io[i])) / 4.0));
      for (int i = 0; i < h; i++) begin y[i] = ie[i]; y[h+i] = io[i]; end
    end else begin
      for (int i = 0; i < h; i++) begin e[i] = x[2*i]; o[i] = x[2*i+1]; end
      for (int i = 0; i < h; i++) o[i] += -1.586134342 * (e[i] + ((i + 1 < h) ? e[i+1] : e[i]));
      for (int i = 0; i < h; i++) e[i] += -0.052980118 * (((i > 0) ? o[i-1] : o[0]) + o[i]);
      for (int i = 0; i < h; i++) o[i] +=  0.882911075 * (e[i] + ((i + 1 < h) ? e[i+1] : e[i]));
      for (int i = 0; i < h; i++) e[i] +=  0.443506852 * (((i > 0) ? o[i-1] : o[0]) + o[i]);
      for (int i = 0; i < h; i++) begin y[i] = e[i]; y[h+i] = o[i]; end
    end
  endfunction

  task automatic do_line(input bit f97, input int n);
    int x[MAX_LEN];
    real y[MAX_LEN];
    int t_last, t_first, k;
    real err;
    for (int i = 0; i < n; i++) x[i] = $urandom_range(0, 255) - (f97 ? 0 : 128) * (i % 3 == 0 ? 1 : 0);
    ref_line(f97, n, x, y);
    filter = f97 ? FILT_97 : FILT_53;
    len    = 7'(n);
    @(negedge clk);
    chk(in_ready, "ready at line start");
    for (int i = 0; i < n; i++) begin
      in_valid = 1'b1; in_data = coef_t'(x[i]);
      @(posedge clk);
      t_last = cyc;
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (!out_valid) begin
      chk(!in_ready, "not ready while computing");
      @(negedge clk);
    end
    t_first = cyc;
    chk(t_first - t_last == (f97 ? 4 : 2) * n / 2 + 2, $sformatf("latency %0d", t_first - t_last));
    for (k = 0; k < n; k++) begin
      chk(out_valid, "output contiguous");
      err = real'(out_data) - y[k];
      if (err < 0) err = -err;
      chk(err <= (f97 ? 1.0 : 0.0), $sformatf("f97=%0d n=%0d k=%0d got %0d exp %f", f97, n, k, out_data, y[k]));
      @(negedge clk);
    end
    chk(!out_valid && in_ready, "back to load after output");
  endtask

  initial begin
    int lens[5] = '{2, 4, 6, 16, 64};
    rst = 1'b1; in_valid = 1'b0; in_data = '0; filter = FILT_53; len = 7'd64;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int rep = 0; rep < 4; rep++)
      foreach (lens[i]) begin
        do_line(1'b0, lens[i]);
        do_line(1'b1, lens[i]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

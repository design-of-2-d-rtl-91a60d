// tb_dwt2d_top: end-to-end test of the 2-D DWT processor at its default
// size (64 x 64 image, up to 6 levels).
//
// A synthetic 8-bit test image (smooth shading plus texture and a sharp
// edge) is loaded through the bus, a decomposition is started and the
// complete coefficient image is drained from the output port. A software
// model in this file computes the expected coefficients independently:
// exact integer lifting for 5/3, double-precision lifting rounded to an
// integer after every 1-D line (as the processor stores integers) for 9/7,
// compared within a tolerance of +-3. The runs are:
//   1. 5/3, 2 levels, output always ready      (cycle count checked)
//   2. 9/7, 2 levels, random output back-pressure
//   3. 5/3, level field 7 (clamped to 6 levels), back-pressure
//   4. 9/7, 1 level, output always ready       (cycle count checked)
//   5. 5/3, 1 level, output always ready       (cycle count checked)
// Bus writes issued while the processor is busy must be ignored; one is
// attempted in every run. Each mechanism (both filters, multi-level, the
// level clamp, accumulator full, ignored busy writes, status readback) is
// counted and must occur.
module tb_dwt2d_top;
  import dwt_pkg::*;

  localparam int N    = 64;
  localparam int NPIX = N * N;

  logic        clk = 1'b0;
  logic        rst;
  logic        bus_sel, bus_we;
  logic [1:0]  bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  coef_t       out_data;
  logic        out_avail, out_ready;

  int checks = 0, failures = 0;
  int img [N][N];
  int ref_img [N][N];
  int got [NPIX];
  int cyc = 0;

  // mechanism counters
  int n_filt53 = 0, n_filt97 = 0, n_multilevel = 0, n_clamp = 0;
  int n_acc_full = 0, n_busy_write = 0, n_status = 0;
  int max_err97 = 0;

  dwt2d_top dut (
    .clk       (clk),
    .rst       (rst),
    .bus_sel   (bus_sel),
    .bus_we    (bus_we),
    .bus_addr  (bus_addr),
    .bus_wdata (bus_wdata),
    .bus_rdata (bus_rdata),
    .out_data  (out_data),
    .out_avail (out_avail),
    .out_ready (out_ready)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst && dut.u_acc.full) n_acc_full++;

  // busy rising and done rising edges, sampled at the clock
  logic prev_busy = 1'b0, prev_done = 1'b0;
  int   t_busy = 0, t_done_edge = 0;
  always @(posedge clk) begin
    prev_busy <= dut.busy;
    prev_done <= dut.done;
    if (dut.busy && !prev_busy) t_busy <= cyc;
    if (dut.done && !prev_done) t_done_edge <= cyc;
  end

  initial begin
    #(2_000_000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic int clamp16(input int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // 1-D 5/3 integer lifting, symmetric extension, output L then H.
  function automatic void ref53(ref int v[N], input int len);
    int x[N];
    int h = len / 2;
    int d[N/2], s[N/2];
    for (int i = 0; i < len; i++) x[i] = v[i];
    for (int i = 0; i < h; i++) begin
      int r = (2*i + 2 < len) ? x[2*i + 2] : x[2*i];
      d[i] = x[2*i + 1] - ((x[2*i] + r) >>> 1);
    end
    for (int i = 0; i < h; i++) begin
      int l = (i > 0) ? d[i - 1] : d[0];
      s[i] = x[2*i] + ((l + d[i]) >>> 2);
    end
    for (int i = 0; i < h; i++) begin
      v[i]     = clamp16(s[i]);
      v[h + i] = clamp16(d[i]);
    end
  endfunction

  // 1-D 9/7 lifting in double precision, four steps, rounded at the end.
  function automatic void ref97(ref int v[N], input int len);
    real e[N/2], o[N/2];
    real a = -1.586134342, b = -0.052980118, g = 0.882911075, dd = 0.443506852;
    int h = len / 2;
    for (int i = 0; i < h; i++) begin
      e[i] = real'(v[2*i]);
      o[i] = real'(v[2*i + 1]);
    end
    for (int st = 0; st < 2; st++) begin
      real kh = (st == 0) ? a : g;
      real kl = (st == 0) ? b : dd;
      for (int i = 0; i < h; i++)
        o[i] = o[i] + kh * (e[i] + ((i + 1 < h) ? e[i + 1] : e[i]));
      for (int i = 0; i < h; i++)
        e[i] = e[i] + kl * (((i > 0) ? o[i - 1] : o[0]) + o[i]);
    end
    for (int i = 0; i < h; i++) begin
      v[i]     = clamp16(int'($floor(e[i] + 0.5)));
      v[h + i] = clamp16(int'($floor(o[i] + 0.5)));
    end
  endfunction

  function automatic void ref2d(input bit f97, input int levels);
    int line[N];
    int s = N;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) ref_img[y][x] = img[y][x];
    for (int lv = 0; lv < levels; lv++) begin
      for (int r = 0; r < s; r++) begin
        for (int i = 0; i < s; i++) line[i] = ref_img[r][i];
        if (f97) ref97(line, s); else ref53(line, s);
        for (int i = 0; i < s; i++) ref_img[r][i] = line[i];
      end
      for (int c = 0; c < s; c++) begin
        for (int i = 0; i < s; i++) line[i] = ref_img[i][c];
        if (f97) ref97(line, s); else ref53(line, s);
        for (int i = 0; i < s; i++) ref_img[i][c] = line[i];
      end
      s = s / 2;
    end
  endfunction

  // ---------------- bus helpers ----------------
  task automatic bus_write(input logic [1:0] a, input logic [15:0] d);
    @(negedge clk);
    bus_sel = 1'b1; bus_we = 1'b1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_sel = 1'b0; bus_we = 1'b0;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [15:0] d);
    @(negedge clk);
    bus_sel = 1'b1; bus_we = 1'b0; bus_addr = a;
    #1 d = bus_rdata;
    @(negedge clk);
    bus_sel = 1'b0;
  endtask

  function automatic int line_cycles(input int s, input bit f97);
    return 2*s + 2 + (f97 ? 4 : 2) * s / 2;
  endfunction

  task automatic run(input bit f97, input int lvl_field, input bit backpressure,
                     input bit check_cycles);
    logic [15:0] st;
    int levels, k, t_start, t_done, expect_cyc, s, err, tol;
    levels = (lvl_field == 0) ? 1 : ((lvl_field > 6) ? 6 : lvl_field);
    if (lvl_field > 6) n_clamp++;

    // configuration and image load
    bus_write(REG_CONFIG, 16'({3'(lvl_field), f97}));
    bus_read(REG_CONFIG, st);
    check(st[3:0] == {3'(lvl_field), f97}, "config readback");
    bus_write(REG_ADDR, 16'd0);
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        @(negedge clk);
        bus_sel = 1'b1; bus_we = 1'b1; bus_addr = REG_PIXEL; bus_wdata = 16'(img[y][x]);
      end
    @(negedge clk);
    bus_sel = 1'b0; bus_we = 1'b0;
    bus_read(REG_ADDR, st);
    check(st == 16'd0, "pixel pointer wrapped to 0 after a full image");

    ref2d(f97, levels);

    out_ready = !backpressure;
    bus_write(REG_CTRL, 16'd1);
    bus_read(REG_CTRL, st);
    n_status++;
    check(st[1:0] == 2'b01, "status busy");
    // writes while busy must be ignored
    bus_write(REG_ADDR, 16'd5);
    bus_write(REG_PIXEL, 16'd77);
    bus_write(REG_CONFIG, 16'h000F);
    bus_read(REG_CONFIG, st);
    check(st[3:0] == {3'(lvl_field), f97}, "config unchanged while busy");
    n_busy_write++;

    // drain the output
    k = 0;
    while (k < NPIX) begin
      @(negedge clk);
      if (backpressure) out_ready = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (out_avail && out_ready) begin
        got[k] = int'(out_data);
        k++;
      end
      if (dut.u_ctrl.level >= 3'd2) n_multilevel++;
    end
    while (!dut.done) @(posedge clk);
    repeat (2) @(posedge clk);
    t_start = t_busy;
    t_done  = t_done_edge;
    out_ready = 1'b1;

    bus_read(REG_CTRL, st);
    n_status++;
    check(st[1:0] == 2'b10, "status done");

    // compare
    tol = f97 ? 3 : 0;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        err = got[y*N + x] - ref_img[y][x];
        if (err < 0) err = -err;
        if (f97 && err > max_err97) max_err97 = err;
        checks++;
        if (err > tol) begin
          failures++;
          if (failures < 20)
            $display("FAIL f97=%0d lv=%0d (%0d,%0d): got %0d expected %0d",
                     f97, levels, y, x, got[y*N + x], ref_img[y][x]);
        end
      end

    if (check_cycles) begin
      expect_cyc = 0;
      s = N;
      for (int lv = 0; lv < levels; lv++) begin
        expect_cyc += 2 * s * line_cycles(s, f97);
        s = s / 2;
      end
      expect_cyc += NPIX + 1;
      check(t_done - t_start == expect_cyc, "cycle count");
      $display("run f97=%0d levels=%0d: %0d cycles (expected %0d)",
               f97, levels, t_done - t_start, expect_cyc);
    end
    if (f97) n_filt97++; else n_filt53++;
  endtask

  initial begin
    real v;
    rst = 1'b1;
    bus_sel = 1'b0; bus_we = 1'b0; bus_addr = '0; bus_wdata = '0;
    out_ready = 1'b1;
    // synthetic test image
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        v = 110.0 + 70.0 * $sin(real'(x) / 9.0) * $cos(real'(y) / 7.0)
            + 20.0 * ((x > 40 && y > 20 && y < 50) ? 1.0 : 0.0)
            + real'(($urandom_range(0, 15)));
        img[y][x] = int'(v);
        if (img[y][x] > 255) img[y][x] = 255;
        if (img[y][x] < 0)   img[y][x] = 0;
      end
    repeat (4) @(posedge clk);
    rst = 1'b0;

    run(1'b0, 2, 1'b0, 1'b1);
    run(1'b1, 2, 1'b1, 1'b0);
    run(1'b0, 7, 1'b1, 1'b0);
    run(1'b1, 1, 1'b0, 1'b1);
    run(1'b0, 1, 1'b0, 1'b1);

    $display("mechanisms: 5/3 runs=%0d 9/7 runs=%0d multilevel=%0d clamp=%0d acc_full=%0d busy_writes=%0d status=%0d; max 9/7 error=%0d",
             n_filt53, n_filt97, n_multilevel, n_clamp, n_acc_full, n_busy_write, n_status, max_err97);
    check(n_filt53 > 0, "5/3 used");
    check(n_filt97 > 0, "9/7 used");
    check(n_multilevel > 0, "multi-level decomposition happened");
    check(n_clamp > 0, "level clamp happened");
    check(n_acc_full > 0, "accumulator full happened");
    check(n_busy_write > 0, "busy write attempted");
    check(n_status > 0, "status read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

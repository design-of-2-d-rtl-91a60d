// tb_control_unit: runs the control unit with the RAM unit and a stand-in
// line processor (tb_line_model: reverse the line, add one) on a 16 x 16
// image. The expected RAM image after L levels is computed here by applying
// the same line operation to every row, then every column, of the shrinking
// top-left square. Checked: pixel loading through the idle RAM port, every
// output word in raster order (with random accumulator room), the clamping
// of the level count, busy and done, and that a second start works.
module tb_control_unit;
  import dwt_pkg::*;
  localparam int N = 16;
  localparam int NPIX = N * N;

  logic        clk = 1'b0, rst, start, busy, done;
  filter_e     cfg_filter;
  logic [2:0]  cfg_levels, level;
  logic        pix_we, col_pass;
  logic [7:0]  pix_addr, ram_addr;
  coef_t       pix_data, ram_wdata, ram_rdata;
  logic        ram_en, ram_we;
  filter_e     line_filter;
  logic [4:0]  line_len;
  logic        line_in_valid, line_in_ready, line_out_valid;
  coef_t       line_in_data, line_out_data;
  logic        acc_push;
  coef_t       acc_data;
  logic [2:0]  acc_count;
  int checks = 0, failures = 0;
  int img [N][N], expct [N][N];
  int fill;

  control_unit #(.IMG_SIZE(N), .MAX_LEVELS(4), .ACC_DEPTH(4)) dut (.*);
  ram_unit #(.DEPTH(NPIX)) u_ram (.clk(clk), .en(ram_en), .we(ram_we), .addr(ram_addr),
                                  .wdata(ram_wdata), .rdata(ram_rdata));
  tb_line_model #(.MAX_LEN(N)) u_line (.clk(clk), .rst(rst), .len(line_len),
    .in_valid(line_in_valid), .in_data(line_in_data), .in_ready(line_in_ready),
    .out_valid(line_out_valid), .out_data(line_out_data));

  assign acc_count = 3'(fill);

  always #5 clk = ~clk;

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

  function automatic void model(input int levels);
    int s = N;
    int tmp[N];
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) expct[y][x] = img[y][x];
    for (int l = 0; l < levels; l++) begin
      for (int r = 0; r < s; r++) begin
        for (int i = 0; i < s; i++) tmp[i] = expct[r][s-1-i] + 1;
        for (int i = 0; i < s; i++) expct[r][i] = tmp[i];
      end
      for (int c = 0; c < s; c++) begin
        for (int i = 0; i < s; i++) tmp[i] = expct[s-1-i][c] + 1;
        for (int i = 0; i < s; i++) expct[i][c] = tmp[i];
      end
      s = s / 2;
    end
  endfunction

  task automatic run(input int lvl_field);
    int levels = (lvl_field == 0) ? 1 : (lvl_field > 4 ? 4 : lvl_field);
    int k = 0;
    // load a fresh image through the pixel port
    for (int a = 0; a < NPIX; a++) begin
      img[a / N][a % N] = $urandom_range(0, 255);
      pix_we = 1'b1; pix_addr = 8'(a); pix_data = coef_t'(img[a / N][a % N]);
      @(negedge clk);
    end
    pix_we = 1'b0;
    model(levels);
    cfg_levels = 3'(lvl_field);
    start = 1'b1; @(negedge clk); start = 1'b0;
    chk(busy && !done, "busy after start");
    fill = 0;
    while (k < NPIX) begin
      // consume from the modelled accumulator at random
      @(posedge clk);
      if (acc_push) begin
        chk(int'(acc_data) == expct[k / N][k % N],
            $sformatf("L=%0d word %0d got %0d exp %0d", levels, k, acc_data, expct[k / N][k % N]));
        chk(fill < 4, "push into full accumulator");
        fill++;
        k++;
      end
      if (fill > 0 && $urandom_range(0, 2) == 0) fill--;
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    chk(!busy && done, "done after readout");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; cfg_filter = FILT_53; cfg_levels = 3'd1;
    pix_we = 1'b0; pix_addr = '0; pix_data = '0; fill = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    chk(!busy && !done, "idle after reset");
    run(1);
    run(3);
    run(7);   // clamped to MAX_LEVELS = 4 (lines of 2 samples)
    run(0);   // taken as one level
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

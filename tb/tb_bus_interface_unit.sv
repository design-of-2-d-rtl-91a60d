// tb_bus_interface_unit: drives the host bus and checks the register map:
// configuration write and readback, the one-cycle start pulse, the pixel
// port (write strobe, pointer, zero-extended 8-bit data, auto-increment,
// pointer load), the status readback and that every write is ignored while
// busy is high.
module tb_bus_interface_unit;
  import dwt_pkg::*;

  logic        clk = 1'b0, rst;
  logic        bus_sel, bus_we;
  logic [1:0]  bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  filter_e     cfg_filter;
  logic [2:0]  cfg_levels;
  logic        start, pix_we, busy, done;
  logic [11:0] pix_addr;
  coef_t       pix_data;
  int checks = 0, failures = 0;

  bus_interface_unit #(.ADDR_W(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [1:0] a, input logic [15:0] d);
    bus_sel = 1'b1; bus_we = 1'b1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_sel = 1'b0; bus_we = 1'b0;
  endtask

  initial begin
    int n_start;
    rst = 1'b1; bus_sel = 1'b0; bus_we = 1'b0; bus_addr = '0; bus_wdata = '0;
    busy = 1'b0; done = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    chk(cfg_filter == FILT_53 && cfg_levels == 3'd1, "reset configuration");
    wr(REG_CONFIG, 16'b0000_0000_0000_1011);   // 9/7, 5 levels
    chk(cfg_filter == FILT_97 && cfg_levels == 3'd5, "config write");
    bus_sel = 1'b1; bus_addr = REG_CONFIG; #1;
    chk(bus_rdata == 16'h000B, "config readback");
    bus_sel = 1'b0;
    // pixels: pointer load, then a burst with a gap
    wr(REG_ADDR, 16'd100);
    bus_addr = REG_ADDR; #1 chk(bus_rdata == 16'd100, "pointer readback");
    for (int i = 0; i < 6; i++) begin
      bus_sel = 1'b1; bus_we = 1'b1; bus_addr = REG_PIXEL; bus_wdata = 16'hAB00 | 16'(200 + i);
      @(negedge clk);
      chk(pix_we && pix_addr == 12'(100 + i) && pix_data == coef_t'(200 + i), $sformatf("pixel %0d", i));
      if (i == 2) begin
        bus_sel = 1'b0; bus_we = 1'b0; @(negedge clk);
        chk(!pix_we, "no strobe in gap");
      end
    end
    bus_sel = 1'b0; bus_we = 1'b0;
    @(negedge clk);
    chk(!pix_we && pix_addr == 12'd106, "pointer after burst");
    // start pulse
    n_start = 0;
    wr(REG_CTRL, 16'd1);
    chk(start, "start pulse");
    @(negedge clk);
    chk(!start, "start lasts one cycle");
    wr(REG_CTRL, 16'd0);
    chk(!start, "no start on zero write");
    // busy: everything ignored
    busy = 1'b1;
    bus_addr = REG_CTRL; bus_sel = 1'b1; #1 chk(bus_rdata[1:0] == 2'b01, "status busy");
    bus_sel = 1'b0;
    wr(REG_CONFIG, 16'h0004);
    chk(cfg_filter == FILT_97 && cfg_levels == 3'd5, "config ignored while busy");
    wr(REG_PIXEL, 16'd9);
    chk(!pix_we, "pixel ignored while busy");
    wr(REG_CTRL, 16'd1);
    chk(!start, "start ignored while busy");
    busy = 1'b0; done = 1'b1;
    bus_addr = REG_CTRL; bus_sel = 1'b1; #1 chk(bus_rdata[1:0] == 2'b10, "status done");
    bus_sel = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

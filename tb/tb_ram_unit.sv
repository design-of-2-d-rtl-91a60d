// tb_ram_unit: writes random words to random addresses of the RAM, keeps a
// copy here, and reads every written address back, checking the one-cycle
// read latency and that rdata holds while en is low.
module tb_ram_unit;
  import dwt_pkg::*;
  localparam int DEPTH = 4096;

  logic        clk = 1'b0, en, we;
  logic [11:0] addr;
  coef_t       wdata, rdata;
  int checks = 0, failures = 0;
  int model [DEPTH];
  bit written [DEPTH];

  ram_unit #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef_t held;
    en = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      en = 1'b1; we = 1'b1;
      addr = 12'($urandom_range(0, DEPTH - 1));
      wdata = coef_t'($urandom);
      model[addr] = int'(wdata);
      written[addr] = 1'b1;
      @(negedge clk);
    end
    we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      if (!written[a]) continue;
      en = 1'b1; addr = 12'(a);
      @(negedge clk);
      checks++;
      if (int'(rdata) != model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %0d exp %0d", a, rdata, model[a]);
      end
      held = rdata;
      en = 1'b0; addr = 12'(a + 1);
      @(negedge clk);
      checks++;
      if (rdata != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

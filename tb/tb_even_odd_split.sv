// tb_even_odd_split: feeds lines of several even lengths, with gaps, and
// checks that sample k is routed to the even bank (k even) or the odd bank
// (k odd) at index k/2, that load rises exactly one cycle after the last
// sample and stays high, that samples offered while load is high are
// ignored, and that clear empties the split.
module tb_even_odd_split;
  localparam int MAX_LEN = 64;

  logic       clk = 1'b0, rst, clear, in_valid;
  logic [6:0] len;
  logic       wr_even, wr_odd, load;
  logic [4:0] wr_idx;
  int checks = 0, failures = 0;

  even_odd_split #(.MAX_LEN(MAX_LEN)) dut (.*);

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

  initial begin
    int lens[5] = '{2, 4, 10, 32, 64};
    rst = 1'b1; clear = 1'b0; in_valid = 1'b0; len = 7'd4;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (lens[li]) begin
      len = 7'(lens[li]);
      for (int k = 0; k < lens[li]; k++) begin
        // random idle cycles between samples
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 1'b0; @(negedge clk);
          chk(!load, "load early");
        end
        in_valid = 1'b1;
        #1;
        chk(wr_even == (k % 2 == 0) && wr_odd == (k % 2 == 1), "routing");
        chk(wr_idx == 5'(k / 2), "index");
        chk(!load, "load before last sample");
        @(negedge clk);
      end
      in_valid = 1'b1;     // extra samples must be ignored
      #1;
      chk(load, "load after last sample");
      chk(!wr_even && !wr_odd, "ignored while loaded");
      @(negedge clk);
      in_valid = 1'b0;
      chk(load, "load holds");
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      chk(!load, "clear drops load");
    end
    // reset in the middle of a line
    len = 7'd8; in_valid = 1'b1; repeat (3) @(negedge clk);
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    #1 chk(wr_even && wr_idx == 5'd0 && !load, "reset restarts the line");
    in_valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_output_accumulator: random pushes (never when full, as the control
// unit guarantees) and random ready, compared cycle by cycle with a queue
// model here: data order, avail, count and full. Also reaches the full
// state and simultaneous push and pop.
module tb_output_accumulator;
  import dwt_pkg::*;
  localparam int DEPTH = 4;

  logic       clk = 1'b0, rst, push, full, avail, ready;
  coef_t      push_data, data;
  logic [2:0] count;
  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  coef_t q[$];

  output_accumulator #(.DEPTH(DEPTH)) dut (.*);

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

  initial begin
    rst = 1'b1; push = 1'b0; push_data = '0; ready = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 5000; t++) begin
      // phases: fill-heavy and drain-heavy
      ready = ($urandom_range(0, 9) < ((t / 500) % 2 ? 8 : 2));
      push  = ($urandom_range(0, 9) < 6) && (q.size() < DEPTH || ready);
      push_data = coef_t'($urandom);
      #1;
      chk(int'(count) == q.size(), "count");
      chk(avail == (q.size() > 0), "avail");
      chk(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) chk(data == q[0], "data order");
      if (full) n_full++;
      if (push && avail && ready) n_both++;
      @(posedge clk);
      if (avail && ready) void'(q.pop_front());
      if (push) q.push_back(push_data);
      @(negedge clk);
    end
    chk(n_full > 0, "full reached");
    chk(n_both > 0, "push and pop together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

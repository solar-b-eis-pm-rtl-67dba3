// tb_tick_gen: checks that the time base at its default divider pulses for
// exactly one clock every 38000 clocks (1.9 ms at 20 MHz), and that it
// restarts from reset.
module tb_tick_gen;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;
  int last, n;

  tick_gen dut (.*);

  always #25 clk = ~clk;  // 20 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    n = 0; last = 0;
    for (int c = 1; c <= 4 * 38000 + 10; c++) begin
      @(posedge clk); #1;
      if (tick) begin
        if (n == 0) check(c == 38000, $sformatf("first tick after %0d clocks", c));
        else        check(c - last == 38000, $sformatf("tick period %0d", c - last));
        last = c; n++;
        @(posedge clk); #1;
        c++;
        check(!tick, "tick is one clock wide");
      end
    end
    check(n == 4, $sformatf("four ticks, saw %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

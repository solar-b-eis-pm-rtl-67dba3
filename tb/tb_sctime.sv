// tb_sctime: checks the 32-bit time counter: reset to 0, one step per tick,
// load of a new value, load winning over a simultaneous tick, and wrap at
// 2^32.
module tb_sctime;
  logic clk = 0, rst = 1, tick = 0, load = 0;
  logic [31:0] load_val = '0, time_o;
  int checks = 0, failures = 0;

  sctime dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input bit t, input bit l, input logic [31:0] v);
    @(negedge clk); tick = t; load = l; load_val = v;
    @(negedge clk); tick = 0; load = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(time_o == 0, "reset value");
    exp = 0;
    for (int i = 0; i < 200; i++) begin
      bit t, l;
      logic [31:0] v;
      t = ($urandom % 2) == 0;
      l = ($urandom % 8) == 0;
      v = (i == 50) ? 32'hFFFF_FFFE : $urandom;
      if (i == 50) l = 1;
      step(t, l, v);
      if (l) exp = v; else if (t) exp = exp + 1;
      check(time_o == exp, $sformatf("step %0d got %h exp %h", i, time_o, exp));
    end
    step(0, 1, 32'hFFFF_FFFF);
    step(1, 0, 0);
    check(time_o == 0, "wraps at 2^32");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

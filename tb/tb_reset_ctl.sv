// tb_reset_ctl: checks power-on reset synchronisation and release, and that
// a one-clock watchdog trip gives a global reset of 1 + STRETCH clocks
// without touching the power-on reset.
module tb_reset_ctl;
  localparam int STRETCH = 16;
  logic clk = 0, por_n = 0, trip = 0, por, sys_rst, wrm_rst_n;
  int checks = 0, failures = 0;

  reset_ctl #(.STRETCH(STRETCH)) dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    #1 check(por && sys_rst && !wrm_rst_n, "reset during power-on");
    @(negedge clk) por_n = 1;
    n = 0;
    while (por) begin @(posedge clk); #1 n++; end
    check(n == 2, $sformatf("por released after 2 clocks, took %0d", n));
    n = 0;
    while (sys_rst) begin @(posedge clk); #1 n++; end
    check(n == STRETCH, $sformatf("global reset tail %0d", n));
    check(wrm_rst_n, "~WRM_RST released");
    repeat (5) @(posedge clk);
    @(negedge clk) trip = 1;
    #1 check(sys_rst && !por, "trip asserts only global reset");
    @(negedge clk) trip = 0;
    n = 0;
    while (sys_rst) begin @(posedge clk); #1 n++; check(!por, "por stays low"); end
    check(n == STRETCH, $sformatf("warm reset stretched %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

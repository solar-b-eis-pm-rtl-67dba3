// tb_watchdog: checks the watchdog with short time-outs (8 and 16 ticks,
// a tick every 4 clocks): disabled by default, trip on the exact tick for
// both time-out selections, kicking with ~WD_RST, flags surviving a warm
// reset, clearing with ~WDTripRst, trips from ~V_FAIL and the direct reset
// command, and return to the power-on state.
module tb_watchdog;
  import scproc_pkg::*;
  localparam int TS = 8, TL = 16;
  logic clk = 0, por = 1, sys_rst = 1, tick = 0, ctl_wr = 0;
  logic [7:0] ctl_wdata = '1, stat;
  logic v_fail_n = 1, dc_rst_req = 0, trip;
  int checks = 0, failures = 0;

  watchdog #(.TC_SHORT(TS), .TC_LONG(TL)) dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] d);
    @(negedge clk); ctl_wr = 1; ctl_wdata = d; @(negedge clk); ctl_wr = 0; ctl_wdata = '1;
  endtask

  // one tick (4 clocks); returns whether trip was seen during it
  task automatic one_tick(output bit tripped);
    tripped = 0;
    @(negedge clk); tick = 1; #1 tripped = trip;
    @(negedge clk); tick = 0;
    repeat (2) @(negedge clk);
  endtask

  // ticks until trip, up to max; returns tick number of the trip or 0
  task automatic run_ticks(input int max, output int at);
    bit t;
    at = 0;
    for (int i = 1; i <= max; i++) begin
      one_tick(t);
      if (t && at == 0) at = i;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int at;
    repeat (2) @(negedge clk);
    por = 0; sys_rst = 0;
    check(stat == 8'hE8, $sformatf("power-on status %h", stat));
    run_ticks(40, at);
    check(at == 0, "disabled watchdog never trips");
    // enable, short time-out
    wr(8'b1011_1111);
    check(stat == 8'hA8, $sformatf("enabled status %h", stat));
    run_ticks(20, at);
    check(at == TS, $sformatf("short time-out trips at tick %0d", at));
    check(!stat[WD_TRIP], "~WDTrip low after trip");
    // warm reset keeps the register
    @(negedge clk) sys_rst = 1; repeat (3) @(negedge clk); sys_rst = 0;
    check(!stat[WD_TRIP] && !stat[WD_EN], "flags kept through warm reset");
    // kick every 5 ticks: no trip
    for (int k = 0; k < 8; k++) begin
      run_ticks(5, at);
      check(at == 0, "kicked watchdog does not trip");
      wr(8'b1010_1111);
    end
    // clear trip flag, select long time-out, reset counter
    wr(8'b0000_1111);
    check(stat[WD_TRIP] && !stat[WD_TOSEL], "trip cleared, long selected");
    run_ticks(20, at);
    check(at == TL, $sformatf("long time-out trips at tick %0d", at));
    // disable: counter held at zero
    wr(8'b0111_1111);
    run_ticks(40, at);
    check(at == 0 && stat[WD_TRIP] && stat[WD_EN], "disabled again");
    // voltage fail
    @(negedge clk) v_fail_n = 0; #1 check(trip, "~V_FAIL trips");
    @(negedge clk) v_fail_n = 1; #1 check(!trip && !stat[WD_TRIP], "~V_FAIL sets ~WDTrip");
    wr(8'b0111_1111);
    // direct reset command
    @(negedge clk) dc_rst_req = 1; #1 check(trip, "direct command trips");
    @(negedge clk) dc_rst_req = 0; #1 check(!stat[WD_DCRST] && stat[WD_TRIP], "~DC_RST set");
    wr(8'b1111_1111);
    check(!stat[WD_DCRST], "~DC_RST only cleared by ~WDTripRst");
    wr(8'b0111_1111);
    check(stat[WD_DCRST], "~DC_RST cleared");
    // power-on reset restores defaults
    wr(8'b0001_1111);
    @(negedge clk) por = 1; @(negedge clk) por = 0;
    check(stat == 8'hE8, "power-on reset restores defaults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// watchdog: watchdog counter, its status/control register (port 0xC0 0001)
// and the sources of a watchdog trip.
//
// The counter counts 1.9 ms ticks while enabled (~WD_EN written 0) and is
// held at zero while disabled, the power-on default.  Reaching TC_SHORT ticks
// (4096 x 1.9 ms = 7.78 s, ~WDTToSel = 1) or TC_LONG ticks (8192 x 1.9 ms =
// 15.56 s, ~WDTToSel = 0) trips it; software prevents that by writing 0 to
// ~WD_RST, which clears the counter only.  A low ~V_FAIL from the monitor
// card also trips it, and a decoded direct reset command (dc_rst_req) causes
// a reset recorded in ~DC_RST.  trip is a level to the reset circuit; the
// flags ~WDTrip and ~DC_RST go low and stay low until software writes 0 to
// ~WDTripRst.
// The register (~WDTrip, ~WD_EN, ~WDTToSel, ~DC_RST) is cleared only by the
// power-on reset por, so it survives the warm reboot it causes; the counter
// is cleared by the global reset sys_rst.  ctl_wdata and stat are
// PMD[47:40]; stat = {~WDTrip, ~WD_EN, ~WDTToSel, 0, ~DC_RST, 0, 0, 0}.
// The register layout and time-outs follow the board; counting in 1.9 ms
// ticks and letting ~V_FAIL set ~WDTrip are this design's reading.
module watchdog
  import scproc_pkg::*;
#(
  parameter int unsigned TC_SHORT = 4096,
  parameter int unsigned TC_LONG  = 8192
) (
  input  logic       clk,
  input  logic       por,
  input  logic       sys_rst,
  input  logic       tick,
  input  logic       ctl_wr,
  input  logic [7:0] ctl_wdata,
  output logic [7:0] stat,
  input  logic       v_fail_n,
  input  logic       dc_rst_req,
  output logic       trip
);
  localparam int unsigned CW = $clog2(TC_LONG + 1);

  logic          wdtrip_n, wd_en_n, tosel_n, dcrst_n;
  logic [CW-1:0] cnt;
  logic          tc;

  assign tc   = !wd_en_n && tick &&
                (cnt == (tosel_n ? CW'(TC_SHORT - 1) : CW'(TC_LONG - 1)));
  assign trip = tc || !v_fail_n || dc_rst_req;

  // counter: cleared by warm reboot, ~WD_RST and while disabled
  always_ff @(posedge clk) begin
    if (sys_rst || wd_en_n || (ctl_wr && !ctl_wdata[WD_RSTC])) cnt <= '0;
    else if (tick) cnt <= tc ? '0 : cnt + 1'b1;
  end

  // status/control register: power-on reset only
  always_ff @(posedge clk) begin
    if (por) begin
      wdtrip_n <= 1'b1;
      wd_en_n  <= 1'b1;
      tosel_n  <= 1'b1;
      dcrst_n  <= 1'b1;
    end else begin
      if (ctl_wr) begin
        wd_en_n <= ctl_wdata[WD_EN];
        tosel_n <= ctl_wdata[WD_TOSEL];
        if (!ctl_wdata[WD_TRIP]) begin
          wdtrip_n <= 1'b1;
          dcrst_n  <= 1'b1;
        end
      end
      if (tc || !v_fail_n) wdtrip_n <= 1'b0;
      if (dc_rst_req)      dcrst_n  <= 1'b0;
    end
  end

  always_comb begin
    stat           = '0;
    stat[WD_TRIP]  = wdtrip_n;
    stat[WD_EN]    = wd_en_n;
    stat[WD_TOSEL] = tosel_n;
    stat[WD_DCRST] = dcrst_n;
  end

endmodule

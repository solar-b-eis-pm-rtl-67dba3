// reset_ctl: the board's reset circuit.
//
// por_n (power-on, and the test push button) is synchronised to the board
// clock and gives por, which resets only the watchdog register and the time
// base.  The global reset sys_rst follows por and is also raised by a
// watchdog trip (terminal count, voltage fail or direct reset command): it
// stays high while trip is high and for STRETCH clocks after it falls, so a
// one-clock trip still gives every block a clean warm reboot.  wrm_rst_n is
// the inverted global reset brought to the test port as ~WRM_RST.  The split
// into a power-on reset and a global reset follows the board; the stretch
// length is this design's choice.
module reset_ctl #(
  parameter int unsigned STRETCH = 16
) (
  input  logic clk,
  input  logic por_n,
  input  logic trip,
  output logic por,
  output logic sys_rst,
  output logic wrm_rst_n
);
  localparam int unsigned CW = $clog2(STRETCH + 1);
  logic [1:0]    por_sync;
  logic [CW-1:0] cnt;

  // two-flop synchroniser, asserted asynchronously
  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) por_sync <= 2'b11;
    else        por_sync <= {por_sync[0], 1'b0};
  end
  assign por = por_sync[1];

  always_ff @(posedge clk) begin
    if (por || trip) cnt <= CW'(STRETCH);
    else if (cnt != '0) cnt <= cnt - 1'b1;
  end

  assign sys_rst   = por || trip || (cnt != '0);
  assign wrm_rst_n = !sys_rst;

endmodule

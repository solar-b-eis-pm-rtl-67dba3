// tick_gen: the board's slow time base, a one-clock pulse every 1.9 ms.
//
// A free-running counter divides the 20 MHz board clock by DIV (38000 clocks
// = 1.9 ms) and pulses tick for one clock each time it wraps.  The pulse
// advances spacecraft time and the watchdog counter.  The generator is reset
// only by power-on reset: a warm reboot leaves it running, as the board keeps
// its clock generator out of the global reset.  The 1.9 ms period is the
// board's; deriving it from the 20 MHz clock by a counter is this design's
// choice.
module tick_gen #(
  parameter int unsigned DIV = 38000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW'(DIV - 1));
      cnt  <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
    end
  end

endmodule

// ser_tx: clocked serial transmitter shared by the status and mission-data
// links to the mission data processor.
//
// A word loaded while the transmitter is idle (load with busy low) is sent
// MSB first.  Each bit lasts 2*BIT_HALF board clocks: sclk is low for the
// first half, with sdata already set to the bit, and high for the second, so
// the receiver samples on the rising edge of sclk.  sclk idles high and sdata
// idles low.  busy is high from the clock after load until the last bit's
// high half ends, and done pulses for one clock at that point, so a caller
// that loads the next word when busy is low leaves a one-clock gap between
// words.  The link's exact timing is defined outside this design; this
// format and rate are its own choice.
module ser_tx #(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned BIT_HALF = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  output logic             busy,
  output logic             done,
  output logic             sclk,
  output logic             sdata
);
  localparam int unsigned HW = (BIT_HALF > 1) ? $clog2(BIT_HALF) : 1;
  localparam int unsigned BW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] sh;
  logic [HW-1:0]    hcnt;
  logic [BW-1:0]    bits;
  logic             phase;  // 0: sclk low half, 1: sclk high half

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      phase <= 1'b0;
      hcnt  <= '0;
      bits  <= '0;
      sh    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (load) begin
          sh    <= din;
          bits  <= BW'(WIDTH - 1);
          phase <= 1'b0;
          hcnt  <= HW'(BIT_HALF - 1);
          busy  <= 1'b1;
        end
      end else if (hcnt != '0) begin
        hcnt <= hcnt - 1'b1;
      end else begin
        hcnt <= HW'(BIT_HALF - 1);
        if (!phase) begin
          phase <= 1'b1;
        end else if (bits == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          phase <= 1'b0;
          bits  <= bits - 1'b1;
          sh    <= {sh[WIDTH-2:0], 1'b0};
        end
      end
    end
  end

  assign sclk  = !busy || phase;
  assign sdata = busy && sh[WIDTH-1];

endmodule

// bus_monitor: "bus active" indicator from a character timeout.
//
// Every received character loads a timeout counter with its maximum value.
// The counter then counts down once per sampling tick (16 x bit rate); while
// it is non-zero the bus is declared active, and when it reaches zero the bus
// is idle, which marks the gap between two telegrams. The default maximum is
// 1.5 character times: 1.5 x 16 ticks x 11 bits = 264 ticks.
//
// Timing: the counter is loaded on the clock edge that sees receive_flag;
// bus_active is a register of (counter != 0) and so rises one clock later.
// In the clock where receive_flag is high, bus_active still shows whether the
// bus was active before this character, which is what start-delimiter
// detection relies on. The counter, its reload, its maximum and the one-clock
// lag all follow the design; the reset state (idle) is this design's choice.
module bus_monitor #(
  parameter int unsigned TIMEOUT = 264
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic receive_flag,
  output logic bus_active
);

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic [TW-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer      <= '0;
      bus_active <= 1'b0;
    end else begin
      if (receive_flag)           timer <= TW'(TIMEOUT);
      else if (tick && timer != 0) timer <= timer - 1'b1;
      bus_active <= (timer != 0);
    end
  end

endmodule

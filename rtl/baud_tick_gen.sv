// baud_tick_gen: sampling strobe at 16 x the PROFIBUS bit rate.
//
// The UART receiver and the bus-activity timeout both work in units of one
// sampling period, 1/16 of a bit. With the 192 MHz system clock a sampling
// period at 12 Mbit/s is exactly one clock, so the rates the receiver can
// follow are 12 MHz / divisor: divisor 1 = 12 Mbit/s, 8 = 1.5 Mbit/s,
// 1250 = 9.6 kbit/s. That bit rates be a submultiple of 12 MHz is taken from
// the design; the counter itself is this design's own.
//
// Interface: `divisor` is read continuously (0 behaves as 1). `tick` is high
// for one clock every `divisor` clocks. A change of divisor takes effect at
// the latest after the current period.
module baud_tick_gen #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] divisor,
  output logic             tick
);

  logic [DIV_W-1:0] cnt;
  logic [DIV_W-1:0] last;  // terminal count, divisor-1

  always_comb last = (divisor == '0) ? '0 : divisor - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt >= last) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule

// pulse_stretcher: makes a visible output pulse from a one-clock trigger.
//
// A trigger strobe loads a down-counter with PULSE_CYCLES; the output is high
// while the counter is non-zero. The default, 1920 clocks at 192 MHz, gives
// the 10 us trigger pulse of the design. The same pulse is the window during
// which the error is applied to the bus.
//
// Timing: `pulse` rises the clock after `trig` and stays high for exactly
// PULSE_CYCLES clocks. A trigger during the pulse restarts the full length.
// The length follows the design; the retriggering is this design's choice.
module pulse_stretcher #(
  parameter int unsigned PULSE_CYCLES = 1920
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic pulse
);

  localparam int unsigned CW = $clog2(PULSE_CYCLES + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (trig)       cnt <= CW'(PULSE_CYCLES);
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign pulse = (cnt != '0);

endmodule

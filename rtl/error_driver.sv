// error_driver: gate signals for the bus-clamping transistors.
//
// Each PROFIBUS line (A and B) has one transistor to 5 V and one to Gnd,
// reached through opto couplers and MOS drivers. While `active` is high the
// selected lines are clamped: err_type[1:0] is the mode of line A and
// err_type[3:2] that of line B (pb_pkg::line_mode_e: free, low, high;
// the fourth code is treated as free), so any combination of A and B low or
// high can be chosen. Both transistors of one line are never switched on
// together, which would short the 5 V supply; an assertion guards this.
//
// Timing: outputs are registered, one clock after `active` and `err_type`.
// The four outputs and the free choice per line follow the design; the
// encoding and the active-high polarity are this design's own.
module error_driver
  import pb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       active,
  input  logic [7:0] err_type,
  output logic       a_hi,
  output logic       a_lo,
  output logic       b_hi,
  output logic       b_lo
);

  line_mode_e mode_a, mode_b;

  always_comb begin
    mode_a = line_mode_e'(err_type[1:0]);
    mode_b = line_mode_e'(err_type[3:2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {a_hi, a_lo, b_hi, b_lo} <= '0;
    end else begin
      a_hi <= active && (mode_a == LINE_HIGH);
      a_lo <= active && (mode_a == LINE_LOW);
      b_hi <= active && (mode_b == LINE_HIGH);
      b_lo <= active && (mode_b == LINE_LOW);
    end
  end

  a_no_short_a: assert property (@(posedge clk) disable iff (!rst_n) !(a_hi && a_lo));
  a_no_short_b: assert property (@(posedge clk) disable iff (!rst_n) !(b_hi && b_lo));

endmodule

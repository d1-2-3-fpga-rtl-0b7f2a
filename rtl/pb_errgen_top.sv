// pb_errgen_top: FPGA part of a PROFIBUS error generator.
//
// The board listens to a PROFIBUS DP segment through an RS485 receiver,
// decodes its characters and telegrams, and when a user-chosen event is seen
// (a start delimiter, a station address in the SA or DA field, a SAP, a
// frame-control or length value, a PDU byte, an invalid telegram, a parity error, or
// simply any character) it gives a 10 us pulse on the trigger
// output and, if enabled, clamps the bus lines A and/or B to 5 V or Gnd for
// that time to corrupt the telegram under way. The HMI microcontroller loads
// the bit rate, trigger conditions, compare values and error type over SPI.
//
//   rxd -> uart_rx -> receive_flag, byte -> bus_monitor -> bus_active
//                                        -> trigger_condition -> trigger
//   trigger -> pulse_stretcher -> trigger_out, error window -> error_driver
//   spi -> spi_slave -> reg_bank -> cfg (divisor, mask, compare values, error)
//   baud_tick_gen(cfg.divisor) -> 16x sampling tick for uart_rx, bus_monitor
//
// Clock: one 192 MHz system clock; the supported bit rates are 12 MHz / n
// (12, 6, 3, 1.5 Mbit/s ... 9.6 kbit/s). Reset: asynchronous, active low.
// The two test outputs of the board are `trigger_out` (output 1) and
// `bus_active` (output 2). The data path and its timing follow the design;
// the error-enable bit and all register encodings are this design's own.
module pb_errgen_top
  import pb_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic rxd,
  input  logic spi_sck,
  input  logic spi_ss_n,
  input  logic spi_mosi,
  output logic trigger_out,
  output logic bus_active,
  output logic a_hi,
  output logic a_lo,
  output logic b_hi,
  output logic b_lo
);

  pb_cfg_t    cfg;
  logic       wr_en;
  logic [7:0] wr_addr, wr_data;
  logic       tick;
  logic [7:0] rx_data;
  logic       rx_parity, receive_flag, parity_err, framing_err;
  logic [7:0] char_rank;
  logic       sd_found, sa_found, da_found, tel_error, trigger;

  spi_slave u_spi (
    .clk, .rst_n, .sck(spi_sck), .ss_n(spi_ss_n), .mosi(spi_mosi),
    .wr_en, .wr_addr, .wr_data
  );

  reg_bank u_regs (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .cfg);

  baud_tick_gen u_baud (.clk, .rst_n, .divisor(cfg.divisor), .tick);

  uart_rx u_rx (
    .clk, .rst_n, .tick, .rxd, .data(rx_data), .parity_bit(rx_parity),
    .receive_flag, .parity_err, .framing_err
  );

  bus_monitor u_bus (.clk, .rst_n, .tick, .receive_flag, .bus_active);

  trigger_condition u_trig (
    .clk, .rst_n, .receive_flag, .uart_rx(rx_data), .parity_err, .bus_active,
    .trig_mask(cfg.trig_mask), .sa(cfg.sa), .da(cfg.da), .fc(cfg.fc),
    .fc_mask(cfg.fc_mask), .le(cfg.le), .dsap(cfg.dsap), .ssap(cfg.ssap),
    .pdu_pos(cfg.pdu_pos), .pdu_val(cfg.pdu_val),
    .char_rank, .sd_found, .sa_found, .da_found, .tel_error, .trigger
  );

  pulse_stretcher u_pulse (.clk, .rst_n, .trig(trigger), .pulse(trigger_out));

  error_driver u_err (
    .clk, .rst_n, .active(trigger_out && cfg.err_en), .err_type(cfg.err_type),
    .a_hi, .a_lo, .b_hi, .b_lo
  );

endmodule

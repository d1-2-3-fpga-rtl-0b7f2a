// trigger_condition: decides from the received characters whether the
// user's trigger event has happened.
//
// Inputs are the UART receiver's character strobe and byte and the bus
// monitor's `bus_active`. Inside:
//  * character_rank: cleared while the bus is idle, incremented on each
//    received character while the bus is active. The first character of a
//    telegram arrives while the bus is still idle, so it keeps rank 0, the
//    next one gets rank 1, and so on.
//  * start delimiter: a character that arrives while the bus is idle and is
//    SD1, SD2, SD3, SD4 or SC starts a telegram. The previous character is
//    not checked for ED because a token telegram (SD4) has no ED.
//  * source and destination address: two addr_match_fsm instances, SA at
//    ranks 2 / 5 and DA at ranks 1 / 4 (SD1-SD3-SD4 / SD2).
//  * parity error and "any character" conditions.
//  * telegram_decoder: LE, FC, SAP, no-SAP, DSAP, SSAP and PDU-byte fields
//    and the telegram structure check.
// `trig_mask` selects which conditions (pb_pkg::TRG_*) fire `trigger`; more
// than one may be enabled, and they are ORed.
//
// Timing: `receive_flag` in clock n gives `sd_found` and `char_rank` in clock
// n+1, `sa_found`/`da_found` and the decoder's field conditions in clock
// n+2, and `trigger` one clock after the condition that caused it. The rank
// counter, the SD rule and the SA machine follow the original design; the
// other conditions come from its list of useful triggers, and the mask
// register is this design's own.
module trigger_condition
  import pb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       receive_flag,
  input  logic [7:0] uart_rx,
  input  logic       parity_err,
  input  logic       bus_active,
  input  logic [15:0] trig_mask,
  input  logic [7:0] sa,
  input  logic [7:0] da,
  input  logic [7:0] fc,
  input  logic [7:0] fc_mask,
  input  logic [7:0] le,
  input  logic [7:0] dsap,
  input  logic [7:0] ssap,
  input  logic [7:0] pdu_pos,
  input  logic [7:0] pdu_val,
  output logic [7:0] char_rank,
  output logic       sd_found,
  output logic       sa_found,
  output logic       da_found,
  output logic       tel_error,
  output logic       trigger
);

  logic char_valid;   // receive_flag delayed: char_rank now matches uart_rx
  logic par_found;
  logic is_sd;

  always_comb is_sd = (uart_rx == SD1) || (uart_rx == SD2) || (uart_rx == SD3) ||
                      (uart_rx == SD4) || (uart_rx == SC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      char_rank  <= '0;
      char_valid <= 1'b0;
      sd_found   <= 1'b0;
      par_found  <= 1'b0;
    end else begin
      if (!bus_active)
        char_rank <= '0;
      else if (receive_flag && char_rank != 8'hFF)
        char_rank <= char_rank + 1'b1;
      char_valid <= receive_flag;
      sd_found   <= receive_flag && !bus_active && is_sd;
      par_found  <= receive_flag && parity_err;
    end
  end

  addr_match_fsm #(.POS_SHORT(2), .POS_SD2(5)) u_sa (
    .clk, .rst_n, .char_valid, .char_rank, .char_data(uart_rx), .addr(sa),
    .found(sa_found)
  );

  addr_match_fsm #(.POS_SHORT(1), .POS_SD2(4)) u_da (
    .clk, .rst_n, .char_valid, .char_rank, .char_data(uart_rx), .addr(da),
    .found(da_found)
  );

  logic le_found, fc_found, sap_found, nosap_found, dsap_found, ssap_found, pdu_found;

  telegram_decoder u_tel (
    .clk, .rst_n, .char_valid, .char_rank, .char_data(uart_rx), .bus_active,
    .le_val(le), .fc_val(fc), .fc_mask, .dsap_val(dsap), .ssap_val(ssap),
    .pdu_pos, .pdu_val,
    .le_found, .fc_found, .sap_found, .nosap_found, .dsap_found, .ssap_found, .pdu_found,
    .tel_error
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trigger <= 1'b0;
    else trigger <= (trig_mask[TRG_SD]     && sd_found)  ||
                    (trig_mask[TRG_SA]     && sa_found)  ||
                    (trig_mask[TRG_DA]     && da_found)  ||
                    (trig_mask[TRG_PARITY] && par_found) ||
                    (trig_mask[TRG_CHAR]   && char_valid) ||
                    (trig_mask[TRG_TELERR] && tel_error) ||
                    (trig_mask[TRG_SAP]    && sap_found) ||
                    (trig_mask[TRG_NOSAP]  && nosap_found) ||
                    (trig_mask[TRG_DSAP]   && dsap_found) ||
                    (trig_mask[TRG_SSAP]   && ssap_found) ||
                    (trig_mask[TRG_FC]     && fc_found) ||
                    (trig_mask[TRG_LE]     && le_found) ||
                    (trig_mask[TRG_PDU]    && pdu_found);
  end

endmodule

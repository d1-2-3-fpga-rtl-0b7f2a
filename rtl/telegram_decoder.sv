// telegram_decoder: field-level triggers and a structure check for one
// PROFIBUS telegram at a time.
//
// The block sees each character once, on `char_valid` (the clock after the
// UART's receive flag, when `char_rank` holds the character's position). The
// start delimiter at rank 0 fixes the layout:
//   SD1: SD1 DA SA FC FCS ED                   (6 characters)
//   SD3: SD3 DA SA FC PDU x8 FCS ED            (14 characters)
//   SD2: SD2 LE LEr SD2 DA SA FC PDU.. FCS ED   (LE+6 characters)
//   SD4: SD4 DA SA                              (token, 3 characters)
//   SC : E5                                     (short confirmation)
// From the layout it knows the rank of every field and raises, one clock
// after the field's char_valid:
//   le_found    SD2 length byte equals `le_val`
//   fc_found    frame-control byte equals `fc_val` in the bits set in `fc_mask`
//               (so function code or request/response bit alone can be chosen)
//   nosap_found bit 7 (EXT) of both DA and SA low (any telegram with addresses)
//   sap_found   bit 7 of both DA and SA high, SD2 or SD3 only
//   dsap_found  SAP telegram whose first PDU byte equals `dsap_val`
//   ssap_found  SAP telegram whose second PDU byte equals `ssap_val`
//   pdu_found   SD2 or SD3 telegram whose PDU byte number `pdu_pos` (1 = the
//               first byte after FC) equals `pdu_val`; position 0 or beyond
//               the PDU never matches
//   tel_error   the telegram is not valid: first byte not a start delimiter,
//               LE outside 4..249, LEr different from LE, second SD2
//               missing, wrong frame check sequence (sum of DA..last PDU
//               byte modulo 256), missing ED, a character beyond the end, or
//               the bus going idle before the end. One pulse per telegram, at
//               the character where the error shows, or one clock after
//               `bus_active` falls for a telegram cut short.
// The list of conditions and where each is looked for follow the original
// trigger list; the compare-under-mask for FC and the rule that the first
// two PDU bytes are DSAP and SSAP when both EXT bits are set follow it too.
// The telegram layouts and the FCS rule are standard PROFIBUS. The register
// values the conditions compare with, and the single error pulse per
// telegram, are this design's own, and so is the reading of the list's
// "PDU#" entry as a compare of one chosen PDU byte.
module telegram_decoder
  import pb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       char_valid,
  input  logic [7:0] char_rank,
  input  logic [7:0] char_data,
  input  logic       bus_active,
  input  logic [7:0] le_val,
  input  logic [7:0] fc_val,
  input  logic [7:0] fc_mask,
  input  logic [7:0] dsap_val,
  input  logic [7:0] ssap_val,
  input  logic [7:0] pdu_pos,
  input  logic [7:0] pdu_val,
  output logic       le_found,
  output logic       fc_found,
  output logic       sap_found,
  output logic       nosap_found,
  output logic       dsap_found,
  output logic       ssap_found,
  output logic       pdu_found,
  output logic       tel_error
);

  // state of the telegram under way
  logic [7:0] sd;         // its start delimiter
  logic [7:0] le;         // SD2 length byte
  logic       da_ext;     // EXT bit (7) of the destination address
  logic [7:0] fcs;        // running sum of DA .. last PDU byte
  logic [8:0] last_rank;  // rank of the ED (or last character)
  logic [7:0] seen_rank;  // rank of the last character received
  logic       tracking;   // a telegram with a valid SD is being followed
  logic       failed;     // an error has been reported for this telegram
  logic       sap;        // both EXT bits set
  logic       bus_q;

  // field positions for the current telegram
  logic [7:0] da_rank, sa_rank, fc_rank;
  logic [8:0] fcs_rank;
  logic [8:0] pdu_rank;
  logic       sd_is_sd2, has_fc, sap_type;

  always_comb begin
    sd_is_sd2 = (sd == SD2);
    da_rank   = sd_is_sd2 ? 8'd4 : 8'd1;
    sa_rank   = da_rank + 8'd1;
    fc_rank   = da_rank + 8'd2;
    fcs_rank  = last_rank - 9'd1;
    has_fc    = (sd == SD1) || (sd == SD2) || (sd == SD3);
    sap_type  = (sd == SD2) || (sd == SD3);
    pdu_rank  = {1'b0, fc_rank} + {1'b0, pdu_pos};
  end

  // error found at this character (evaluated only while tracking)
  logic err_now;
  logic [8:0] r9;
  always_comb begin
    r9 = {1'b0, char_rank};
    err_now = 1'b0;
    if (r9 > last_rank) err_now = 1'b1;
    else if (sd_is_sd2 && char_rank == 8'd1) err_now = (char_data < 8'd4) || (char_data > 8'd249);
    else if (sd_is_sd2 && char_rank == 8'd2) err_now = (char_data != le);
    else if (sd_is_sd2 && char_rank == 8'd3) err_now = (char_data != SD2);
    else if (has_fc && r9 == fcs_rank)       err_now = (char_data != fcs);
    else if (has_fc && r9 == last_rank)      err_now = (char_data != ED);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sd <= '0; le <= '0; da_ext <= 1'b0; fcs <= '0;
      last_rank <= '0; seen_rank <= '0;
      tracking <= 1'b0; failed <= 1'b0; sap <= 1'b0; bus_q <= 1'b0;
      {le_found, fc_found, sap_found, nosap_found, dsap_found, ssap_found, pdu_found,
       tel_error} <= '0;
    end else begin
      bus_q <= bus_active;
      {le_found, fc_found, sap_found, nosap_found, dsap_found, ssap_found, pdu_found,
       tel_error} <= '0;

      if (char_valid && char_rank == 8'd0) begin
        // a new telegram
        sd        <= char_data;
        fcs       <= '0;
        sap       <= 1'b0;
        seen_rank <= '0;
        unique case (char_data)
          SD1:     last_rank <= 9'd5;
          SD3:     last_rank <= 9'd13;
          SD4:     last_rank <= 9'd2;
          SC:      last_rank <= 9'd0;
          SD2:     last_rank <= 9'd255;  // known once LE has arrived
          default: last_rank <= 9'd0;
        endcase
        if (char_data == SD1 || char_data == SD2 || char_data == SD3 ||
            char_data == SD4 || char_data == SC) begin
          tracking <= 1'b1;
          failed   <= 1'b0;
        end else begin
          tracking  <= 1'b0;
          failed    <= 1'b1;
          tel_error <= 1'b1;
        end
      end else if (char_valid && tracking) begin
        seen_rank <= char_rank;
        // structure check
        if (!failed && err_now) begin
          failed    <= 1'b1;
          tel_error <= 1'b1;
        end
        if (sd_is_sd2 && char_rank == 8'd1) begin
          le        <= char_data;
          last_rank <= {1'b0, char_data} + 9'd5;
          le_found  <= (char_data == le_val);
        end
        if (char_rank >= da_rank && r9 < fcs_rank) fcs <= fcs + char_data;
        if (char_rank == da_rank) da_ext <= char_data[7];
        if (char_rank == sa_rank && sd != SC) begin
          nosap_found <= !da_ext && !char_data[7];
          sap_found   <= sap_type && da_ext && char_data[7];
          sap         <= sap_type && da_ext && char_data[7];
        end
        if (has_fc && char_rank == fc_rank)
          fc_found <= ((char_data ^ fc_val) & fc_mask) == 8'h00;
        if (sap && char_rank == fc_rank + 8'd1 && r9 < fcs_rank)
          dsap_found <= (char_data == dsap_val);
        if (sap && char_rank == fc_rank + 8'd2 && r9 < fcs_rank)
          ssap_found <= (char_data == ssap_val);
        if (sap_type && pdu_pos != 8'd0 && r9 == pdu_rank && r9 < fcs_rank)
          pdu_found <= (char_data == pdu_val);
      end

      // telegram cut short: the bus went idle before the last character
      if (bus_q && !bus_active && tracking) begin
        tracking <= 1'b0;
        if (!failed && {1'b0, seen_rank} < last_rank) begin
          failed    <= 1'b1;
          tel_error <= 1'b1;
        end
      end
    end
  end

endmodule

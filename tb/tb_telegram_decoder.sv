// tb_telegram_decoder: generated telegrams of every type through the
// field decoder and structure check.
//
// The testbench builds telegrams itself (SD1, SD2 with 1..12 PDU bytes, SD3,
// SD4, SC) with a correct length and frame check sequence, and then may
// spoil one of them: wrong first byte, LE out of range, LEr different from
// LE, wrong FCS, wrong ED, one character too many, or cut short. Because it
// placed every field, it knows how many pulses each output must give; it
// drives the characters with their rank (as the rank counter would) and
// bus_active (high from the clock after the first character until a gap
// after the last) and counts the pulses of every output over the telegram
// and the following gap. Field outputs are compared for every telegram whose
// fields all arrived; tel_error for every telegram. The PDU-byte compare
// is tried at random positions 0..10, some of them beyond the PDU.
module tb_telegram_decoder;
  import pb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic char_valid = 1'b0, bus_active = 1'b0;
  logic [7:0] char_rank = '0, char_data = '0;
  logic [7:0] le_val = '0, fc_val = '0, fc_mask = 8'hFF, dsap_val = '0, ssap_val = '0;
  logic [7:0] pdu_pos = 8'd1, pdu_val = '0;
  logic le_found, fc_found, sap_found, nosap_found, dsap_found, ssap_found, pdu_found,
        tel_error;
  int checks = 0, failures = 0;
  int cnt [8];
  int total [8] = '{0, 0, 0, 0, 0, 0, 0, 0};

  telegram_decoder dut (.clk, .rst_n, .char_valid, .char_rank, .char_data, .bus_active,
                        .le_val, .fc_val, .fc_mask, .dsap_val, .ssap_val, .pdu_pos, .pdu_val,
                        .le_found,
                        .fc_found, .sap_found, .nosap_found, .dsap_found, .ssap_found,
                        .pdu_found, .tel_error);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cnt[0] += int'(le_found);
    cnt[1] += int'(fc_found);
    cnt[2] += int'(sap_found);
    cnt[3] += int'(nosap_found);
    cnt[4] += int'(dsap_found);
    cnt[5] += int'(ssap_found);
    cnt[6] += int'(pdu_found);
    cnt[7] += int'(tel_error);
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {OK, BAD_SD, BAD_LE, BAD_LER, BAD_FCS, BAD_ED, EXTRA, SHORT} spoil_e;
  string names [8] = '{"le", "fc", "sap", "nosap", "dsap", "ssap", "pdu", "tel_error"};

  task automatic run(input logic [7:0] t[$]);
    foreach (cnt[k]) cnt[k] = 0;
    foreach (t[i]) begin
      char_valid <= 1'b1;
      char_rank  <= 8'(i);
      char_data  <= t[i];
      @(posedge clk);
      #1;
      char_valid <= 1'b0;
      if (i == 0) bus_active <= 1'b1;
      repeat (6) @(posedge clk);
      #1;
    end
    repeat (4) @(posedge clk);
    #1;
    bus_active <= 1'b0;
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [7:0] addrs [4] = '{8'h02, 8'h82, 8'h3C, 8'hBC};
    logic [7:0] fcs_v [4] = '{8'h6C, 8'h5C, 8'h08, 8'h4D};
    logic [7:0] fmask [3] = '{8'hFF, 8'h0F, 8'h40};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] t[$];
      logic [7:0] sd, da, sa, fc, sum, le;
      logic [7:0] pdu[$];
      int kind, npdu, ppos, exp [8];
      spoil_e spoil;
      logic fields_ok;
      // compare values
      le_val   = 8'(3 + 1 + $urandom % 4);
      fc_val   = fcs_v[$urandom % 4];
      fc_mask  = fmask[$urandom % 3];
      dsap_val = 8'($urandom % 3);
      ssap_val = 8'($urandom % 3);
      pdu_pos  = 8'($urandom % 11);
      pdu_val  = 8'($urandom % 3);
      // the telegram
      kind = $urandom % 5;
      da = addrs[$urandom % 4];
      sa = addrs[$urandom % 4];
      fc = fcs_v[$urandom % 4];
      pdu = {};
      npdu = (kind == 1) ? 1 + $urandom % 12 : (kind == 2) ? 8 : 0;
      for (int i = 0; i < npdu; i++) pdu.push_back(8'($urandom % 3));
      sum = da + sa + fc;
      foreach (pdu[i]) sum += pdu[i];
      le = 8'(3 + npdu);
      t = {};
      unique case (kind)
        0: begin sd = SD1; t = '{SD1, da, sa, fc, sum, ED}; end
        1: begin sd = SD2; t = '{SD2, le, le, SD2, da, sa, fc}; t = {t, pdu, sum, ED}; end
        2: begin sd = SD3; t = '{SD3, da, sa, fc}; t = {t, pdu, sum, ED}; end
        3: begin sd = SD4; t = '{SD4, da, sa}; end
        default: begin sd = SC; t = '{SC}; end
      endcase
      // expected pulses of the intact telegram
      foreach (exp[k]) exp[k] = 0;
      exp[0] = int'(sd == SD2 && le == le_val);
      exp[1] = int'((sd == SD1 || sd == SD2 || sd == SD3) && ((fc ^ fc_val) & fc_mask) == 0);
      exp[2] = int'((sd == SD2 || sd == SD3) && da[7] && sa[7]);
      exp[3] = int'(sd != SC && !da[7] && !sa[7]);
      exp[4] = int'(exp[2] == 1 && npdu >= 1 && pdu[0] == dsap_val);
      exp[5] = int'(exp[2] == 1 && npdu >= 2 && pdu[1] == ssap_val);
      ppos = pdu_pos;
      if ((sd == SD2 || sd == SD3) && ppos >= 1 && ppos <= npdu)
        if (pdu[ppos - 1] == pdu_val) exp[6] = 1;
      // spoil it, one time in two
      spoil = OK;
      fields_ok = 1'b1;
      if ($urandom % 2) begin
        spoil = spoil_e'(1 + $urandom % 7);
        unique case (spoil)
          BAD_SD:  begin t[0] = 8'h3C; fields_ok = 1'b0; end
          BAD_LE:  if (sd == SD2) begin t[1] = 8'd250; t[2] = 8'd250; exp[0] = 0; end
                   else spoil = OK;
          BAD_LER: if (sd == SD2) t[2] = t[1] + 8'd1; else spoil = OK;
          BAD_FCS: if (sd inside {SD1, SD2, SD3}) t[t.size() - 2] += 8'd1; else spoil = OK;
          BAD_ED:  if (sd inside {SD1, SD2, SD3}) t[t.size() - 1] = 8'h17; else spoil = OK;
          EXTRA:   t.push_back(8'h16);
          SHORT:   if (t.size() > 1) begin
                     void'(t.pop_back());
                     fields_ok = 1'b0;
                   end else spoil = OK;
          default: ;
        endcase
      end
      // an LE out of range moves the end; only tel_error is meaningful then
      if (spoil == BAD_LE) fields_ok = 1'b0;
      exp[7] = int'(spoil != OK);
      run(t);
      for (int k = 0; k < 8; k++) begin
        if (k < 7 && !fields_ok) continue;
        checks++;
        total[k] += cnt[k];
        if (cnt[k] != exp[k]) begin
          failures++;
          $display("%s: %0d pulses, expected %0d (spoil %s, telegram %p)", names[k], cnt[k],
                   exp[k], spoil.name(), t);
        end
      end
    end
    foreach (total[k]) begin
      checks++;
      if (total[k] < 20) begin
        failures++;
        $display("%s exercised only %0d times", names[k], total[k]);
      end
    end
    $display("pulses: le %0d fc %0d sap %0d nosap %0d dsap %0d ssap %0d pdu %0d tel_error %0d",
             total[0], total[1], total[2], total[3], total[4], total[5], total[6],
             total[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

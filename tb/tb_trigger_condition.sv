// tb_trigger_condition: telegrams at character level through the trigger
// logic.
//
// The testbench plays the UART receiver (one-clock receive_flag with the
// byte and a parity-error flag) and the bus monitor (bus_active rises the
// clock after the first character of a telegram and falls in the gap after
// it). For every character it checks the character rank, for the first one
// the start-delimiter flag, and it counts the clocks with trigger high after
// each character against the number worked out from the telegram and the
// trigger mask: SD at rank 0 if the byte is SD1-SD4 or SC, a parity error,
// or any character give one clock (they coincide); SA at rank 2 (SD1, SD3,
// SD4) or 5 (SD2) and DA at rank 1 or 4 give one clock more, one clock
// later. The SD trigger must come two clocks after receive_flag. The
// field and structure conditions of telegram_decoder have their own
// testbench and are left disabled here.
module tb_trigger_condition;
  import pb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic receive_flag = 1'b0, parity_err = 1'b0, bus_active = 1'b0;
  logic [7:0] uart_rx = '0, sa = 8'h3C, da = 8'h02;
  logic [15:0] trig_mask = '0;
  logic [7:0] fc = '0, fc_mask = '0, le = '0, dsap = '0, ssap = '0;
  logic [7:0] pdu_pos = '0, pdu_val = '0;
  logic [7:0] char_rank;
  logic sd_found, sa_found, da_found, tel_error, trigger;
  int checks = 0, failures = 0;
  int trig_count = 0;
  int seen [5] = '{0, 0, 0, 0, 0};   // SD, SA, DA, parity, char triggers expected

  trigger_condition dut (.clk, .rst_n, .receive_flag, .uart_rx, .parity_err,
                         .bus_active, .trig_mask, .sa, .da, .fc, .fc_mask, .le, .dsap, .ssap,
                         .pdu_pos, .pdu_val, .char_rank, .sd_found, .sa_found, .da_found, .tel_error, .trigger);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && trigger) trig_count++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic is_sd(input logic [7:0] b);
    return b == SD1 || b == SD2 || b == SD3 || b == SD4 || b == SC;
  endfunction

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("%s", msg);
    end
  endtask

  task automatic telegram(input logic [7:0] t[$], input logic [7:0] perr_mask);
    int exp_trig, pos_sa, pos_da;
    logic [7:0] sd;
    sd = t[0];
    pos_sa = (sd == SD1 || sd == SD3 || sd == SD4) ? 2 : (sd == SD2) ? 5 : -1;
    pos_da = (sd == SD1 || sd == SD3 || sd == SD4) ? 1 : (sd == SD2) ? 4 : -1;
    foreach (t[i]) begin
      logic pe;
      pe = (i < 8) && perr_mask[i];
      // SD, parity and any-character fire in the same clock; SA and DA one
      // clock later: coincident conditions give one trigger clock
      begin
        logic early, late;
        early = 1'b0; late = 1'b0;
        if (trig_mask[TRG_SD] && i == 0 && is_sd(sd)) begin early = 1'b1; seen[0]++; end
        if (trig_mask[TRG_SA] && i == pos_sa && t[i] == sa) begin late = 1'b1; seen[1]++; end
        if (trig_mask[TRG_DA] && i == pos_da && t[i] == da) begin late = 1'b1; seen[2]++; end
        if (trig_mask[TRG_PARITY] && pe) begin early = 1'b1; seen[3]++; end
        if (trig_mask[TRG_CHAR]) begin early = 1'b1; seen[4]++; end
        exp_trig = int'(early) + int'(late);
      end
      trig_count = 0;
      receive_flag <= 1'b1;
      uart_rx      <= t[i];
      parity_err   <= pe;
      @(posedge clk);
      #1;
      receive_flag <= 1'b0;
      chk(sd_found == (i == 0 && is_sd(sd)),
          $sformatf("sd_found=%0d at rank %0d byte %02x", sd_found, i, t[i]));
      chk(char_rank == 8'(i), $sformatf("char_rank=%0d, expected %0d", char_rank, i));
      if (i == 0) bus_active <= 1'b1;
      @(posedge clk);
      #1;
      if (trig_mask == (16'd1 << TRG_SD) && i == 0)
        chk(trigger == is_sd(sd), "SD trigger not two clocks after receive_flag");
      // characters are 11 bits apart; a few clocks suffice here
      repeat (12) @(posedge clk);
      #1;
      chk(trig_count == exp_trig,
          $sformatf("%0d trigger pulses at rank %0d, expected %0d (mask %02x, telegram %p)",
                    trig_count, i, exp_trig, trig_mask, t));
    end
    // gap between telegrams
    bus_active <= 1'b0;
    repeat (3) @(posedge clk);
    #1;
    chk(char_rank == 0, "char_rank not cleared in the gap");
  endtask

  initial begin
    logic [7:0] q[$];
    logic [7:0] sds[6] = '{SD1, SD2, SD3, SD4, SC, 8'h3C};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    // the three telegrams of the design's simulation, SD then SA then both
    for (int m = 0; m < 3; m++) begin
      trig_mask = (m == 0) ? 16'h01 : (m == 1) ? 16'h02 : 16'h03;
      telegram('{SD4, 8'h3C, 8'h3C}, 8'h00);
      telegram('{SD2, 8'h04, 8'h04, SD2, 8'h1E, 8'h3C, 8'h5D, 8'hE7, 8'h96, ED}, 8'h00);
      telegram('{SD2, 8'h04, 8'h04, SD2, 8'h3C, 8'h1E, 8'h08, 8'h00, 8'h62, ED}, 8'h00);
      telegram('{SC}, 8'h00);
    end
    // random telegrams and masks
    for (int n = 0; n < 400; n++) begin
      int len;
      trig_mask = 16'($urandom % 32);
      sa = 8'($urandom % 4);
      da = 8'($urandom % 4);
      len = 1 + $urandom % 9;
      q = {};
      q.push_back(sds[$urandom % 6]);
      for (int i = 1; i < len; i++) q.push_back(8'($urandom % 4));
      telegram(q, ($urandom % 3 == 0) ? 8'($urandom) : 8'h00);
    end
    foreach (seen[k])
      chk(seen[k] > 10, $sformatf("condition %0d exercised only %0d times", k, seen[k]));
    $display("triggers exercised: SD %0d SA %0d DA %0d parity %0d char %0d",
             seen[0], seen[1], seen[2], seen[3], seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

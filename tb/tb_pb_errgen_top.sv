// tb_pb_errgen_top: the whole error generator, end to end, at its default
// parameters.
//
// The testbench plays both sides of the board: an SPI master (the HMI
// microcontroller) that loads the parameter registers, and a PROFIBUS station
// that sends serial telegrams on rxd. It runs these scenarios:
//   1. reset configuration, 1.5 Mbit/s, trigger on start delimiter: the three
//      telegrams of the design's simulation plus a short confirmation
//   2. trigger on start delimiter OR source address 0x3F
//   3. trigger on destination address, then on parity error
//   4. 187.5 kbit/s, one trigger per received character
//   5. error applied: A to Gnd / B to 5 V, then A to 5 V / B untouched
//   6. 12 Mbit/s (the maximum), start-delimiter trigger
//   7. field triggers: LE, FC under mask, SAP with DSAP and SSAP, no SAP,
//      a chosen PDU byte, and invalid telegrams (wrong FCS, wrong ED, cut short)
// Expected trigger pulses come from a reference model of the trigger rules
// applied to the telegram bytes (rank of SA/DA by start delimiter; pulses
// closer than the 10 us pulse length merge). Also checked: every pulse is at
// least 1920 clocks long and unmerged pulses exactly that; a start-delimiter
// pulse begins between 10 and 11 bit times after the start edge of the
// delimiter; bus_active is high at every character after the first and falls
// 1.5 character times (264 sampling ticks) after the last one, within one
// bit; the gate outputs follow the trigger pulse one clock later in the
// programmed pattern when the error is enabled and stay off otherwise. Each
// mechanism (SD, SA, DA, parity, character, LE, FC, SAP, no-SAP, DSAP, SSAP,
// PDU-byte and invalid-telegram triggers, bus idle detection, bit-rate change,
// clamping) must have happened at least once.
module tb_pb_errgen_top;
  import pb_pkg::*;

  localparam int PULSE = 1920;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rxd = 1'b1, spi_sck = 1'b0, spi_ss_n = 1'b1, spi_mosi = 1'b0;
  logic trigger_out, bus_active, a_hi, a_lo, b_hi, b_lo;
  int checks = 0, failures = 0;

  pb_errgen_top dut (.clk, .rst_n, .rxd, .spi_sck, .spi_ss_n, .spi_mosi, .trigger_out,
                     .bus_active, .a_hi, .a_lo, .b_hi, .b_lo);

  always #5 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("[%0d] %s", cyc, msg);
    end
  endtask

  // ---------------------------------------------------------------- state
  int divisor = 8;            // current bit-rate divisor
  logic [15:0] mask = 16'h01;
  logic [7:0] sa = 8'h3C, da = 8'h00, etype = 8'h00;
  logic [7:0] fcv = 8'h00, fcm = 8'hFF, lev = 8'h00, dsapv = 8'h00, ssapv = 8'h00;
  logic [7:0] pdup = 8'h01, pduv = 8'h00;
  int n_le = 0, n_fc = 0, n_sap = 0, n_nosap = 0, n_dsap = 0, n_ssap = 0, n_tel = 0,
      n_pdu = 0;
  logic err_en = 1'b0;
  int n_sd = 0, n_sa = 0, n_da = 0, n_par = 0, n_char = 0, n_idle = 0, n_rate = 0;
  int n_clamp = 0;

  // ---------------------------------------------------------------- SPI
  task automatic spi_write(input logic [7:0] a, input logic [7:0] d);
    logic [15:0] w;
    w = {a, d};
    spi_ss_n <= 1'b0;
    repeat (10) @(posedge clk);
    for (int i = 15; i >= 0; i--) begin
      spi_mosi <= w[i];
      repeat (10) @(posedge clk);
      spi_sck <= 1'b1;
      repeat (10) @(posedge clk);
      spi_sck <= 1'b0;
    end
    repeat (10) @(posedge clk);
    spi_ss_n <= 1'b1;
    repeat (20) @(posedge clk);
  endtask

  task automatic set_rate(input int d);
    if (d != divisor) n_rate++;
    divisor = d;
    spi_write(REG_DIV_LO, 8'(d));
    spi_write(REG_DIV_HI, 8'(d >> 8));
  endtask

  // ---------------------------------------------------------------- pulses
  int rises = 0;
  longint t_rise = 0, t_rise_first = 0;
  int widths[$];
  logic trig_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    trig_q <= trigger_out;
    if (trigger_out && !trig_q) begin
      rises++;
      t_rise = cyc;
      if (rises == 1) t_rise_first = cyc;
    end
    if (!trigger_out && trig_q) widths.push_back(int'(cyc - t_rise));
  end

  // gate outputs: one clock after the pulse, in the programmed pattern
  logic trig_mid = 1'b0;      // trigger_out sampled between clock edges
  always @(negedge clk) trig_mid <= trigger_out;
  always @(posedge clk) if (rst_n) begin
    logic [3:0] expv;
    line_mode_e ma, mb;
    ma = line_mode_e'(etype[1:0]);
    mb = line_mode_e'(etype[3:2]);
    expv = (trig_mid && err_en) ? {ma == LINE_HIGH, ma == LINE_LOW, mb == LINE_HIGH, mb == LINE_LOW}
                              : 4'b0;
    #1;
    checks++;
    if ({a_hi, a_lo, b_hi, b_lo} !== expv) begin
      failures++;
      $display("[%0d] gates %b, expected %b", cyc, {a_hi, a_lo, b_hi, b_lo}, expv);
    end
    if (expv != 0) n_clamp++;
  end

  // ---------------------------------------------------------------- UART
  longint t_start0;           // start edge of the first character of a telegram
  longint t_start_last;

  task automatic send_char(input logic [7:0] b, input logic bad_par);
    logic [10:0] f;
    f = {1'b1, ^b ^ bad_par, b, 1'b0};
    t_start_last = cyc;
    for (int i = 0; i < 11; i++) begin
      rxd <= f[i];
      repeat (16 * divisor) @(posedge clk);
    end
  endtask

  // reference model: character indices at which the configured trigger fires
  function automatic void events(input logic [7:0] t[$], input int perr_at, input int bad_at,
                                 ref int ev[$]);
    int pos_sa, pos_da, pos_fc, fcs_at;
    logic sap_t;
    logic [7:0] sd;
    logic sd_ok;
    sd = t[0];
    sd_ok = sd == SD1 || sd == SD2 || sd == SD3 || sd == SD4 || sd == SC;
    pos_sa = (sd == SD1 || sd == SD3 || sd == SD4) ? 2 : (sd == SD2) ? 5 : -1;
    pos_da = (sd == SD1 || sd == SD3 || sd == SD4) ? 1 : (sd == SD2) ? 4 : -1;
    pos_fc = (sd == SD1 || sd == SD3) ? 3 : (sd == SD2) ? 6 : -1;
    fcs_at = t.size() - 2;
    sap_t = (sd == SD2 || sd == SD3) && t.size() > pos_sa && t[pos_da][7] && t[pos_sa][7];
    ev = {};
    foreach (t[i]) begin
      logic hit;
      hit = 1'b0;
      if (mask[TRG_LE] && sd == SD2 && i == 1 && t[i] == lev) begin hit = 1'b1; n_le++; end
      if (mask[TRG_FC] && i == pos_fc && ((t[i] ^ fcv) & fcm) == 0) begin hit = 1'b1; n_fc++; end
      if (mask[TRG_SAP] && sap_t && i == pos_sa) begin hit = 1'b1; n_sap++; end
      if (mask[TRG_NOSAP] && pos_sa > 0 && i == pos_sa && !t[pos_da][7] && !t[pos_sa][7])
        begin hit = 1'b1; n_nosap++; end
      if (mask[TRG_DSAP] && sap_t && i == pos_fc + 1 && i < fcs_at && t[i] == dsapv)
        begin hit = 1'b1; n_dsap++; end
      if (mask[TRG_SSAP] && sap_t && i == pos_fc + 2 && i < fcs_at && t[i] == ssapv)
        begin hit = 1'b1; n_ssap++; end
      if (mask[TRG_PDU] && (sd == SD2 || sd == SD3) && pdup != 0 && i == pos_fc + int'(pdup) &&
          i < fcs_at && t[i] == pduv)
        begin hit = 1'b1; n_pdu++; end
      if (mask[TRG_TELERR] && i == bad_at) begin hit = 1'b1; n_tel++; end
      if (mask[TRG_SD] && i == 0 && sd_ok) begin hit = 1'b1; n_sd++; end
      if (mask[TRG_SA] && i == pos_sa && t[i] == sa) begin hit = 1'b1; n_sa++; end
      if (mask[TRG_DA] && i == pos_da && t[i] == da) begin hit = 1'b1; n_da++; end
      if (mask[TRG_PARITY] && i == perr_at) begin hit = 1'b1; n_par++; end
      if (mask[TRG_CHAR]) begin hit = 1'b1; n_char++; end
      if (hit) ev.push_back(i);
    end
  endfunction

  // bad_at: rank at which the telegram shows an error; t.size() for one cut
  // short (the error comes when the bus goes idle)
  task automatic telegram(input logic [7:0] t[$], input int perr_at = -1, input int bad_at = -1);
    int ev[$];
    int exp_rises, r0, char_clk;
    longint t_fall;
    char_clk = 11 * 16 * divisor;
    events(t, perr_at, bad_at, ev);
    if (mask[TRG_TELERR] && bad_at == t.size()) begin ev.push_back(1000); n_tel++; end
    // pulses of characters closer than the pulse length merge into one
    exp_rises = 0;
    foreach (ev[k])
      if (k == 0 || (ev[k] - ev[k-1]) * char_clk > PULSE + 8) exp_rises++;
    r0 = rises;
    foreach (t[i]) begin
      if (i == 0) t_start0 = cyc;
      if (i > 0) chk(bus_active, $sformatf("bus_active low at character %0d", i));
      send_char(t[i], i == perr_at);
    end
    // wait for the bus to go idle and measure when it did
    while (bus_active) @(posedge clk);
    t_fall = cyc;
    n_idle++;
    chk(t_fall - t_start_last >= longint'(16 * divisor) * 10 + 264 * divisor - 16 * divisor &&
        t_fall - t_start_last <= longint'(16 * divisor) * 11 + 264 * divisor + 16 * divisor,
        $sformatf("bus idle %0d clocks after the last start edge (bit %0d clocks)",
                  t_fall - t_start_last, 16 * divisor));
    // gap: let the last pulse end
    repeat (PULSE + 100) @(posedge clk);
    chk(rises - r0 == exp_rises, $sformatf("%0d trigger pulses for telegram %p, expected %0d",
                                         rises - r0, t, exp_rises));
    if (mask == 16'h01 && exp_rises == 1)
      chk(t_rise >= t_start0 + 10 * 16 * divisor && t_rise <= t_start0 + 11 * 16 * divisor,
          $sformatf("SD pulse %0d clocks after the start edge", t_rise - t_start0));
  endtask

  task automatic sim_telegrams();
    telegram('{SD4, 8'h3C, 8'h3C});
    telegram('{SD2, 8'h04, 8'h04, SD2, 8'h1E, 8'h3C, 8'h5D, 8'hE7, 8'h96, ED});
    telegram('{SD2, 8'h04, 8'h04, SD2, 8'h3C, 8'h1E, 8'h08, 8'h00, 8'h62, ED});
    telegram('{SC});
  endtask

  task automatic configure(input logic [15:0] m, input logic [7:0] s, input logic [7:0] d,
                        input logic [7:0] et, input logic en);
    mask = m; sa = s; da = d; etype = et; err_en = en;
    spi_write(REG_TRIG, m[7:0]);
    spi_write(REG_TRIG_HI, m[15:8]);
    spi_write(REG_SA, s);
    spi_write(REG_DA, d);
    spi_write(REG_ERRTYPE, et);
    spi_write(REG_CTRL, {7'd0, en});
  endtask

  task automatic set_values(input logic [7:0] f, input logic [7:0] fm, input logic [7:0] l,
                            input logic [7:0] ds, input logic [7:0] ss);
    fcv = f; fcm = fm; lev = l; dsapv = ds; ssapv = ss;
    spi_write(REG_FC, f);
    spi_write(REG_FC_MASK, fm);
    spi_write(REG_LE, l);
    spi_write(REG_DSAP, ds);
    spi_write(REG_SSAP, ss);
  endtask

  // well-formed telegrams with their frame check sequence
  function automatic void mk_sd1(input logic [7:0] d, input logic [7:0] s, input logic [7:0] f,
                                 ref logic [7:0] t[$]);
    t = '{SD1, d, s, f, 8'(d + s + f), ED};
  endfunction

  function automatic void mk_sd2(input logic [7:0] d, input logic [7:0] s, input logic [7:0] f,
                                 input logic [7:0] pdu[$], ref logic [7:0] t[$]);
    logic [7:0] sum, le;
    sum = d + s + f;
    foreach (pdu[i]) sum += pdu[i];
    le = 8'(3 + pdu.size());
    t = '{SD2, le, le, SD2, d, s, f};
    t = {t, pdu, sum, ED};
  endfunction

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (50) @(posedge clk);
    // 1. reset configuration: 1.5 Mbit/s, SD trigger, no error
    sim_telegrams();
    foreach (widths[k]) chk(widths[k] == PULSE, $sformatf("pulse width %0d", widths[k]));
    // 2. SD or SA = 0x3F
    configure(16'h03, 8'h3F, 8'h00, 8'h00, 1'b0);
    telegram('{SD1, 8'h02, 8'h3F, 8'h49, 8'h8A, ED});
    telegram('{SD2, 8'h05, 8'h05, SD2, 8'h02, 8'h3F, 8'h5D, 8'h3E, 8'h00, 8'hDE, ED});
    telegram('{SD4, 8'h3F, 8'h05});
    telegram('{SD4, 8'h05, 8'h3F});
    sim_telegrams();
    // 3. DA, then parity error
    configure(16'h04, 8'h3C, 8'h02, 8'h00, 1'b0);
    telegram('{SD1, 8'h02, 8'h3F, 8'h49, 8'h8A, ED});
    telegram('{SD2, 8'h05, 8'h05, SD2, 8'h02, 8'h3F, 8'h5D, 8'h3E, 8'h00, 8'hDE, ED});
    telegram('{SD2, 8'h05, 8'h05, SD2, 8'h3F, 8'h02, 8'h5D, 8'h3E, 8'h00, 8'hDE, ED});
    configure(16'h08, 8'h3C, 8'h02, 8'h00, 1'b0);
    telegram('{SD1, 8'h02, 8'h3F, 8'h49, 8'h8A, ED}, 3);
    telegram('{SD4, 8'h3F, 8'h05});
    // 4. 187.5 kbit/s, every character
    set_rate(64);
    configure(16'h10, 8'h3C, 8'h02, 8'h00, 1'b0);
    telegram('{SD4, 8'h3C, 8'h3C});
    telegram('{SD1, 8'h02, 8'h3F, 8'h49, 8'h8A, ED});
    // 5. errors applied, back at 1.5 Mbit/s
    set_rate(8);
    configure(16'h01, 8'h3C, 8'h02, {4'h0, LINE_HIGH, LINE_LOW}, 1'b1);
    telegram('{SD4, 8'h3C, 8'h3C});
    configure(16'h02, 8'h3C, 8'h02, {4'h0, LINE_FREE, LINE_HIGH}, 1'b1);
    telegram('{SD2, 8'h04, 8'h04, SD2, 8'h1E, 8'h3C, 8'h5D, 8'hE7, 8'h96, ED});
    // 6. 12 Mbit/s
    set_rate(1);
    configure(16'h01, 8'h3C, 8'h02, 8'h00, 1'b0);
    sim_telegrams();
    telegram('{SD1, 8'h02, 8'h3F, 8'h49, 8'h8A, ED});

    // 7. field triggers and invalid telegrams, 1.5 Mbit/s
    set_rate(8);
    begin
      logic [7:0] t[$];
      set_values(8'h6C, 8'h0F, 8'd7, 8'h3E, 8'h3D);
      configure(16'h0800, 8'h3C, 8'h02, 8'h00, 1'b0);               // LE = 7
      mk_sd2(8'h02, 8'h3F, 8'h5D, '{8'h11, 8'h22, 8'h33, 8'h44}, t); telegram(t);
      mk_sd2(8'h02, 8'h3F, 8'h5D, '{8'h11, 8'h22, 8'h33}, t);        telegram(t);
      configure(16'h0400, 8'h3C, 8'h02, 8'h00, 1'b0);               // FC low nibble C
      mk_sd1(8'h02, 8'h3F, 8'h5C, t); telegram(t);
      mk_sd1(8'h02, 8'h3F, 8'h49, t); telegram(t);
      mk_sd2(8'h02, 8'h3F, 8'h7C, '{8'h11}, t); telegram(t);
      configure(16'h0140, 8'h3C, 8'h02, 8'h00, 1'b0);               // SAP, DSAP
      mk_sd2(8'h82, 8'hBF, 8'h5D, '{8'h3E, 8'h3D, 8'h00, 8'h01, 8'h02}, t); telegram(t);
      mk_sd2(8'h82, 8'hBF, 8'h5D, '{8'h3D, 8'h3E, 8'h00, 8'h01, 8'h02}, t); telegram(t);
      configure(16'h0280, 8'h3C, 8'h02, 8'h00, 1'b0);               // no SAP, SSAP
      mk_sd2(8'h82, 8'hBF, 8'h5D, '{8'h3D, 8'h3D, 8'h00, 8'h01, 8'h02}, t); telegram(t);
      mk_sd2(8'h02, 8'h3F, 8'h5D, '{8'h3D, 8'h3D, 8'h00, 8'h01, 8'h02}, t); telegram(t);
      telegram('{SD4, 8'h3F, 8'h02});
      pdup = 8'd3; pduv = 8'h01;                                     // third PDU byte = 01
      spi_write(REG_PDU_POS, pdup);
      spi_write(REG_PDU_VAL, pduv);
      configure(16'h1000, 8'h3C, 8'h02, 8'h00, 1'b0);
      mk_sd2(8'h02, 8'h3F, 8'h5D, '{8'h3D, 8'h3D, 8'h01, 8'h01}, t); telegram(t);
      mk_sd2(8'h02, 8'h3F, 8'h5D, '{8'h01, 8'h01}, t);               telegram(t);
      t = '{SD3, 8'h02, 8'h3F, 8'h5C, 8'h00, 8'h00, 8'h01, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
      t.push_back(8'(8'h02 + 8'h3F + 8'h5C + 8'h01)); t.push_back(ED); telegram(t);
      mk_sd1(8'h02, 8'h3F, 8'h01, t); telegram(t);
      configure(16'h0020, 8'h3C, 8'h02, 8'h00, 1'b0);               // invalid telegrams
      mk_sd1(8'h02, 8'h3F, 8'h49, t); telegram(t);                   // valid: none
      t[4] = t[4] + 8'd1;             telegram(t, -1, 4);            // wrong FCS
      mk_sd1(8'h02, 8'h3F, 8'h49, t); t[5] = 8'h17; telegram(t, -1, 5);  // wrong ED
      mk_sd2(8'h02, 8'h3F, 8'h5D, '{8'h11, 8'h22, 8'h33, 8'h44}, t);
      void'(t.pop_back()); void'(t.pop_back());
      telegram(t, -1, t.size());                                     // cut short
      telegram('{SC});
    end

    chk(n_le > 0, "no LE trigger");
    chk(n_fc > 0, "no FC trigger");
    chk(n_sap > 0, "no SAP trigger");
    chk(n_nosap > 0, "no no-SAP trigger");
    chk(n_dsap > 0, "no DSAP trigger");
    chk(n_ssap > 0, "no SSAP trigger");
    chk(n_tel > 0, "no invalid-telegram trigger");
    chk(n_pdu > 0, "no PDU-byte trigger");
    chk(n_sd > 0, "no start-delimiter trigger");
    chk(n_sa > 0, "no source-address trigger");
    chk(n_da > 0, "no destination-address trigger");
    chk(n_par > 0, "no parity-error trigger");
    chk(n_char > 0, "no character trigger");
    chk(n_idle > 0, "bus never went idle");
    chk(n_rate > 0, "bit rate never changed");
    chk(n_clamp > 0, "error never applied");
    $display("mechanisms: SD %0d SA %0d DA %0d parity %0d char %0d idle %0d rate %0d clamp-clocks %0d",
             n_sd, n_sa, n_da, n_par, n_char, n_idle, n_rate, n_clamp);
    $display("field triggers: LE %0d FC %0d SAP %0d noSAP %0d DSAP %0d SSAP %0d PDU %0d invalid %0d",
             n_le, n_fc, n_sap, n_nosap, n_dsap, n_ssap, n_pdu, n_tel);
    $display("trigger pulses %0d", rises);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

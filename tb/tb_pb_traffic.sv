// tb_pb_traffic: mixed PROFIBUS traffic through the whole error generator at
// the bit rates used in the board's lab tests.
//
// For each of 1.5, 4 and 12 Mbit/s (divisors 8, 3, 1) the testbench sends a
// stream of well-formed telegrams of every type, with random addresses
// (some equal to the station of interest, 0x3F, some with EXT bits set),
// random frame-control and data bytes and a correct frame check sequence,
// separated by idle gaps. The trigger is "start delimiter OR source address
// 0x3F", and the error is applied with line A to Gnd and line B to 5 V.
// A reference model of the trigger rules, which merges triggers closer
// together than the 10 us pulse, gives the expected number of trigger
// pulses for every telegram. The testbench also checks that bus_active
// rises once per telegram, that every telegram is valid for the decoder
// (the invalid-telegram trigger is enabled on a separate pass and must never
// fire), and that the gate outputs follow the pulse. It ends with the
// longest telegram PROFIBUS allows, 255 characters, at 12 Mbit/s.
module tb_pb_traffic;
  import pb_pkg::*;

  localparam int PULSE = 1920;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rxd = 1'b1, spi_sck = 1'b0, spi_ss_n = 1'b1, spi_mosi = 1'b0;
  logic trigger_out, bus_active, a_hi, a_lo, b_hi, b_lo;
  int checks = 0, failures = 0;

  pb_errgen_top dut (.clk, .rst_n, .rxd, .spi_sck, .spi_ss_n, .spi_mosi, .trigger_out,
                     .bus_active, .a_hi, .a_lo, .b_hi, .b_lo);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("%s", msg);
    end
  endtask

  int divisor = 8;
  logic [15:0] mask = 16'h0003;
  logic err_en = 1'b0;
  localparam logic [7:0] STATION = 8'h3F;

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

  // ---------------------------------------------------------------- monitors
  int rises = 0, bus_rises = 0;
  logic trig_q = 1'b0, bus_q = 1'b0, trig_mid = 1'b0;
  always @(posedge clk) if (rst_n) begin
    trig_q <= trigger_out;
    bus_q  <= bus_active;
    if (trigger_out && !trig_q) rises++;
    if (bus_active && !bus_q) bus_rises++;
  end
  always @(negedge clk) trig_mid <= trigger_out;
  always @(posedge clk) if (rst_n) begin
    logic [3:0] expv;
    expv = (trig_mid && err_en) ? 4'b0110 : 4'b0000;   // A to Gnd, B to 5 V
    #1;
    checks++;
    if ({a_hi, a_lo, b_hi, b_lo} !== expv) begin
      failures++;
      $display("gates %b, expected %b", {a_hi, a_lo, b_hi, b_lo}, expv);
    end
  end

  // ---------------------------------------------------------------- traffic
  task automatic send_char(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      rxd <= f[i];
      repeat (16 * divisor) @(posedge clk);
    end
  endtask

  function automatic logic [7:0] rnd_addr();
    logic [7:0] a;
    a = ($urandom % 3 == 0) ? STATION : 8'($urandom % 126);
    if ($urandom % 4 == 0) a[7] = 1'b1;
    return a;
  endfunction

  function automatic void make(ref logic [7:0] t[$]);
    logic [7:0] da, sa, fc, sum;
    logic [7:0] pdu[$];
    int kind, n;
    kind = $urandom % 5;
    da = rnd_addr();
    sa = rnd_addr();
    fc = 8'($urandom);
    pdu = {};
    n = (kind == 1) ? 1 + $urandom % 24 : (kind == 2) ? 8 : 0;
    for (int i = 0; i < n; i++) pdu.push_back(8'($urandom));
    sum = da + sa + fc;
    foreach (pdu[i]) sum += pdu[i];
    unique case (kind)
      0: t = '{SD1, da, sa, fc, sum, ED};
      1: begin t = '{SD2, 8'(3 + n), 8'(3 + n), SD2, da, sa, fc}; t = {t, pdu, sum, ED}; end
      2: begin t = '{SD3, da, sa, fc}; t = {t, pdu, sum, ED}; end
      3: t = '{SD4, da, sa};
      default: t = '{SC};
    endcase
  endfunction

  // expected pulses: SD at rank 0, SA at rank 2 / 5, merged when close
  function automatic int expected(input logic [7:0] t[$]);
    int ev[$], n, pos_sa, char_clk;
    char_clk = 11 * 16 * divisor;
    pos_sa = (t[0] == SD2) ? 5 : (t[0] == SC) ? -1 : 2;
    ev = {};
    if (mask[TRG_SD]) ev.push_back(0);
    if (mask[TRG_SA] && pos_sa > 0 && t[pos_sa] == STATION) ev.push_back(pos_sa);
    n = 0;
    foreach (ev[k]) if (k == 0 || (ev[k] - ev[k-1]) * char_clk > PULSE + 8) n++;
    return n;
  endfunction

  task automatic stream(input int ntel, input string label);
    int r0, b0, exp_total, gap;
    r0 = rises;
    b0 = bus_rises;
    exp_total = 0;
    gap = (40 * 16 * divisor > PULSE + 200) ? 40 * 16 * divisor : PULSE + 200;
    for (int k = 0; k < ntel; k++) begin
      logic [7:0] t[$];
      make(t);
      exp_total += expected(t);
      foreach (t[i]) send_char(t[i]);
      repeat (gap) @(posedge clk);
    end
    chk(rises - r0 == exp_total, $sformatf("%s: %0d trigger pulses, expected %0d", label,
                                           rises - r0, exp_total));
    chk(bus_rises - b0 == ntel, $sformatf("%s: bus became active %0d times for %0d telegrams",
                                          label, bus_rises - b0, ntel));
    $display("%s: %0d telegrams, %0d trigger pulses", label, ntel, rises - r0);
  endtask

  initial begin
    int rates [3] = '{8, 3, 1};
    string names [3] = '{"1.5 Mbit/s", "4 Mbit/s", "12 Mbit/s"};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (50) @(posedge clk);
    spi_write(REG_SA, STATION);
    spi_write(REG_ERRTYPE, {4'h0, LINE_HIGH, LINE_LOW});
    foreach (rates[r]) begin
      divisor = rates[r];
      spi_write(REG_DIV_LO, 8'(divisor));
      spi_write(REG_DIV_HI, 8'h00);
      // SD or SA, error applied
      mask = 16'h0003;
      err_en = 1'b1;
      spi_write(REG_TRIG, 8'h03);
      spi_write(REG_TRIG_HI, 8'h00);
      spi_write(REG_CTRL, 8'h01);
      stream(40, names[r]);
      // only the invalid-telegram condition: well-formed traffic never fires
      mask = 16'h0020;
      err_en = 1'b0;
      spi_write(REG_CTRL, 8'h00);
      spi_write(REG_TRIG, 8'h20);
      begin
        int r0;
        r0 = rises;
        for (int k = 0; k < 20; k++) begin
          logic [7:0] t[$];
          make(t);
          foreach (t[i]) send_char(t[i]);
          repeat (40 * 16 * divisor + PULSE) @(posedge clk);
        end
        chk(rises == r0, $sformatf("%s: %0d invalid-telegram triggers on valid traffic",
                                   names[r], rises - r0));
      end
    end
    // the longest telegram: SD2 with LE = 249 (246 PDU bytes, 255 characters)
    // at 12 Mbit/s, from the station of interest. Only the SA condition and
    // the invalid-telegram condition are enabled: exactly one pulse, the SA.
    begin
      logic [7:0] t[$];
      logic [7:0] sum;
      int r0;
      mask = 16'h0022;
      spi_write(REG_TRIG, 8'h22);
      t = '{SD2, 8'd249, 8'd249, SD2, 8'h02, STATION, 8'h7D};
      for (int i = 0; i < 246; i++) t.push_back(8'($urandom));
      sum = 8'h00;
      for (int i = 4; i < t.size(); i++) sum += t[i];
      t.push_back(sum);
      t.push_back(ED);
      chk(t.size() == 255, "longest telegram is not 255 characters");
      r0 = rises;
      foreach (t[i]) send_char(t[i]);
      repeat (40 * 16 * divisor + PULSE) @(posedge clk);
      chk(rises - r0 == 1, $sformatf("255-character telegram: %0d trigger pulses, expected 1",
                                     rises - r0));
      $display("255-character telegram at 12 Mbit/s: %0d trigger pulse", rises - r0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

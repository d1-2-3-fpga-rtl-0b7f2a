// tb_bus_monitor: checks the character timeout that tells telegram from gap.
//
// A tick is made every DIV clocks. The testbench pulses receive_flag and
// checks that bus_active is still low in that clock (the bus was idle),
// goes high one clock later, stays high while characters keep coming closer
// than the timeout, and falls exactly TIMEOUT ticks after the last
// character (within one tick period for the phase of the tick).
module tb_bus_monitor;
  localparam int DIV = 2;
  localparam int TIMEOUT = 264;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tick = 1'b0, receive_flag = 1'b0;
  logic bus_active;
  int checks = 0, failures = 0;
  int tcnt = 0;

  bus_monitor dut (.clk, .rst_n, .tick, .receive_flag, .bus_active);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    tcnt = (tcnt == DIV - 1) ? 0 : tcnt + 1;
    tick <= (tcnt == 0);
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (bus_active !== exp) begin
      failures++;
      $display("%s: bus_active=%0d, expected %0d", what, bus_active, exp);
    end
  endtask

  // one received character; returns after the flag clock
  task automatic char_in();
    receive_flag <= 1'b1;
    @(posedge clk);
    receive_flag <= 1'b0;
  endtask

  initial begin
    int len;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check(1'b0, "after reset");
    for (int burst = 0; burst < 4; burst++) begin
      // first character of a telegram: bus still idle in the flag clock
      receive_flag <= 1'b1;
      #1;
      check(1'b0, "in the first flag clock");
      @(posedge clk);
      receive_flag <= 1'b0;
      @(posedge clk);
      #1;
      check(1'b1, "one clock after the first flag");
      // more characters, 11 bits = 176 ticks apart, well inside the timeout
      for (int c = 0; c < 3 + burst; c++) begin
        repeat (176 * DIV - 1) @(posedge clk);
        #1;
        check(1'b1, "between characters");
        char_in();
      end
      // count how long the bus stays active after the last character
      len = 0;
      while (bus_active) begin
        @(posedge clk);
        len++;
      end
      checks++;
      if (len < TIMEOUT * DIV - DIV || len > TIMEOUT * DIV + DIV) begin
        failures++;
        $display("bus went idle %0d clocks after the last character, expected %0d",
                 len, TIMEOUT * DIV);
      end
      repeat (50) @(posedge clk);
      #1;
      check(1'b0, "in the gap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_baud_tick_gen: checks the period of the sampling strobe.
//
// For several divisors (including 0, which must behave as 1) the testbench
// measures the distance in clocks between successive ticks and expects it to
// equal the divisor, and expects each tick to last one clock.
module tb_baud_tick_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] divisor;
  logic tick;
  int checks = 0, failures = 0;

  baud_tick_gen dut (.clk, .rst_n, .divisor, .tick);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int unsigned d);
    int unsigned expect_p, last, now, n;
    expect_p = (d == 0) ? 1 : d;
    divisor = 16'(d);
    // let the new divisor settle
    repeat (2 * expect_p + 4) @(posedge clk);
    n = 0; last = 0;
    now = 0;
    while (n < 6) begin
      @(posedge clk);
      now++;
      if (tick) begin
        if (n > 0) begin
          checks++;
          if (now - last != expect_p) begin
            failures++;
            $display("divisor %0d: period %0d, expected %0d", d, now - last, expect_p);
          end
        end
        last = now;
        n++;
      end
    end
  endtask

  initial begin
    divisor = 16'd8;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    measure(8);
    measure(1);
    measure(3);
    measure(0);
    measure(2);
    measure(1250);
    measure(8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

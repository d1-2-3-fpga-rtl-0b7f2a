// tb_pulse_stretcher: checks the 10 us output pulse at its full length.
//
// With the default PULSE_CYCLES (1920 clocks = 10 us at 192 MHz) the
// testbench gives single trigger strobes and checks that the pulse starts
// the clock after the strobe and lasts exactly 1920 clocks, then gives a
// second strobe in the middle of a pulse and checks that the pulse is
// extended to 1920 clocks after that strobe.
module tb_pulse_stretcher;
  localparam int N = 1920;

  logic clk = 1'b0, rst_n = 1'b0, trig = 1'b0;
  logic pulse;
  int checks = 0, failures = 0;

  pulse_stretcher dut (.clk, .rst_n, .trig, .pulse);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  task automatic strobe();
    trig <= 1'b1;
    @(posedge clk);
    #1;
    trig <= 1'b0;
  endtask

  // count the clocks the pulse stays high from now on
  task automatic width(output int w);
    w = 0;
    while (pulse) begin
      @(posedge clk);
      #1;
      w++;
    end
  endtask

  initial begin
    int w;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    chk(!pulse, "pulse high after reset");
    for (int k = 0; k < 3; k++) begin
      repeat (5 + k) @(posedge clk);
      #1;
      strobe();
      chk(pulse, "pulse not high the clock after the strobe");
      width(w);
      chk(w == N, $sformatf("pulse %0d clocks long, expected %0d", w, N));
    end
    // retrigger halfway
    strobe();
    repeat (N / 2 - 1) @(posedge clk);
    #1;
    strobe();
    width(w);
    chk(w == N, $sformatf("retriggered pulse ends %0d clocks after the second strobe", w));
    repeat (10) @(posedge clk);
    #1;
    chk(!pulse, "pulse high without trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

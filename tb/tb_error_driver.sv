// tb_error_driver: every error type, with and without the error window.
//
// For all 16 codes of the line-mode nibble the testbench checks the four
// gate outputs one clock after `active` rises and after it falls: line A
// follows bits 1:0 and line B bits 3:2 (1 = to Gnd, 2 = to 5 V, 0 and 3 =
// untouched), nothing is driven outside the window, and the high- and
// low-side switch of one line are never on together.
module tb_error_driver;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  logic [7:0] err_type = '0;
  logic a_hi, a_lo, b_hi, b_lo;
  int checks = 0, failures = 0;

  error_driver dut (.clk, .rst_n, .active, .err_type, .a_hi, .a_lo, .b_hi, .b_lo);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if ((a_hi && a_lo) || (b_hi && b_lo)) begin
      failures++;
      $display("both switches of a line on");
    end
  end

  initial begin
    logic [3:0] expv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int code = 0; code < 16; code++) begin
      err_type <= {4'($urandom), 4'(code)};
      active   <= 1'b1;
      @(posedge clk);
      @(posedge clk);
      #1;
      expv = {code[1:0] == 2'd2, code[1:0] == 2'd1, code[3:2] == 2'd2, code[3:2] == 2'd1};
      checks++;
      if ({a_hi, a_lo, b_hi, b_lo} !== expv) begin
        failures++;
        $display("code %0d: outputs %b, expected %b", code, {a_hi, a_lo, b_hi, b_lo}, expv);
      end
      active <= 1'b0;
      @(posedge clk);
      @(posedge clk);
      #1;
      checks++;
      if ({a_hi, a_lo, b_hi, b_lo} !== 4'b0) begin
        failures++;
        $display("code %0d: driven outside the window", code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

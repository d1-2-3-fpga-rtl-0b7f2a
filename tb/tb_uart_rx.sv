// tb_uart_rx: sends serial PROFIBUS characters to the receiver.
//
// The testbench makes its own 16x sampling tick every DIV clocks and drives
// 11-bit characters (start, 8 data LSB first, even parity, stop) with a bit
// time of 16*DIV clocks. For each character it checks the byte, the parity
// bit, the parity and framing error flags, that receive_flag is a single
// clock, and that it comes between 10 and 11 bit times after the start edge
// (the middle of the stop bit is at 10.5). Characters follow each other
// without idle time, as inside a telegram; some carry a wrong parity bit or a
// low stop bit, and a short low glitch on the idle line must be ignored.
module tb_uart_rx;
  localparam int DIV = 3;
  localparam int BIT = 16 * DIV;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tick = 1'b0, rxd = 1'b1;
  logic [7:0] data;
  logic parity_bit, receive_flag, parity_err, framing_err;
  int checks = 0, failures = 0;
  int flags = 0;
  longint cyc = 0, t_start = 0;

  uart_rx dut (.clk, .rst_n, .tick, .rxd, .data, .parity_bit, .receive_flag,
               .parity_err, .framing_err);

  always #5 clk = ~clk;

  int tcnt = 0;
  always @(posedge clk) begin
    cyc++;
    tcnt = (tcnt == DIV - 1) ? 0 : tcnt + 1;
    tick <= (tcnt == 0);
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, filled by the sender, checked by the monitor
  logic [7:0] exp_data;
  logic exp_par, exp_perr, exp_ferr;

  always @(posedge clk) if (rst_n && receive_flag) begin : mon_data
    flags++;
    checks++;
    if (data !== exp_data || parity_bit !== exp_par || parity_err !== exp_perr ||
        framing_err !== exp_ferr) begin
      failures++;
      $display("char %02x/%0d perr %0d ferr %0d, expected %02x/%0d %0d %0d", data,
               parity_bit, parity_err, framing_err, exp_data, exp_par, exp_perr, exp_ferr);
    end
    checks++;
    if (cyc - t_start < 10 * BIT || cyc - t_start > 11 * BIT) begin
      failures++;
      $display("receive_flag %0d clocks after start edge", cyc - t_start);
    end
  end

  always @(posedge clk) if (rst_n && receive_flag) begin : mon_len
    @(posedge clk);
    checks++;
    if (receive_flag) begin
      failures++;
      $display("receive_flag longer than one clock");
    end
  end

  task automatic send(input logic [7:0] b, input logic bad_par, input logic bad_stop);
    logic [10:0] frame;
    logic p;
    p = ^b ^ bad_par;
    frame = {~bad_stop, p, b, 1'b0};
    exp_data = b; exp_par = p; exp_perr = bad_par; exp_ferr = bad_stop;
    @(posedge clk);
    t_start = cyc;
    for (int i = 0; i < 11; i++) begin
      rxd <= frame[i];
      repeat (BIT) @(posedge clk);
    end
    rxd <= 1'b1;
  endtask

  initial begin
    int nflags_exp;
    nflags_exp = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (BIT) @(posedge clk);
    // a telegram of fixed characters, back to back
    foreach (tg[i]) begin send(tg[i], 1'b0, 1'b0); nflags_exp++; end
    repeat (3 * BIT) @(posedge clk);
    // random characters, some with errors
    for (int i = 0; i < 40; i++) begin
      send(8'($urandom), ($urandom % 7) == 0, ($urandom % 9) == 0);
      nflags_exp++;
      if (exp_ferr) repeat (2 * BIT) @(posedge clk);  // idle to resynchronise
    end
    repeat (2 * BIT) @(posedge clk);
    // glitch on the idle line, shorter than half a bit
    rxd <= 1'b0;
    repeat (BIT / 4) @(posedge clk);
    rxd <= 1'b1;
    repeat (3 * BIT) @(posedge clk);
    checks++;
    if (flags != nflags_exp) begin
      failures++;
      $display("%0d characters received, %0d sent", flags, nflags_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] tg [10] = '{8'h68, 8'h04, 8'h04, 8'h68, 8'h1E, 8'h3C, 8'h5D, 8'hE7, 8'h96, 8'h16};
endmodule

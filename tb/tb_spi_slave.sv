// tb_spi_slave: SPI frames from a model of the HMI microcontroller.
//
// The master sends 16-bit frames, address then data, MSB first, with MOSI
// changed while SCK is low and SCK at 1/20 of the system clock. The
// testbench checks that every complete frame gives exactly one write strobe
// with the right address and data, within a few clocks of SS rising, and
// that frames of 8 or 17 bits give none.
module tb_spi_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sck = 1'b0, ss_n = 1'b1, mosi = 1'b0;
  logic wr_en;
  logic [7:0] wr_addr, wr_data;
  int checks = 0, failures = 0;
  int writes = 0;
  logic [7:0] got_addr, got_data;
  longint cyc = 0, t_write = 0;

  spi_slave dut (.clk, .rst_n, .sck, .ss_n, .mosi, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && wr_en) begin
    writes++;
    got_addr = wr_addr;
    got_data = wr_data;
    t_write  = cyc;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input logic [31:0] bits, input int nbits);
    ss_n <= 1'b0;
    repeat (10) @(posedge clk);
    for (int i = nbits - 1; i >= 0; i--) begin
      mosi <= bits[i];
      repeat (10) @(posedge clk);
      sck <= 1'b1;
      repeat (10) @(posedge clk);
      sck <= 1'b0;
    end
    repeat (10) @(posedge clk);
    ss_n <= 1'b1;
  endtask

  initial begin
    longint t_ss;
    int w0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      logic [7:0] a, d;
      a = 8'($urandom);
      d = 8'($urandom);
      w0 = writes;
      frame({16'h0, a, d}, 16);
      t_ss = cyc;
      repeat (20) @(posedge clk);
      checks++;
      if (writes != w0 + 1 || got_addr !== a || got_data !== d) begin
        failures++;
        $display("frame %02x %02x: %0d writes, got %02x %02x", a, d, writes - w0,
                 got_addr, got_data);
      end
      checks++;
      if (t_write - t_ss > 5) begin
        failures++;
        $display("write strobe %0d clocks after SS rose", t_write - t_ss);
      end
      repeat (10) @(posedge clk);
    end
    w0 = writes;
    frame(32'hA5, 8);
    repeat (20) @(posedge clk);
    frame(32'h1_5A5A, 17);
    repeat (20) @(posedge clk);
    checks++;
    if (writes != w0) begin
      failures++;
      $display("a frame of wrong length was written");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

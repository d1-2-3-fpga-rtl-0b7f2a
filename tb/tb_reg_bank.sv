// tb_reg_bank: reset values, writes and the address decode of the bank.
//
// After reset the parameter struct must hold the reset values of the
// register map. Random writes to all 256 addresses are then mirrored in a
// model of the fifteen registers; after each write every field of the struct
// is compared with the model, so a write that lands in the wrong register,
// or a write to an unused address that changes anything, is caught.
module tb_reg_bank;
  import pb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [7:0] wr_addr = '0, wr_data = '0;
  pb_cfg_t cfg;
  int checks = 0, failures = 0;
  logic [7:0] model [15] = '{8'd8, 8'd0, 8'h01, 8'h3C, 8'h00, 8'h00, 8'h00,
                             8'h00, 8'h00, 8'hFF, 8'h00, 8'h00, 8'h00, 8'h01, 8'h00};

  reg_bank dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .cfg);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string when);
    checks++;
    if (cfg.divisor !== {model[1], model[0]} || cfg.trig_mask !== {model[7], model[2]} ||
        cfg.sa !== model[3] || cfg.da !== model[4] || cfg.err_type !== model[5] ||
        cfg.err_en !== model[6][0] || cfg.fc !== model[8] || cfg.fc_mask !== model[9] ||
        cfg.le !== model[10] || cfg.dsap !== model[11] || cfg.ssap !== model[12] ||
        cfg.pdu_pos !== model[13] || cfg.pdu_val !== model[14]) begin
      failures++;
      $display("%s: cfg %p differs from the model", when, cfg);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    compare("after reset");
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] a, d;
      a = ($urandom % 2) ? 8'($urandom % 16) : 8'($urandom);
      d = 8'($urandom);
      wr_en   <= 1'b1;
      wr_addr <= a;
      wr_data <= d;
      @(posedge clk);
      #1;
      wr_en <= 1'b0;
      if (a < 15) model[a] = d;
      compare($sformatf("after write %02x <- %02x", a, d));
      // data on the bus without wr_en must not be taken
      wr_addr <= 8'($urandom % 15);
      wr_data <= 8'($urandom);
      @(posedge clk);
      #1;
      compare("with wr_en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

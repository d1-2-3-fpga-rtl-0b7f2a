// tb_addr_match_fsm: feeds telegrams, character by character with their
// rank, to the address state machine.
//
// Two instances are tested: the source-address one (ranks 2 / 5) and the
// destination-address one (ranks 1 / 4). The expected result is computed
// from the telegram directly: the address is at the rank given by the first
// byte (SD1, SD3, SD4 -> short rank, SD2 -> long rank, anything else -> no
// address). The testbench checks that `found` is high exactly in the clock
// after the char_valid of the matching byte and never elsewhere. Telegrams
// are the three of the design's simulation (a token, two SD2 telegrams),
// SD1 and SD3 telegrams, a short confirmation, telegrams cut short, and
// random ones.
module tb_addr_match_fsm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic char_valid = 1'b0;
  logic [7:0] char_rank = '0, char_data = '0, addr = 8'h3C;
  logic found_sa, found_da;
  int checks = 0, failures = 0;
  int hits_sa = 0, hits_da = 0;

  addr_match_fsm #(.POS_SHORT(2), .POS_SD2(5)) dut_sa (
    .clk, .rst_n, .char_valid, .char_rank, .char_data, .addr, .found(found_sa));
  addr_match_fsm #(.POS_SHORT(1), .POS_SD2(4)) dut_da (
    .clk, .rst_n, .char_valid, .char_rank, .char_data, .addr, .found(found_da));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int addr_pos(input logic [7:0] sd, input int short_pos, input int long_pos);
    if (sd == 8'h10 || sd == 8'hA2 || sd == 8'hDC) return short_pos;
    if (sd == 8'h68) return long_pos;
    return -1;
  endfunction

  // feed one telegram; characters are a few clocks apart
  task automatic telegram(input logic [7:0] t[$]);
    int psa, pda;
    psa = addr_pos(t[0], 2, 5);
    pda = addr_pos(t[0], 1, 4);
    foreach (t[i]) begin
      char_valid <= 1'b1;
      char_rank  <= 8'(i);
      char_data  <= t[i];
      @(posedge clk);
      #1;
      char_valid <= 1'b0;
      checks += 2;
      if (found_sa !== (i == psa && t[i] == addr)) begin
        failures++;
        $display("SA: found=%0d after rank %0d of telegram %p", found_sa, i, t);
      end
      if (found_da !== (i == pda && t[i] == addr)) begin
        failures++;
        $display("DA: found=%0d after rank %0d of telegram %p", found_da, i, t);
      end
      hits_sa += int'(found_sa);
      hits_da += int'(found_da);
      repeat (3) begin
        @(posedge clk);
        #1;
        checks += 2;
        if (found_sa || found_da) begin
          failures++;
          $display("found high for more than one clock");
        end
      end
    end
  endtask

  initial begin
    logic [7:0] q[$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    telegram('{8'hDC, 8'h3C, 8'h3C});
    telegram('{8'h68, 8'h04, 8'h04, 8'h68, 8'h1E, 8'h3C, 8'h5D, 8'hE7, 8'h96, 8'h16});
    telegram('{8'h68, 8'h04, 8'h04, 8'h68, 8'h3C, 8'h1E, 8'h08, 8'h00, 8'h62, 8'h16});
    telegram('{8'h10, 8'h3C, 8'h02, 8'h49, 8'h8D, 8'h16});
    telegram('{8'h10, 8'h02, 8'h3C, 8'h49, 8'h8D, 8'h16});
    telegram('{8'hA2, 8'h05, 8'h3C, 8'h6C, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06,
               8'h07, 8'h08, 8'h00, 8'h16});
    telegram('{8'hE5});
    telegram('{8'h3C, 8'h3C, 8'h3C, 8'h3C, 8'h3C, 8'h3C});   // no start delimiter
    telegram('{8'h68, 8'h04});                                 // cut short ...
    telegram('{8'hDC, 8'h01, 8'h3C});                          // ... next one counts
    addr = 8'h01;
    telegram('{8'hDC, 8'h01, 8'h3C});
    for (int n = 0; n < 300; n++) begin
      int len;
      logic [7:0] sds[5] = '{8'h10, 8'h68, 8'hA2, 8'hDC, 8'hE5};
      addr = 8'($urandom % 4);
      len = 1 + $urandom % 9;
      q = {};
      q.push_back(sds[$urandom % 5]);
      for (int i = 1; i < len; i++) q.push_back(8'($urandom % 4));
      telegram(q);
    end
    checks++;
    if (hits_sa < 20 || hits_da < 20) begin
      failures++;
      $display("too few matches exercised: SA %0d DA %0d", hits_sa, hits_da);
    end
    $display("SA matches %0d, DA matches %0d", hits_sa, hits_da);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// reg_bank: bank of 8-bit parameter registers written over SPI.
//
// Each register is one copy of the same small circuit: a comparator that
// checks the frame's address against the register's own and, when they are
// equal, a load enable that copies the frame's data byte into the register.
// Writes to unused addresses change nothing. The registers are then
// assembled into the pb_pkg::pb_cfg_t parameter struct:
//   0x00 bit-rate divisor, low byte     (reset 8: 1.5 Mbit/s)
//   0x01 bit-rate divisor, high byte    (reset 0)
//   0x02 trigger mask, see pb_pkg TRG_* (reset 0x01: start delimiter)
//   0x03 source address of interest     (reset 0x3C)
//   0x04 destination address            (reset 0x00)
//   0x05 error type, A mode [1:0], B mode [3:2] (reset 0: none)
//   0x06 control, bit 0 = apply error   (reset 0)
//   0x07 trigger mask, high byte        (reset 0)
//   0x08 frame-control value            (reset 0x00)
//   0x09 frame-control compare mask     (reset 0xFF: all bits)
//   0x0A SD2 length value               (reset 0x00)
//   0x0B destination SAP                (reset 0x00)
//   0x0C source SAP                     (reset 0x00)
//   0x0D PDU byte position, 1 = first   (reset 0x01)
//   0x0E PDU byte value                 (reset 0x00)
// The 8-bit address / 8-bit data bank and the per-register address compare
// follow the design; the map and the reset values are this design's own.
//
// Timing: a register takes its value on the clock edge that sees `wr_en`;
// `cfg` shows it from the next clock on.
module reg_bank
  import pb_pkg::*;
#(
  parameter int unsigned NREGS = 15
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [7:0] wr_addr,
  input  logic [7:0] wr_data,
  output pb_cfg_t    cfg
);

  localparam logic [7:0] RESET_VAL [15] = '{8'd8, 8'd0, 8'h01, 8'h3C, 8'h00, 8'h00, 8'h00,
                                            8'h00, 8'h00, 8'hFF, 8'h00, 8'h00, 8'h00,
                                            8'h01, 8'h00};

  logic [7:0] regs [NREGS];

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    logic load_enable;
    assign load_enable = wr_en && (wr_addr == 8'(i));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)           regs[i] <= (i < 15) ? RESET_VAL[i] : 8'h00;
      else if (load_enable) regs[i] <= wr_data;
    end
  end

  always_comb begin
    cfg.divisor   = {regs[int'(REG_DIV_HI)], regs[int'(REG_DIV_LO)]};
    cfg.trig_mask = {regs[int'(REG_TRIG_HI)], regs[int'(REG_TRIG)]};
    cfg.sa        = regs[int'(REG_SA)];
    cfg.da        = regs[int'(REG_DA)];
    cfg.err_type  = regs[int'(REG_ERRTYPE)];
    cfg.err_en    = regs[int'(REG_CTRL)][0];
    cfg.fc        = regs[int'(REG_FC)];
    cfg.fc_mask   = regs[int'(REG_FC_MASK)];
    cfg.le        = regs[int'(REG_LE)];
    cfg.dsap      = regs[int'(REG_DSAP)];
    cfg.ssap      = regs[int'(REG_SSAP)];
    cfg.pdu_pos   = regs[int'(REG_PDU_POS)];
    cfg.pdu_val   = regs[int'(REG_PDU_VAL)];
  end

endmodule

// spi_slave: receives parameter writes from the HMI microcontroller.
//
// The microcontroller is the SPI master. One write is one frame: SS goes low,
// 16 bits are sent MSB first on MOSI, eight address bits A7..A0 followed by
// eight data bits D7..D0, and SS goes high again. The bits enter bit 0 of a
// 16-bit shift register, so at the end of the frame bits 15..8 hold the
// address and bits 7..0 the data; the rising edge of SS then hands them to
// the register bank.
//
// SCK, SS and MOSI are brought into the system clock domain with two
// flip-flops each and their edges detected there, so the whole FPGA design
// runs on one clock; SCK must therefore be well below a quarter of the system
// clock. MOSI is taken on the rising SCK edge (SCK idle low, SPI mode 0).
// A frame with other than 16 SCK edges is dropped.
//
// Interface: `wr_en` is high for one clock, about three clocks after SS
// rises, with `wr_addr` and `wr_data` valid in the same clock. The frame
// format, the 16-bit shift register and the load on SS rising follow the
// design; the synchronisation, the mode and the frame-length check are this
// design's own.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sck,
  input  logic       ss_n,
  input  logic       mosi,
  output logic       wr_en,
  output logic [7:0] wr_addr,
  output logic [7:0] wr_data
);

  logic [2:0]  sck_s, ss_s;   // synchroniser + previous value
  logic [1:0]  mosi_s;
  logic [15:0] shreg;         // SPI_shift_register
  logic [4:0]  nbits;         // SCK edges in this frame, saturating at 17

  wire sck_rise = sck_s[1] && !sck_s[2];
  wire ss_fall  = !ss_s[1] && ss_s[2];
  wire ss_rise  = ss_s[1] && !ss_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s   <= '0;
      ss_s    <= '1;
      mosi_s  <= '0;
      shreg   <= '0;
      nbits   <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      sck_s  <= {sck_s[1:0], sck};
      ss_s   <= {ss_s[1:0], ss_n};
      mosi_s <= {mosi_s[0], mosi};
      wr_en  <= 1'b0;
      if (ss_fall) begin
        nbits <= '0;
      end else if (!ss_s[1] && sck_rise) begin
        shreg <= {shreg[14:0], mosi_s[1]};
        if (nbits != 5'd17) nbits <= nbits + 1'b1;
      end
      if (ss_rise && nbits == 5'd16) begin
        wr_en   <= 1'b1;
        wr_addr <= shreg[15:8];
        wr_data <= shreg[7:0];
      end
    end
  end

endmodule

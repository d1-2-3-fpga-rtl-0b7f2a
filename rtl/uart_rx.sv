// uart_rx: 16x oversampled receiver for 11-bit PROFIBUS characters.
//
// A PROFIBUS character is one start bit (0), eight data bits LSB first, an
// even parity bit and one stop bit (1). The line is synchronised with two
// flip-flops. In IDLE a low level starts a character; it is checked again 8
// sampling ticks later, at the middle of the start bit (a high level there is
// a glitch and is dropped). From then on the line is sampled every 16 ticks,
// at the middle of each data, parity and stop bit.
//
// Interface: `tick` is the sampling strobe (16 x bit rate). After the middle
// of the stop bit, `data`, `parity_bit`, `parity_err` (data+parity has an odd
// number of ones) and `framing_err` (stop bit low) are updated and
// `receive_flag` is high for exactly one clock. Characters with errors are
// delivered too; their flags tell them apart. After a low stop bit the
// receiver waits for the line to return high before it looks for the next
// start bit. The character format and the
// one-clock receive flag follow the design; the sampling scheme, the glitch
// rejection and the error flags are this design's own.
module uart_rx
  import pb_pkg::*;
#(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       parity_bit,
  output logic       receive_flag,
  output logic       parity_err,
  output logic       framing_err
);

  localparam int unsigned HALF = OVERSAMPLE / 2;
  localparam int unsigned SW   = $clog2(OVERSAMPLE);

  typedef enum logic [2:0] {IDLE, START, BITS, STOP, BREAK} state_e;

  state_e      state;
  logic [1:0]  rx_sync;
  logic        rx;
  logic [SW-1:0] scnt;       // ticks inside the current bit
  logic [3:0]  bcnt;         // data and parity bits still to come
  logic [8:0]  shreg;        // parity & data, shifted in from the top

  assign rx = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync      <= 2'b11;
      state        <= IDLE;
      scnt         <= '0;
      bcnt         <= '0;
      shreg        <= '0;
      data         <= '0;
      parity_bit   <= 1'b0;
      receive_flag <= 1'b0;
      parity_err   <= 1'b0;
      framing_err  <= 1'b0;
    end else begin
      rx_sync      <= {rx_sync[0], rxd};
      receive_flag <= 1'b0;
      if (tick) begin
        unique case (state)
          IDLE: if (!rx) begin
            state <= START;
            scnt  <= SW'(1);
          end
          START: if (scnt == SW'(HALF - 1)) begin
            // middle of the start bit
            scnt <= '0;
            if (rx) state <= IDLE;
            else begin
              state <= BITS;
              bcnt  <= 4'd9;
            end
          end else scnt <= scnt + 1'b1;
          BITS: if (scnt == SW'(OVERSAMPLE - 1)) begin
            scnt  <= '0;
            shreg <= {rx, shreg[8:1]};
            bcnt  <= bcnt - 1'b1;
            if (bcnt == 4'd1) state <= STOP;
          end else scnt <= scnt + 1'b1;
          STOP: if (scnt == SW'(OVERSAMPLE - 1)) begin
            scnt         <= '0;
            state        <= rx ? IDLE : BREAK;
            data         <= shreg[7:0];
            parity_bit   <= shreg[8];
            parity_err   <= (even_parity(shreg[7:0]) != shreg[8]);
            framing_err  <= !rx;
            receive_flag <= 1'b1;
          end else scnt <= scnt + 1'b1;
          BREAK: if (rx) state <= IDLE;  // wait for the line to go idle
          default: state <= IDLE;
        endcase
      end
    end
  end

endmodule

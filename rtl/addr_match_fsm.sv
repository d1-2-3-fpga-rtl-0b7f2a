// addr_match_fsm: finds a given station address at its place in a telegram.
//
// Where the address sits depends on the telegram type, which the start
// delimiter (character rank 0) tells. After SD1, SD3 or SD4 the source
// address is the 3rd byte (rank 2); after SD2 (variable length: SD2 LE LEr
// SD2 DA SA ...) it is the 6th byte (rank 5). Four states follow one
// telegram, so nothing of the message has to be stored:
//   WAIT_SD    waiting for a start delimiter at rank 0
//   WAIT_SHORT SD1/SD3/SD4 seen, waiting for rank POS_SHORT
//   WAIT_SD2   SD2 seen, waiting for rank POS_SD2
//   FOUND      the byte at that rank equalled `addr`; left after one clock
// A byte at the awaited rank that does not match returns to WAIT_SD. The
// states and transitions follow the design's state diagram for the source
// address; with POS_SHORT = 1 and POS_SD2 = 4 the same machine finds the
// destination address. Two points are this design's own: the machine moves
// only on `char_valid`, the clock after a character was received when
// `char_rank` already holds its position, and a rank-0 character always
// restarts it, even in the middle of a wait.
//
// Interface: `found` is high for one clock, the clock after the
// `char_valid` that carried the matching byte.
module addr_match_fsm
  import pb_pkg::*;
#(
  parameter int unsigned POS_SHORT = 2,
  parameter int unsigned POS_SD2   = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       char_valid,
  input  logic [7:0] char_rank,
  input  logic [7:0] char_data,
  input  logic [7:0] addr,
  output logic       found
);

  typedef enum logic [1:0] {WAIT_SD, WAIT_SHORT, WAIT_SD2, FOUND} state_e;

  state_e state, state_nx;

  always_comb begin
    state_nx = state;
    if (state == FOUND) begin
      state_nx = WAIT_SD;
    end else if (char_valid) begin
      if (char_rank == 8'd0) begin
        if (char_data == SD1 || char_data == SD3 || char_data == SD4)
          state_nx = WAIT_SHORT;
        else if (char_data == SD2)
          state_nx = WAIT_SD2;
        else
          state_nx = WAIT_SD;
      end else if (state == WAIT_SHORT && char_rank == 8'(POS_SHORT)) begin
        state_nx = (char_data == addr) ? FOUND : WAIT_SD;
      end else if (state == WAIT_SD2 && char_rank == 8'(POS_SD2)) begin
        state_nx = (char_data == addr) ? FOUND : WAIT_SD;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= WAIT_SD;
    else        state <= state_nx;
  end

  assign found = (state == FOUND);

endmodule

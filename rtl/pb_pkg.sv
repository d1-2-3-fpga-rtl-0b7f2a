// pb_pkg: constants and types shared by the PROFIBUS error generator.
//
// Holds the PROFIBUS control characters (start delimiters, end delimiter and
// short confirmation, as coded on the wire), the index of each condition bit
// in the trigger mask, the line modes of the error driver, and the struct of
// parameters that the SPI-loaded register bank hands to the datapath.
// The character codes are those of the PROFIBUS standard; the mask layout,
// the line-mode encoding and the register map are this design's own choices.
package pb_pkg;

  // PROFIBUS control characters
  localparam logic [7:0] SD1 = 8'h10;  // telegram without data field
  localparam logic [7:0] SD2 = 8'h68;  // variable data length
  localparam logic [7:0] SD3 = 8'hA2;  // fixed data length (8 bytes)
  localparam logic [7:0] SD4 = 8'hDC;  // token
  localparam logic [7:0] ED  = 8'h16;  // end delimiter
  localparam logic [7:0] SC  = 8'hE5;  // short confirmation

  // Bits of the trigger mask register
  localparam int unsigned TRG_SD     = 0;  // start delimiter at start of telegram
  localparam int unsigned TRG_SA     = 1;  // source address of interest
  localparam int unsigned TRG_DA     = 2;  // destination address of interest
  localparam int unsigned TRG_PARITY = 3;  // parity error on any character
  localparam int unsigned TRG_CHAR   = 4;  // every received character
  localparam int unsigned TRG_TELERR = 5;  // invalid telegram (SD, LE, FCS or ED)
  localparam int unsigned TRG_SAP    = 6;  // EXT bit of DA and SA high (SD2, SD3)
  localparam int unsigned TRG_NOSAP  = 7;  // EXT bit of DA and SA low
  localparam int unsigned TRG_DSAP   = 8;  // destination SAP (first PDU byte)
  localparam int unsigned TRG_SSAP   = 9;  // source SAP (second PDU byte)
  localparam int unsigned TRG_FC     = 10; // frame-control byte under mask
  localparam int unsigned TRG_LE     = 11; // SD2 length byte
  localparam int unsigned TRG_PDU    = 12; // PDU byte at a chosen position (SD2, SD3)

  // Error mode of one bus line (two bits per line in the error-type register)
  typedef enum logic [1:0] {
    LINE_FREE = 2'd0,  // line untouched
    LINE_LOW  = 2'd1,  // clamp to Gnd
    LINE_HIGH = 2'd2,  // clamp to 5 V
    LINE_RSVD = 2'd3   // reserved, treated as untouched
  } line_mode_e;

  // Register map of the SPI parameter bank
  localparam logic [7:0] REG_DIV_LO  = 8'h00;
  localparam logic [7:0] REG_DIV_HI  = 8'h01;
  localparam logic [7:0] REG_TRIG    = 8'h02;
  localparam logic [7:0] REG_SA      = 8'h03;
  localparam logic [7:0] REG_DA      = 8'h04;
  localparam logic [7:0] REG_ERRTYPE = 8'h05;
  localparam logic [7:0] REG_CTRL    = 8'h06;
  localparam logic [7:0] REG_TRIG_HI = 8'h07;
  localparam logic [7:0] REG_FC      = 8'h08;
  localparam logic [7:0] REG_FC_MASK = 8'h09;
  localparam logic [7:0] REG_LE      = 8'h0A;
  localparam logic [7:0] REG_DSAP    = 8'h0B;
  localparam logic [7:0] REG_SSAP    = 8'h0C;
  localparam logic [7:0] REG_PDU_POS = 8'h0D;
  localparam logic [7:0] REG_PDU_VAL = 8'h0E;

  // Parameters decoded from the register bank
  typedef struct packed {
    logic [15:0] divisor;    // system clocks per 16x sampling tick (12 MHz / bit rate)
    logic [15:0] trig_mask;  // enabled trigger conditions, see TRG_*
    logic [7:0]  sa;         // source address of interest
    logic [7:0]  da;         // destination address of interest
    logic [7:0]  fc;         // frame-control value of interest
    logic [7:0]  fc_mask;    // FC bits that take part in the compare
    logic [7:0]  le;         // SD2 length of interest
    logic [7:0]  dsap;       // destination SAP of interest
    logic [7:0]  ssap;       // source SAP of interest
    logic [7:0]  pdu_pos;    // PDU byte position of interest, 1 = first
    logic [7:0]  pdu_val;    // value of that PDU byte
    logic [7:0]  err_type;   // [1:0] line A mode, [3:2] line B mode
    logic        err_en;     // apply the error to the bus when triggered
  } pb_cfg_t;

  // Even parity: the parity bit makes the count of ones in data+parity even
  function automatic logic even_parity(input logic [7:0] d);
    return ^d;
  endfunction

endpackage

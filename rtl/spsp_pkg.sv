// spsp_pkg: types and constants shared by the Super Pipeline Serial Processor
// (SPSP) blocks.
//
// The SPSP processes a received frame byte by byte. A row of function pages
// (FPs) taps a byte shift register; a counter and controller steps through a
// configured list of control lines, each of which says which FPs run, for how
// long, and which flag decides the next line. This package holds the control
// line format, the FP numbering, the flag numbering, the configuration address
// map and a CRC step function used by the CRC and fast-ACK pages.
//
// The FP numbering follows the data-flow figure of the architecture (FP0 fast
// ACK, FP1 matching, FP2/FP3 Ethernet DA/SA, FP4 CRC check, FP5/FP6 IP DA/SA,
// FP7/FP8 TCP BN/QN). FP9, the payload page, the line encoding, the flag
// numbering and the address map are choices of this design.
package spsp_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_FP     = 10;  // FP0..FP9
  localparam int unsigned NUM_FLAGS  = 8;   // flag inputs of the controller
  localparam int unsigned NUM_LINES  = 16;  // control lines in the register file
  localparam int unsigned LINE_AW    = 4;   // $clog2(NUM_LINES)

  // FP indices
  localparam int unsigned FP_ACK     = 0;
  localparam int unsigned FP_MATCH   = 1;
  localparam int unsigned FP_ETH_DA  = 2;
  localparam int unsigned FP_ETH_SA  = 3;
  localparam int unsigned FP_CRC     = 4;
  localparam int unsigned FP_IP_DA   = 5;
  localparam int unsigned FP_IP_SA   = 6;
  localparam int unsigned FP_TCP_BN  = 7;
  localparam int unsigned FP_TCP_QN  = 8;
  localparam int unsigned FP_PAYLOAD = 9;

  // Flag indices (inputs of the controller)
  localparam int unsigned FLAG_MATCH  = 0;  // FP1 window matches selected pattern
  localparam int unsigned FLAG_CRC_OK = 1;  // FP4 residue equals configured value
  localparam int unsigned FLAG_BUF_OK = 2;  // payload buffer has not overflowed
  localparam int unsigned FLAG_ONE    = 7;  // constant 1 (unconditional)

  // ------------------------------------------------------- control lines
  typedef enum logic [1:0] {
    MODE_COUNT      = 2'd0,  // step lasts len bytes
    MODE_UNTIL_FLAG = 2'd1,  // step lasts until the selected flag is 1
    MODE_UNTIL_EOF  = 2'd2,  // step lasts until the frame ends
    MODE_HALT       = 2'd3   // no step: ignore the rest of the frame
  } step_mode_e;

  // One control line of the counter and controller (37 bits).
  typedef struct packed {
    logic                  frame_done; // end of this step reports the frame
    logic [3:0]            ctrl;       // control code routed to the active FPs
    logic [LINE_AW-1:0]    next_fail;  // line taken when the checked flag is 0
    logic [LINE_AW-1:0]    next_ok;    // line taken otherwise
    logic [2:0]            flag_sel;   // flag checked / waited for
    logic                  chk_en;     // check flag_sel at the end of the step
    logic [7:0]            len;        // bytes in a MODE_COUNT step
    step_mode_e            mode;
    logic [NUM_FP-1:0]     fp_en;      // FPs active during the step
  } ctrl_line_t;

  localparam int unsigned LINE_W = $bits(ctrl_line_t);

  // ------------------------------------------------ configuration address map
  // cfg_addr is a 12-bit word address; bits [7:5] select a region and bits
  // [4:0] the word inside it. Data words are 32 bits.
  localparam logic [2:0] REG_LINES = 3'd0;  // line i: word 2i low, 2i+1 high
  localparam logic [2:0] REG_CTRL  = 3'd1;  // word 0: start line
  localparam logic [2:0] REG_MATCH = 3'd2;  // pattern p: words 4p..4p+3
  localparam logic [2:0] REG_CRC   = 3'd3;  // words 0..2: poly, init, residue
  localparam logic [2:0] REG_ACK   = 3'd4;  // template bytes, 4 per word
  localparam logic [2:0] REG_ACKL  = 3'd5;  // word 0: template length in bytes

  // Read map of the microcontroller port (word address)
  localparam logic [3:0] RD_STATUS   = 4'd0;
  localparam logic [3:0] RD_ETH_DA_H = 4'd1;
  localparam logic [3:0] RD_ETH_DA_L = 4'd2;
  localparam logic [3:0] RD_ETH_SA_H = 4'd3;
  localparam logic [3:0] RD_ETH_SA_L = 4'd4;
  localparam logic [3:0] RD_IP_DA    = 4'd5;
  localparam logic [3:0] RD_IP_SA    = 4'd6;
  localparam logic [3:0] RD_TCP_BN   = 4'd7;
  localparam logic [3:0] RD_TCP_QN   = 4'd8;
  localparam logic [3:0] RD_PAY_LEN  = 4'd9;
  localparam logic [3:0] RD_PAY_DATA = 4'd10; // reading pops one byte
  localparam logic [3:0] RD_FRAMES   = 4'd11; // frames reported, ACKs sent
  localparam logic [3:0] RD_ERRORS   = 4'd12; // bad frames, overflows
  localparam logic [3:0] RD_VALID    = 4'd13; // field valid bits, byte counter
  localparam logic [3:0] RD_CRC      = 4'd14; // CRC register

  // --------------------------------------------------------------- CRC
  // One byte of a reflected (LSB-first) CRC-32 register update with a
  // configurable reflected polynomial.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc,
                                             input logic [7:0]  data,
                                             input logic [31:0] poly);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ data[i]) c = (c >> 1) ^ poly;
      else                c = c >> 1;
    end
    return c;
  endfunction

endpackage

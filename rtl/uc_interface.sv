// uc_interface: the interface between the SPSP and its microcontroller.
//
// It has two sides, like the two interface blocks of the system diagram.
// The configuration side takes 32-bit word writes (cfg_we, cfg_addr,
// cfg_wdata) and decodes address bits [7:5] into one write enable per
// configuration target (controller lines, controller start line, matching
// patterns, CRC registers, ACK template, ACK length); bits [4:0] go on as the
// word address inside the target. The data side is the read port through
// which the microcontroller collects the fields the pages extracted, the frame
// status and the payload: rd_addr selects a word (map in spsp_pkg), rd_data is
// combinational, and a read of RD_PAY_DATA with rd_en pops one payload byte
// from the data buffer (pay_pop).
//
// Status word (RD_STATUS): bit 0 frame ready, 1 frame good, 2 ACK being sent,
// 3 payload buffer not overflowed, 7:4 matching hit vector, 11:8 controller
// line pointer, 31:16 committed payload bytes waiting in the buffer.
// RD_FRAMES holds fast ACKs sent (31:16) and frames reported (15:0); RD_ERRORS
// buffer overflows (31:16) and bad frames (15:0); RD_VALID the controller's
// byte counter (15:8), payload length valid (6) and the valid bits of the six
// extracted fields (5:0, Ethernet DA first); RD_CRC the CRC register.
//
// loc_addr is cfg_addr[4:0] passed on unchanged, so synthesis sees those
// outputs as wires from inputs.
//
// The microcontroller writing configuration into the pages and collecting
// results follows the architecture; the address map and the status layout
// are this design's choices.
module uc_interface
  import spsp_pkg::*;
(
  // configuration write side
  input  logic               cfg_we,
  input  logic [11:0]        cfg_addr,
  output logic               we_lines,
  output logic               we_ctrl,
  output logic               we_match,
  output logic               we_crc,
  output logic               we_ack,
  output logic               we_ackl,
  output logic [4:0]         loc_addr,
  // read side
  input  logic               rd_en,
  input  logic [3:0]         rd_addr,
  output logic [31:0]        rd_data,
  output logic               pay_pop,
  // sources
  input  logic               frame_ready,
  input  logic               frame_ok,
  input  logic               ack_busy,
  input  logic               buf_ok,
  input  logic [3:0]         match_hits,
  input  logic [LINE_AW-1:0] line_ptr,
  input  logic [15:0]        pay_avail,
  input  logic [47:0]        eth_da,
  input  logic [47:0]        eth_sa,
  input  logic [31:0]        ip_da,
  input  logic [31:0]        ip_sa,
  input  logic [31:0]        tcp_bn,
  input  logic [31:0]        tcp_qn,
  input  logic [15:0]        pay_len,
  input  logic [7:0]         pay_data,
  input  logic [15:0]        frames_reported,
  input  logic [15:0]        frames_bad,
  input  logic [15:0]        overflows,
  input  logic [15:0]        acks_sent,
  input  logic [5:0]         field_valid,
  input  logic               pay_len_valid,
  input  logic [7:0]         byte_cnt,
  input  logic [31:0]        crc
);
  logic [2:0] region;

  assign region   = cfg_addr[7:5];
  assign loc_addr = cfg_addr[4:0];
  // addresses above 0xFF select nothing
  assign we_lines = cfg_we && cfg_addr[11:8] == 4'd0 && region == REG_LINES;
  assign we_ctrl  = cfg_we && cfg_addr[11:8] == 4'd0 && region == REG_CTRL;
  assign we_match = cfg_we && cfg_addr[11:8] == 4'd0 && region == REG_MATCH;
  assign we_crc   = cfg_we && cfg_addr[11:8] == 4'd0 && region == REG_CRC;
  assign we_ack   = cfg_we && cfg_addr[11:8] == 4'd0 && region == REG_ACK;
  assign we_ackl  = cfg_we && cfg_addr[11:8] == 4'd0 && region == REG_ACKL;

  always_comb begin
    unique case (rd_addr)
      RD_STATUS:   rd_data = {pay_avail, 4'd0, 4'(line_ptr), match_hits,
                              buf_ok, ack_busy, frame_ok, frame_ready};
      RD_ETH_DA_H: rd_data = {16'd0, eth_da[47:32]};
      RD_ETH_DA_L: rd_data = eth_da[31:0];
      RD_ETH_SA_H: rd_data = {16'd0, eth_sa[47:32]};
      RD_ETH_SA_L: rd_data = eth_sa[31:0];
      RD_IP_DA:    rd_data = ip_da;
      RD_IP_SA:    rd_data = ip_sa;
      RD_TCP_BN:   rd_data = tcp_bn;
      RD_TCP_QN:   rd_data = tcp_qn;
      RD_PAY_LEN:  rd_data = {16'd0, pay_len};
      RD_PAY_DATA: rd_data = {24'd0, pay_data};
      RD_FRAMES:   rd_data = {acks_sent, frames_reported};
      RD_ERRORS:   rd_data = {overflows, frames_bad};
      RD_VALID:    rd_data = {16'd0, byte_cnt, 1'b0, pay_len_valid, field_valid};
      RD_CRC:      rd_data = crc;
      default:     rd_data = 32'd0;
    endcase
  end

  assign pay_pop = rd_en && rd_addr == RD_PAY_DATA;
endmodule

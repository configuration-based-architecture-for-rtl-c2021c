// spsp_top: the Super Pipeline Serial Processor (SPSP), a configuration based
// protocol processor for receiving frames at line rate.
//
// The received bit stream is turned into bytes (bit_to_byte) and shifted
// through an N_BYTES byte shift register (byte_shift_reg) that every function
// page (FP) sees in full. The counter and controller walks through a list of
// control lines loaded by the microcontroller; each line runs one or more
// pages for a counted number of bytes, until a flag, or until the frame ends,
// and picks the next line from the flag it checks. The pages are:
//   FP0 fast ACK      fp_fast_ack  builds and sends the acknowledgement frame
//   FP1 matching      fp_match     preamble synchronisation, type checks
//   FP2 Ethernet DA   fp_extract   6-byte field
//   FP3 Ethernet SA   fp_extract   6-byte field
//   FP4 CRC check     fp_crc       frame check sequence
//   FP5 IP DA         fp_extract   4-byte field
//   FP6 IP SA         fp_extract   4-byte field
//   FP7 TCP BN        fp_extract   4-byte field (sequence number)
//   FP8 TCP QN        fp_extract   4-byte field (acknowledgement number)
//   FP9 payload       fp_payload   upper-level payload into data_buffer
// No program runs per byte: the microcontroller only loads the configuration,
// reads results once per frame and answers each report with accept (send
// the fast ACK) or discard. The fast ACK leaves through byte_to_bit.
//
// Interface: rx_* is the receive line (one bit per rx_bit_en while
// rx_line_en is high, LSB first), tx_* the transmit line. cfg_* is the
// configuration write port and rd_* the read port of the microcontroller
// (address map in spsp_pkg). frame_irq is high while a frame report waits for
// an answer on uc_accept or uc_discard; uc_restart sends the controller back
// to its start line.
//
// Timing: with one received byte per clock the pipeline processes a frame of
// N bytes in N + 2 clocks from its first byte to the report (one clock in the
// shift register, one in the controller).
//
// ctrl[3] is reserved: no page of this configuration uses it.
//
// The block structure, the page list and the two control levels follow the
// architecture; the line format, the flag set, the payload buffer with
// commit/rollback and the ACK template are this design's choices.
module spsp_top
  import spsp_pkg::*;
#(
  parameter int unsigned N_BYTES   = 8,
  parameter int unsigned BUF_DEPTH = 2048,
  parameter int unsigned TPL_BYTES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // receive line
  input  logic        rx_line_en,
  input  logic        rx_bit_en,
  input  logic        rx_bit,
  // transmit line (fast ACK)
  input  logic        tx_bit_en,
  output logic        tx_line_en,
  output logic        tx_bit,
  // microcontroller: configuration
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  // microcontroller: data and control
  input  logic        rd_en,
  input  logic [3:0]  rd_addr,
  output logic [31:0] rd_data,
  input  logic        uc_restart,
  input  logic        uc_accept,
  input  logic        uc_discard,
  output logic        frame_irq
);
  // byte stream and window
  logic                    b_valid, b_end;
  logic [7:0]              b_data;
  logic                    w_valid, w_end;
  logic [N_BYTES-1:0][7:0] win;

  // configuration decode
  logic       we_lines, we_ctrl, we_match, we_crc, we_ack, we_ackl;
  logic [4:0] loc_addr;

  // controller
  logic [NUM_FLAGS-1:0] flags;
  logic [NUM_FP-1:0]    fp_active, fp_byte, fp_start, fp_done;
  logic [3:0]           ctrl;
  logic [7:0]           byte_cnt;
  logic [LINE_AW-1:0]   line_ptr;
  logic                 frame_ready, frame_ok, frame_commit, frame_drop, ack_start;
  logic [15:0]          frames_reported, frames_bad;

  // page results
  logic        y_match;
  logic [3:0]  match_hits;
  logic [31:0] crc;
  logic        crc_ok;
  logic [47:0] eth_da, eth_sa;
  logic [31:0] ip_da, ip_sa, tcp_bn, tcp_qn;
  logic [5:0]  f_valid;
  logic        pay_wr;
  logic [7:0]  pay_wdata;
  logic [15:0] pay_len;
  logic        pay_len_valid;

  // data buffer
  logic                       pay_pop;
  logic [7:0]                 pay_rdata;
  logic [$clog2(BUF_DEPTH):0] pay_count;
  logic                       buf_ok;
  logic [15:0]                overflows;

  // fast ACK output
  logic        ack_valid, ack_last, ack_ready, ack_busy;
  logic [7:0]  ack_data;
  logic [15:0] acks_sent;

  assign frame_irq = frame_ready;

  always_comb begin
    flags              = '0;
    flags[FLAG_MATCH]  = y_match;
    flags[FLAG_CRC_OK] = crc_ok;
    flags[FLAG_BUF_OK] = buf_ok;
    flags[FLAG_ONE]    = 1'b1;
  end

  bit_to_byte u_b2b (
    .clk, .rst_n,
    .line_en(rx_line_en), .bit_en(rx_bit_en), .bit_in(rx_bit),
    .byte_valid(b_valid), .byte_data(b_data), .frame_end(b_end)
  );

  byte_shift_reg #(.N_BYTES(N_BYTES)) u_sr (
    .clk, .rst_n,
    .in_valid(b_valid), .in_data(b_data), .in_end(b_end),
    .win_valid(w_valid), .win_end(w_end), .win
  );

  uc_interface u_uc (
    .cfg_we, .cfg_addr,
    .we_lines, .we_ctrl, .we_match, .we_crc, .we_ack, .we_ackl, .loc_addr,
    .rd_en, .rd_addr, .rd_data, .pay_pop,
    .frame_ready, .frame_ok, .ack_busy, .buf_ok, .match_hits, .line_ptr,
    .pay_avail(16'(pay_count)),
    .eth_da, .eth_sa, .ip_da, .ip_sa, .tcp_bn, .tcp_qn,
    .pay_len, .pay_data(pay_rdata), .frames_reported, .frames_bad,
    .overflows, .acks_sent, .field_valid(f_valid), .pay_len_valid, .byte_cnt, .crc
  );

  counter_controller u_ctl (
    .clk, .rst_n,
    .cfg_line_we(we_lines), .cfg_ctrl_we(we_ctrl), .cfg_addr(loc_addr), .cfg_wdata,
    .win_valid(w_valid), .win_end(w_end), .flags,
    .uc_restart, .uc_accept, .uc_discard,
    .fp_active, .fp_byte, .fp_start, .fp_done, .ctrl, .byte_cnt, .line_ptr,
    .frame_ready, .frame_ok, .frame_commit, .frame_drop, .ack_start,
    .frames_reported, .frames_bad
  );

  // FP1: matching
  fp_match #(.N_BYTES(N_BYTES), .MATCH_BYTES(8)) u_fp1_match (
    .clk, .rst_n,
    .cfg_we(we_match), .cfg_addr(loc_addr), .cfg_wdata,
    .active(fp_active[FP_MATCH]), .done(fp_done[FP_MATCH]), .ctrl(ctrl[1:0]),
    .win, .y_match, .hits_q(match_hits)
  );

  // FP2, FP3: Ethernet addresses
  fp_extract #(.N_BYTES(N_BYTES), .FIELD_BYTES(6)) u_fp2_eth_da (
    .clk, .rst_n, .start(fp_start[FP_ETH_DA]), .done(fp_done[FP_ETH_DA]),
    .win, .field(eth_da), .valid(f_valid[0])
  );
  fp_extract #(.N_BYTES(N_BYTES), .FIELD_BYTES(6)) u_fp3_eth_sa (
    .clk, .rst_n, .start(fp_start[FP_ETH_SA]), .done(fp_done[FP_ETH_SA]),
    .win, .field(eth_sa), .valid(f_valid[1])
  );

  // FP4: CRC check over the whole frame after the start delimiter
  fp_crc u_fp4_crc (
    .clk, .rst_n,
    .cfg_we(we_crc), .cfg_addr(loc_addr), .cfg_wdata,
    .byte_en(fp_byte[FP_CRC]), .start(fp_start[FP_CRC]), .data(win[0]),
    .crc, .crc_ok
  );

  // FP5, FP6: IP addresses
  fp_extract #(.N_BYTES(N_BYTES), .FIELD_BYTES(4)) u_fp5_ip_da (
    .clk, .rst_n, .start(fp_start[FP_IP_DA]), .done(fp_done[FP_IP_DA]),
    .win, .field(ip_da), .valid(f_valid[2])
  );
  fp_extract #(.N_BYTES(N_BYTES), .FIELD_BYTES(4)) u_fp6_ip_sa (
    .clk, .rst_n, .start(fp_start[FP_IP_SA]), .done(fp_done[FP_IP_SA]),
    .win, .field(ip_sa), .valid(f_valid[3])
  );

  // FP7, FP8: TCP numbers
  fp_extract #(.N_BYTES(N_BYTES), .FIELD_BYTES(4)) u_fp7_tcp_bn (
    .clk, .rst_n, .start(fp_start[FP_TCP_BN]), .done(fp_done[FP_TCP_BN]),
    .win, .field(tcp_bn), .valid(f_valid[4])
  );
  fp_extract #(.N_BYTES(N_BYTES), .FIELD_BYTES(4)) u_fp8_tcp_qn (
    .clk, .rst_n, .start(fp_start[FP_TCP_QN]), .done(fp_done[FP_TCP_QN]),
    .win, .field(tcp_qn), .valid(f_valid[5])
  );

  // FP9: payload
  fp_payload #(.N_BYTES(N_BYTES)) u_fp9_payload (
    .clk, .rst_n,
    .byte_en(fp_byte[FP_PAYLOAD]), .start(fp_start[FP_PAYLOAD]), .done(fp_done[FP_PAYLOAD]),
    .trim(ctrl[2:0]), .win,
    .wr_en(pay_wr), .wr_data(pay_wdata), .pay_len, .len_valid(pay_len_valid)
  );

  data_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en(pay_wr), .wr_data(pay_wdata),
    .commit(frame_commit), .drop(frame_drop),
    .rd_en(pay_pop), .rd_data(pay_rdata), .rd_count(pay_count),
    .buf_ok, .overflows
  );

  // FP0: fast ACK, between shift-in and shift-out
  fp_fast_ack #(.TPL_BYTES(TPL_BYTES)) u_fp0_ack (
    .clk, .rst_n,
    .cfg_tpl_we(we_ack), .cfg_len_we(we_ackl), .cfg_addr(loc_addr), .cfg_wdata,
    .start(ack_start),
    .eth_da, .eth_sa, .ip_da, .ip_sa, .tcp_bn, .tcp_qn, .pay_len,
    .out_valid(ack_valid), .out_data(ack_data), .out_last(ack_last), .out_ready(ack_ready),
    .busy(ack_busy), .acks_sent
  );

  byte_to_bit u_byte2bit (
    .clk, .rst_n, .bit_en(tx_bit_en),
    .byte_valid(ack_valid), .byte_data(ack_data), .byte_last(ack_last),
    .byte_ready(ack_ready), .line_en(tx_line_en), .bit_out(tx_bit)
  );

endmodule

// counter_controller: the counter based state machine that schedules the
// function pages (FPs) of the SPSP.
//
// A configuration of NUM_LINES control lines is written into a register file
// before frames arrive. The line pointer addresses one line at a time; the
// line says which FPs are active (fp_en), what control code they get (ctrl),
// how the step ends (a byte count, a flag, or the end of the frame), which flag
// is checked when it ends, and which line follows on success or failure. This
// gives the two control levels of the architecture: the lower level is the
// byte counter inside a step, which active FPs use as their reference without
// answering; the upper level is the handover from one line (one FP job) to the
// next, decided by the flags the FPs return.
//
// A frame always starts at the configured start line, normally a line that
// waits for the matching FP to find the preamble. A line with frame_done set
// reports the frame to the microcontroller when it ends (frame_ready, with
// frame_ok = the checked flag). Payload written during a frame is committed
// when the frame is reported good and dropped when it is reported bad or ends
// unreported. The microcontroller answers a report with uc_accept (which starts
// the fast ACK page if the frame was good) or uc_discard, and can force the
// controller back to the start line with uc_restart at any time.
//
// A page gets fp_start on its first byte after a byte in which it was idle,
// and fp_done when a step ends and the next line does not keep it active (or
// the frame ends), so one page can stay active across several lines, as the
// CRC check does for the whole frame.
//
// Only the mode and page enables of the following line (nxt) are looked at
// ahead of time; lint reports its other bits as unused.
//
// Timing: all outputs that FPs use (fp_byte, fp_start, fp_done, fp_active,
// ctrl, byte_cnt) are decoded from the registered line pointer and counter in
// the same clock as the window strobe, so a step hands over to the next one
// with no idle byte. frame_ready rises the clock after the ending byte or the
// end-of-frame strobe; from the last byte leaving bit_to_byte the report takes
// two clocks (one in the shift register, one here).
//
// The register file addressed by a counter, the handover driven by flags, the
// upper/lower control split and the microcontroller handshake steps follow the
// architecture; the line format, the three step modes and the commit/drop
// signals are this design's choices.
module counter_controller
  import spsp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration (register file and start line)
  input  logic                 cfg_line_we,
  input  logic                 cfg_ctrl_we,
  input  logic [4:0]           cfg_addr,
  input  logic [31:0]          cfg_wdata,
  // byte stream events from the shift register
  input  logic                 win_valid,
  input  logic                 win_end,
  // flags returned by the FPs
  input  logic [NUM_FLAGS-1:0] flags,
  // microcontroller requests
  input  logic                 uc_restart,
  input  logic                 uc_accept,
  input  logic                 uc_discard,
  // FP control (handover and counter states)
  output logic [NUM_FP-1:0]    fp_active,
  output logic [NUM_FP-1:0]    fp_byte,   // process the newest window byte
  output logic [NUM_FP-1:0]    fp_start,  // first byte of the step
  output logic [NUM_FP-1:0]    fp_done,   // step ends this clock
  output logic [3:0]           ctrl,
  output logic [7:0]           byte_cnt,
  output logic [LINE_AW-1:0]   line_ptr,
  // frame result
  output logic                 frame_ready,
  output logic                 frame_ok,
  output logic                 frame_commit,
  output logic                 frame_drop,
  output logic                 ack_start,
  output logic [15:0]          frames_reported,
  output logic [15:0]          frames_bad
);
  ctrl_line_t           lines [NUM_LINES];
  logic [LINE_AW-1:0]   start_line;
  logic [LINE_AW-1:0]   ptr;
  logic [7:0]           cnt;
  logic                 reported;   // current frame already reported

  ctrl_line_t cur;
  logic       running;
  logic       step_end;             // current step ends this clock
  logic       chk_ok;
  logic       report_now;
  logic [7:0] len_m1;
  logic       start_we;
  ctrl_line_t nxt;
  logic [NUM_FP-1:0] nxt_en;
  logic [NUM_FP-1:0] act_q;     // pages active on the previous byte
  logic [LINE_AW-1:0] start_next;

  // writing the start line also moves the pointer there
  assign start_we   = cfg_ctrl_we && cfg_addr == 5'd0;
  assign start_next = start_we ? cfg_wdata[LINE_AW-1:0] : start_line;

  assign cur     = lines[ptr];
  assign running = (cur.mode != MODE_HALT);
  assign len_m1  = (cur.len == 8'd0) ? 8'd0 : cur.len - 8'd1;

  always_comb begin
    step_end = 1'b0;
    if (running) begin
      unique case (cur.mode)
        MODE_COUNT:      step_end = win_valid && (cnt == len_m1);
        MODE_UNTIL_FLAG: step_end = win_valid && flags[cur.flag_sel];
        MODE_UNTIL_EOF:  step_end = win_end;
        default:         step_end = 1'b0;
      endcase
    end
  end

  assign chk_ok     = !cur.chk_en || flags[cur.flag_sel];
  assign report_now = step_end && cur.frame_done;

  // the line that follows if the current step ends now
  assign nxt    = lines[chk_ok ? cur.next_ok : cur.next_fail];
  assign nxt_en = (nxt.mode == MODE_HALT || win_end) ? '0 : nxt.fp_en;

  // A page starts on its first byte after a byte in which it was idle, and is
  // done when a step ends and the next line does not keep it running, so a
  // page such as the CRC check can run across many lines.
  assign fp_active = running ? cur.fp_en : '0;
  assign fp_byte   = win_valid ? fp_active : '0;
  assign fp_start  = win_valid ? (fp_active & ~act_q) : '0;
  assign fp_done   = step_end ? (fp_active & ~nxt_en) : '0;
  assign ctrl      = cur.ctrl;
  assign byte_cnt  = cnt;
  assign line_ptr  = ptr;

  // configuration writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_LINES; i++) lines[i] <= '0;
      start_line <= '0;
    end else begin
      if (cfg_line_we) begin
        if (cfg_addr[0] == 1'b0)
          lines[cfg_addr[4:1]][31:0] <= cfg_wdata;
        else
          lines[cfg_addr[4:1]][LINE_W-1:32] <= cfg_wdata[LINE_W-33:0];
      end
      if (start_we) start_line <= cfg_wdata[LINE_AW-1:0];
    end
  end

  // line pointer, counter and frame result
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr             <= '0;
      cnt             <= '0;
      act_q           <= '0;
      reported        <= 1'b0;
      frame_ready     <= 1'b0;
      frame_ok        <= 1'b0;
      frame_commit    <= 1'b0;
      frame_drop      <= 1'b0;
      ack_start       <= 1'b0;
      frames_reported <= '0;
      frames_bad      <= '0;
    end else begin
      frame_commit <= 1'b0;
      frame_drop   <= 1'b0;
      ack_start    <= 1'b0;

      // upper level: handover between lines; lower level: byte counter
      if (step_end) begin
        ptr <= chk_ok ? cur.next_ok : cur.next_fail;
        cnt <= '0;
      end else if (win_valid && running) begin
        cnt <= cnt + 8'd1;
      end
      if (win_valid) act_q <= fp_active;

      if (report_now) begin
        reported        <= 1'b1;
        frame_ready     <= 1'b1;
        frame_ok        <= chk_ok;
        frame_commit    <= chk_ok;
        frame_drop      <= !chk_ok;
        frames_reported <= frames_reported + 16'd1;
        if (!chk_ok) frames_bad <= frames_bad + 16'd1;
      end

      // end of frame, restart request or new start line: back to the start line
      if (win_end || uc_restart || start_we) begin
        ptr      <= start_next;
        cnt      <= '0;
        act_q    <= '0;
        reported <= 1'b0;
        if ((win_end || uc_restart) && !reported && !report_now) frame_drop <= 1'b1;
      end

      // microcontroller handshake
      if (frame_ready && (uc_accept || uc_discard) && !report_now) begin
        frame_ready <= 1'b0;
        ack_start   <= uc_accept && frame_ok;
      end
    end
  end

  // a frame is never both kept and dropped
  assert property (@(posedge clk) disable iff (!rst_n) !(frame_commit && frame_drop));
  // the fast ACK is only started for a good, reported frame
  assert property (@(posedge clk) disable iff (!rst_n) ack_start |-> $past(frame_ready && frame_ok));

endmodule

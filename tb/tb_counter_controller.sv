// tb_counter_controller: self-checking test of counter_controller.
//
// Loads a five-line program: (0) wait for flag 0 with FP1 active (preamble
// hunt); (1) run FP2 for 3 bytes and check flag 0, good -> 2, bad -> 3;
// (2) run FP4 and FP9 until the frame ends, check flag 1, report the frame;
// (3) run nothing until the frame ends (discard); (4) halt. Then drives
// frames byte by byte and checks, at every byte, which pages get fp_byte,
// fp_start and fp_done, the line pointer and the byte counter. It checks the
// report one clock after the end of the frame, commit versus drop, the
// accept/discard handshake with the fast-ACK start, the frame counters, a
// restart in the middle of a frame and a change of the start line. Last, a
// two-line program checks that a page enabled in both lines (the CRC page) is
// neither done nor restarted at the boundary while the other pages are.
module tb_counter_controller;
  import spsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_line_we = 0, cfg_ctrl_we = 0; logic [4:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0;
  logic win_valid = 0, win_end = 0;
  logic [NUM_FLAGS-1:0] flags = 0;
  logic uc_restart = 0, uc_accept = 0, uc_discard = 0;
  logic [NUM_FP-1:0] fp_active, fp_byte, fp_start, fp_done;
  logic [3:0] ctrl; logic [7:0] byte_cnt; logic [LINE_AW-1:0] line_ptr;
  logic frame_ready, frame_ok, frame_commit, frame_drop, ack_start;
  logic [15:0] frames_reported, frames_bad;
  int checks = 0, failures = 0;

  counter_controller dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [NUM_FP-1:0] bit_of(input int i);
    return NUM_FP'(1) << i;
  endfunction

  task automatic wr_line(input int n, input ctrl_line_t l);
    logic [63:0] v = 64'(l);
    cfg_line_we = 1; cfg_addr = 5'(2*n);   cfg_wdata = v[31:0];  @(negedge clk);
    cfg_line_we = 1; cfg_addr = 5'(2*n+1); cfg_wdata = v[63:32]; @(negedge clk);
  endtask

  // one byte: flags for this byte, then the expected decode
  task automatic byte_step(input logic [NUM_FLAGS-1:0] f, input int exp_line,
                           input logic [NUM_FP-1:0] exp_pages, input bit exp_start,
                           input bit exp_done, input string what);
    win_valid = 1; flags = f;
    #1;
    chk(line_ptr == LINE_AW'(exp_line), {what, ": line"});
    chk(fp_byte == exp_pages, {what, ": fp_byte"});
    chk(fp_start == (exp_start ? exp_pages : '0), {what, ": fp_start"});
    chk(fp_done == (exp_done ? exp_pages : '0), {what, ": fp_done"});
    @(negedge clk);
    win_valid = 0;
  endtask

  // one byte with separate expectations for start and done
  task automatic byte_sd(input int exp_line, input logic [NUM_FP-1:0] exp_pages,
                         input logic [NUM_FP-1:0] exp_start, input logic [NUM_FP-1:0] exp_done,
                         input string what);
    win_valid = 1; flags = '0;
    #1;
    chk(line_ptr == LINE_AW'(exp_line), {what, ": line"});
    chk(fp_byte == exp_pages, {what, ": fp_byte"});
    chk(fp_start == exp_start, {what, ": fp_start"});
    chk(fp_done == exp_done, {what, ": fp_done"});
    @(negedge clk);
    win_valid = 0;
  endtask

  task automatic frame_end(input logic [NUM_FLAGS-1:0] f);
    win_end = 1; flags = f; @(negedge clk); win_end = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ctrl_line_t l;
    logic [NUM_FP-1:0] p_hunt, p_da, p_body;
    p_hunt = bit_of(FP_MATCH); p_da = bit_of(FP_ETH_DA); p_body = bit_of(FP_CRC) | bit_of(FP_PAYLOAD);
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    l = '0; l.mode = MODE_UNTIL_FLAG; l.fp_en = p_hunt; l.flag_sel = 0; l.next_ok = 1; l.ctrl = 4'd2;
    wr_line(0, l);
    l = '0; l.mode = MODE_COUNT; l.len = 3; l.fp_en = p_da; l.chk_en = 1; l.flag_sel = 0;
    l.next_ok = 2; l.next_fail = 3; wr_line(1, l);
    l = '0; l.mode = MODE_UNTIL_EOF; l.fp_en = p_body; l.chk_en = 1; l.flag_sel = 1;
    l.frame_done = 1; l.next_ok = 4; l.next_fail = 4; l.ctrl = 4'd4; wr_line(2, l);
    l = '0; l.mode = MODE_UNTIL_EOF; wr_line(3, l);
    l = '0; l.mode = MODE_HALT; wr_line(4, l);
    cfg_line_we = 0;
    cfg_ctrl_we = 1; cfg_addr = 0; cfg_wdata = 0; @(negedge clk); cfg_ctrl_we = 0;

    // ---- frame A: good frame
    for (int i = 0; i < 4; i++) byte_step(8'h00, 0, p_hunt, i == 0, 0, "A hunt");
    chk(ctrl == 4'd2, "A ctrl code of hunt line");
    byte_step(8'h01, 0, p_hunt, 0, 1, "A sync");
    byte_step(8'h00, 1, p_da, 1, 0, "A da0");
    chk(byte_cnt == 1, "A byte counter");
    byte_step(8'h00, 1, p_da, 0, 0, "A da1");
    byte_step(8'h01, 1, p_da, 0, 1, "A da2");
    for (int i = 0; i < 10; i++) byte_step(8'h00, 2, p_body, i == 0, 0, "A body");
    chk(ctrl == 4'd4, "A ctrl code of body line");
    win_end = 1; flags = 8'h02;
    #1; chk(fp_done == p_body, "A body done at end of frame");
    @(negedge clk); win_end = 0;
    chk(frame_ready && frame_ok && frame_commit && !frame_drop, "A report one clock after end");
    chk(frames_reported == 1 && frames_bad == 0, "A counters");
    chk(line_ptr == 0, "A back at start line");
    uc_accept = 1; @(negedge clk); uc_accept = 0;
    chk(ack_start && !frame_ready, "A accept starts fast ACK");
    @(negedge clk); chk(!ack_start, "A ack_start is one pulse");

    // ---- frame B: flag 0 low at end of line 1 -> discard line, dropped
    byte_step(8'h01, 0, p_hunt, 1, 1, "B sync");
    byte_step(8'h00, 1, p_da, 1, 0, "B da0");
    byte_step(8'h00, 1, p_da, 0, 0, "B da1");
    byte_step(8'h00, 1, p_da, 0, 1, "B da2");
    for (int i = 0; i < 5; i++) byte_step(8'h00, 3, '0, 0, 0, "B discard");
    frame_end(8'h02);
    chk(!frame_ready && frame_drop && !frame_commit, "B dropped without report");
    chk(frames_reported == 1, "B not reported");

    // ---- frame C: CRC flag low at the end -> reported bad, dropped
    byte_step(8'h01, 0, p_hunt, 1, 1, "C sync");
    byte_step(8'h00, 1, p_da, 1, 0, "C da0");
    byte_step(8'h00, 1, p_da, 0, 0, "C da1");
    byte_step(8'h01, 1, p_da, 0, 1, "C da2");
    byte_step(8'h00, 2, p_body, 1, 0, "C body");
    frame_end(8'h00);
    chk(frame_ready && !frame_ok && frame_drop && !frame_commit, "C reported bad");
    chk(frames_reported == 2 && frames_bad == 1, "C counters");
    uc_discard = 1; @(negedge clk); uc_discard = 0;
    chk(!frame_ready && !ack_start, "C discard: no fast ACK");
    uc_accept = 1; @(negedge clk); uc_accept = 0;
    chk(!ack_start, "accept with no report: no fast ACK");

    // ---- restart in the middle of a frame
    byte_step(8'h01, 0, p_hunt, 1, 1, "R sync");
    byte_step(8'h00, 1, p_da, 1, 0, "R da0");
    uc_restart = 1; @(negedge clk); uc_restart = 0;
    chk(line_ptr == 0 && byte_cnt == 0 && frame_drop, "restart returns to start line and drops");
    byte_step(8'h00, 0, p_hunt, 1, 0, "R hunt again");
    frame_end(8'h00);

    // ---- new start line
    cfg_ctrl_we = 1; cfg_addr = 0; cfg_wdata = 3; @(negedge clk); cfg_ctrl_we = 0;
    chk(line_ptr == 3, "start line write moves the pointer");
    byte_step(8'h00, 3, '0, 0, 0, "S discard line");
    frame_end(8'h00);
    chk(line_ptr == 3, "frames now start at line 3");

    // ---- a page kept across two lines gets no start or done between them
    begin
      logic [NUM_FP-1:0] c, a, b;
      c = bit_of(FP_CRC); a = bit_of(FP_ETH_DA); b = bit_of(FP_ETH_SA);
      l = '0; l.mode = MODE_COUNT; l.len = 2; l.fp_en = c | a; l.next_ok = 6; l.next_fail = 6; wr_line(5, l);
      l = '0; l.mode = MODE_COUNT; l.len = 2; l.fp_en = c | b; l.next_ok = 4; l.next_fail = 4; wr_line(6, l);
      cfg_line_we = 0;
      cfg_ctrl_we = 1; cfg_addr = 0; cfg_wdata = 5; @(negedge clk); cfg_ctrl_we = 0;
      byte_sd(5, c | a, c | a, '0, "K first byte");
      byte_sd(5, c | a, '0, a,     "K end of line 5: CRC page kept");
      byte_sd(6, c | b, b, '0,     "K line 6: only the new page starts");
      byte_sd(6, c | b, '0, c | b, "K end of line 6: both done before halt");
      byte_sd(4, '0, '0, '0,       "K halted");
      frame_end(8'h00);
      chk(line_ptr == 5, "K back at start line 5");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

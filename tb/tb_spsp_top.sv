// tb_spsp_top: end-to-end test of the SPSP at its default parameters.
//
// The testbench plays the microcontroller and the line. It boots a
// configuration for Ethernet / IPv4 / TCP: four matching patterns (preamble,
// type 0800, protocol 6), sixteen control lines that hunt for the preamble,
// extract Ethernet DA/SA, check the type, skip to and check the IP protocol,
// extract IP SA/DA and TCP BN/QN, and hand the TCP payload to the payload
// page with the CRC check running over the whole frame; frames that are not
// IPv4/TCP branch to a line that takes the whole Ethernet payload. It also
// loads a 62-byte acknowledgement template.
//
// Frames are built here (random addresses, numbers and payload, a correct
// FCS unless an error is planted) and sent bit by bit, LSB first, at one bit
// per clock, with random idle bits before the preamble. After each report
// the testbench reads the fields, the payload length and the payload bytes
// and compares them with what it sent, then accepts good TCP frames, which
// must produce a fast ACK on the transmit line; that frame is decoded and
// compared with a reference built from the template.
//
// Mechanisms counted (each must happen at least once): preamble hunt over
// noise, good TCP frame, CRC error (reported bad, payload dropped), non-IP
// frame (type branch), IP frame that is not TCP (protocol branch), payload
// buffer overflow (frame dropped though its CRC is good), microcontroller
// restart in the middle of a frame, fast ACK sent and checked. The report must
// come a fixed 3 clocks after the line goes idle (end detection, shift
// register, controller), whatever the frame length.
//
// Before that, the testbench boots a recognition configuration that compares
// the Ethernet type with several patterns at once; the latched hit vector
// must name the protocol of each test frame (protocol recognition), and only
// then is the Ethernet / IPv4 / TCP configuration booted.
module tb_spsp_top;
  import spsp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rx_line_en = 0, rx_bit_en = 0, rx_bit = 0;
  logic tx_bit_en = 1, tx_line_en, tx_bit;
  logic cfg_we = 0; logic [11:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0;
  logic rd_en = 0; logic [3:0] rd_addr = 0; logic [31:0] rd_data;
  logic uc_restart = 0, uc_accept = 0, uc_discard = 0;
  logic frame_irq;

  spsp_top dut (.*);

  int checks = 0, failures = 0;
  int n_hunt = 0, n_good = 0, n_crc_err = 0, n_non_ip = 0, n_non_tcp = 0;
  int n_overflow = 0, n_restart = 0, n_ack = 0, n_recog = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ------------------------------------------------------------ CRC model
  logic [31:0] crc_tab [256];
  function automatic logic [31:0] crc_of(input byte unsigned d[$], input int from, input int to);
    logic [31:0] c = 32'hFFFFFFFF;
    for (int i = from; i < to; i++) c = crc_tab[(c ^ d[i]) & 8'hFF] ^ (c >> 8);
    return c;
  endfunction

  // ------------------------------------------------ microcontroller access
  // stimulus changes on the falling edge so the design samples stable values
  task automatic cfg(input logic [11:0] a, input logic [31:0] d);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d; @(negedge clk); cfg_we = 0;
  endtask

  function automatic logic [11:0] ra(input logic [2:0] region, input int w);
    return {4'd0, region, 5'(w)};
  endfunction

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    rd_addr = a; #1; d = rd_data;
  endtask

  task automatic wr_line(input int n, input ctrl_line_t l);
    logic [63:0] v = 64'(l);
    cfg(ra(REG_LINES, 2*n), v[31:0]);
    cfg(ra(REG_LINES, 2*n+1), v[63:32]);
  endtask

  function automatic ctrl_line_t line(input step_mode_e mode, input int len,
                                      input logic [NUM_FP-1:0] en, input int nok);
    ctrl_line_t l = '0;
    l.mode = mode; l.len = 8'(len); l.fp_en = en; l.next_ok = LINE_AW'(nok); l.next_fail = LINE_AW'(nok);
    return l;
  endfunction

  function automatic logic [NUM_FP-1:0] pg(input int a, input int b = -1);
    logic [NUM_FP-1:0] m = NUM_FP'(1) << a;
    if (b >= 0) m |= NUM_FP'(1) << b;
    return m;
  endfunction

  // -------------------------------------------------------- configuration
  byte unsigned tpl[62];

  task automatic boot();
    ctrl_line_t l;
    // matching patterns: 0 preamble, 1 type 0800 (2 bytes), 2 protocol 6
    cfg(ra(REG_MATCH, 0), 32'h5555_55D5); cfg(ra(REG_MATCH, 1), 32'h5555_5555);
    cfg(ra(REG_MATCH, 2), 32'hFFFF_FFFF); cfg(ra(REG_MATCH, 3), 32'hFFFF_FFFF);
    cfg(ra(REG_MATCH, 4), 32'h0000_0800); cfg(ra(REG_MATCH, 5), 32'h0);
    cfg(ra(REG_MATCH, 6), 32'h0000_FFFF); cfg(ra(REG_MATCH, 7), 32'h0);
    cfg(ra(REG_MATCH, 8), 32'h0000_0006); cfg(ra(REG_MATCH, 9), 32'h0);
    cfg(ra(REG_MATCH, 10), 32'h0000_00FF); cfg(ra(REG_MATCH, 11), 32'h0);
    // CRC-32 (Ethernet)
    cfg(ra(REG_CRC, 0), 32'hEDB88320); cfg(ra(REG_CRC, 1), 32'hFFFFFFFF); cfg(ra(REG_CRC, 2), 32'hDEBB20E3);
    // control lines
    l = line(MODE_UNTIL_FLAG, 0, pg(FP_MATCH), 1); l.flag_sel = 3'(FLAG_MATCH); l.ctrl = 0; wr_line(0, l);
    wr_line(1, line(MODE_COUNT, 6, pg(FP_ETH_DA, FP_CRC), 2));
    wr_line(2, line(MODE_COUNT, 6, pg(FP_ETH_SA, FP_CRC), 3));
    l = line(MODE_COUNT, 2, pg(FP_MATCH, FP_CRC), 4); l.ctrl = 1; l.chk_en = 1;
    l.flag_sel = 3'(FLAG_MATCH); l.next_fail = 14; wr_line(3, l);
    wr_line(4, line(MODE_COUNT, 9, pg(FP_CRC), 5));
    l = line(MODE_COUNT, 1, pg(FP_MATCH, FP_CRC), 6); l.ctrl = 2; l.chk_en = 1;
    l.flag_sel = 3'(FLAG_MATCH); l.next_fail = 14; wr_line(5, l);
    wr_line(6, line(MODE_COUNT, 2, pg(FP_CRC), 7));
    wr_line(7, line(MODE_COUNT, 4, pg(FP_IP_SA, FP_CRC), 8));
    wr_line(8, line(MODE_COUNT, 4, pg(FP_IP_DA, FP_CRC), 9));
    wr_line(9, line(MODE_COUNT, 4, pg(FP_CRC), 10));
    wr_line(10, line(MODE_COUNT, 4, pg(FP_TCP_BN, FP_CRC), 11));
    wr_line(11, line(MODE_COUNT, 4, pg(FP_TCP_QN, FP_CRC), 12));
    wr_line(12, line(MODE_COUNT, 8, pg(FP_CRC), 13));
    l = line(MODE_UNTIL_EOF, 0, pg(FP_PAYLOAD, FP_CRC), 15); l.ctrl = 4; l.chk_en = 1;
    l.flag_sel = 3'(FLAG_CRC_OK); l.frame_done = 1; wr_line(13, l);
    wr_line(14, l);
    wr_line(15, line(MODE_HALT, 0, '0, 15));
    cfg(ra(REG_CTRL, 0), 0);
    // acknowledgement template
    foreach (tpl[i]) tpl[i] = 8'($urandom);
    for (int i = 0; i < 7; i++) tpl[i] = 8'h55;
    tpl[7] = 8'hD5;
    for (int w = 0; w < 16; w++) begin
      automatic logic [31:0] d = '0;
      for (int j = 0; j < 4; j++) if (4*w + j < 62) d[8*j +: 8] = tpl[4*w + j];
      cfg(ra(REG_ACK, w), d);
    end
    cfg(ra(REG_ACKL, 0), 62);
  endtask

  // Recognition configuration: find the preamble, skip the addresses, then
  // compare the type field with all patterns at once (1 IPv4, 2 IPv6, 3 ARP)
  // and report with the CRC verdict. The hit vector tells which protocol came.
  task automatic boot_recognition();
    ctrl_line_t l;
    cfg(ra(REG_MATCH, 0), 32'h5555_55D5); cfg(ra(REG_MATCH, 1), 32'h5555_5555);
    cfg(ra(REG_MATCH, 2), 32'hFFFF_FFFF); cfg(ra(REG_MATCH, 3), 32'hFFFF_FFFF);
    cfg(ra(REG_MATCH, 4), 32'h0000_0800);  cfg(ra(REG_MATCH, 5), 32'h0);
    cfg(ra(REG_MATCH, 6), 32'h0000_FFFF);  cfg(ra(REG_MATCH, 7), 32'h0);
    cfg(ra(REG_MATCH, 8), 32'h0000_86DD);  cfg(ra(REG_MATCH, 9), 32'h0);
    cfg(ra(REG_MATCH, 10), 32'h0000_FFFF); cfg(ra(REG_MATCH, 11), 32'h0);
    cfg(ra(REG_MATCH, 12), 32'h0000_0806); cfg(ra(REG_MATCH, 13), 32'h0);
    cfg(ra(REG_MATCH, 14), 32'h0000_FFFF); cfg(ra(REG_MATCH, 15), 32'h0);
    l = line(MODE_UNTIL_FLAG, 0, pg(FP_MATCH), 1); l.flag_sel = 3'(FLAG_MATCH); wr_line(0, l);
    wr_line(1, line(MODE_COUNT, 12, pg(FP_CRC), 2));
    l = line(MODE_COUNT, 2, pg(FP_MATCH, FP_CRC), 3); l.ctrl = 1; wr_line(2, l);
    l = line(MODE_UNTIL_EOF, 0, pg(FP_CRC), 15); l.chk_en = 1;
    l.flag_sel = 3'(FLAG_CRC_OK); l.frame_done = 1; wr_line(3, l);
    wr_line(15, line(MODE_HALT, 0, '0, 15));
    cfg(ra(REG_CTRL, 0), 0);
  endtask

  // ------------------------------------------------------------- frames
  typedef enum {K_TCP, K_NON_IP, K_NON_TCP} kind_e;

  logic [47:0] f_da, f_sa; logic [31:0] f_ipsa, f_ipda, f_bn, f_qn;
  byte unsigned frame[$];
  byte unsigned exp_pay[$];

  task automatic build(input kind_e kind, input int pay_n, input bit bad_crc);
    logic [31:0] c;
    byte unsigned pay[$];
    f_da = {$urandom, $urandom}; f_sa = {$urandom, $urandom};
    f_ipsa = $urandom; f_ipda = $urandom; f_bn = $urandom; f_qn = $urandom;
    frame.delete(); exp_pay.delete();
    for (int i = 0; i < 7; i++) frame.push_back(8'h55);
    frame.push_back(8'hD5);
    for (int i = 0; i < 6; i++) frame.push_back(f_da[8*(5-i) +: 8]);
    for (int i = 0; i < 6; i++) frame.push_back(f_sa[8*(5-i) +: 8]);
    if (kind == K_NON_IP) begin frame.push_back(8'h86); frame.push_back(8'hDD); end
    else                  begin frame.push_back(8'h08); frame.push_back(8'h00); end
    for (int i = 0; i < pay_n; i++) pay.push_back(8'($urandom));
    if (kind != K_NON_IP) begin
      // IPv4 header
      byte unsigned ip[20];
      foreach (ip[i]) ip[i] = 8'($urandom);
      ip[0] = 8'h45; ip[9] = (kind == K_TCP) ? 8'd6 : 8'd17;
      for (int i = 0; i < 4; i++) begin ip[12+i] = f_ipsa[8*(3-i) +: 8]; ip[16+i] = f_ipda[8*(3-i) +: 8]; end
      if (kind == K_NON_TCP) foreach (ip[i]) if (i >= 10) exp_pay.push_back(ip[i]);
      foreach (ip[i]) frame.push_back(ip[i]);
      if (kind == K_TCP) begin
        byte unsigned tcp[20];
        foreach (tcp[i]) tcp[i] = 8'($urandom);
        for (int i = 0; i < 4; i++) begin tcp[4+i] = f_bn[8*(3-i) +: 8]; tcp[8+i] = f_qn[8*(3-i) +: 8]; end
        foreach (tcp[i]) frame.push_back(tcp[i]);
      end
    end else begin
      // whole Ethernet payload
    end
    foreach (pay[i]) begin frame.push_back(pay[i]); exp_pay.push_back(pay[i]); end
    c = ~crc_of(frame, 8, frame.size());
    for (int i = 0; i < 4; i++) frame.push_back(c[8*i +: 8]);
    if (bad_crc) frame[30] = frame[30] ^ 8'h10;
  endtask

  // send the frame after some noise bits
  int end_clk;
  task automatic send(input int noise_bits);
    for (int i = 0; i < noise_bits; i++) begin
      rx_line_en = 1; rx_bit_en = 1; rx_bit = 1'($urandom); @(negedge clk);
    end
    foreach (frame[i]) begin
      for (int k = 0; k < 8; k++) begin
        rx_line_en = 1; rx_bit_en = 1; rx_bit = frame[i][k]; @(negedge clk);
      end
    end
    rx_line_en = 0; rx_bit_en = 0;
    end_clk = cyc;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ------------------------------------------------------ transmit capture
  byte unsigned txq[$];
  logic [7:0] tx_sh; int tx_nb = 0;
  always @(posedge clk) if (rst_n && tx_line_en && tx_bit_en) begin
    tx_sh = {tx_bit, tx_sh[7:1]}; tx_nb++;
    if (tx_nb == 8) begin txq.push_back(tx_sh); tx_nb = 0; end
  end

  // --------------------------------------------------------------- checks
  task automatic wait_report(output int lat);
    int t0 = end_clk;
    int guard = 0;
    while (!frame_irq && guard < 50) begin @(negedge clk); guard++; end
    lat = cyc - t0;
  endtask

  task automatic check_frame(input kind_e kind, input bit bad_crc, input bit ovf, input string tag);
    logic [31:0] d, st;
    int lat;
    int avail;
    wait_report(lat);
    chk(frame_irq, {tag, ": frame reported"});
    chk(lat == 3, $sformatf("%s: report latency %0d clocks, expected 3", tag, lat));
    rd(RD_STATUS, st);
    chk(st[1] == !bad_crc, {tag, ": frame good flag"});
    rd(RD_ETH_DA_H, d); chk(d[15:0] == f_da[47:32], {tag, ": Ethernet DA high"});
    rd(RD_ETH_DA_L, d); chk(d == f_da[31:0], {tag, ": Ethernet DA low"});
    rd(RD_ETH_SA_H, d); chk(d[15:0] == f_sa[47:32], {tag, ": Ethernet SA high"});
    rd(RD_ETH_SA_L, d); chk(d == f_sa[31:0], {tag, ": Ethernet SA low"});
    if (kind == K_TCP) begin
      rd(RD_IP_SA, d);  chk(d == f_ipsa, {tag, ": IP SA"});
      rd(RD_IP_DA, d);  chk(d == f_ipda, {tag, ": IP DA"});
      rd(RD_TCP_BN, d); chk(d == f_bn, {tag, ": TCP BN"});
      rd(RD_TCP_QN, d); chk(d == f_qn, {tag, ": TCP QN"});
    end
    rd(RD_PAY_LEN, d); chk(d == 32'(exp_pay.size()), $sformatf("%s: payload length %0d exp %0d", tag, d, exp_pay.size()));
    @(negedge clk);
    rd(RD_STATUS, st);
    avail = int'(st[31:16]);
    if (bad_crc || ovf) begin
      chk(avail == 0, {tag, ": payload of a bad frame is not kept"});
    end else begin
      chk(avail == exp_pay.size(), $sformatf("%s: payload bytes available %0d exp %0d", tag, avail, exp_pay.size()));
      foreach (exp_pay[i]) begin
        rd(RD_PAY_DATA, d);
        if (d[7:0] != exp_pay[i]) begin chk(0, $sformatf("%s: payload byte %0d", tag, i)); break; end
        rd_en = 1; @(negedge clk); rd_en = 0;
      end
      checks++;
    end
  endtask

  task automatic check_ack();
    byte unsigned e[$];
    logic [31:0] ack;
    int guard = 0;
    txq.delete(); tx_nb = 0;
    uc_accept = 1; @(negedge clk); uc_accept = 0;
    foreach (tpl[i]) e.push_back(tpl[i]);
    ack = f_bn + 32'(exp_pay.size());
    for (int i = 0; i < 6; i++) begin e[8+i] = f_sa[8*(5-i) +: 8]; e[14+i] = f_da[8*(5-i) +: 8]; end
    for (int i = 0; i < 4; i++) begin
      e[34+i] = f_ipda[8*(3-i) +: 8]; e[38+i] = f_ipsa[8*(3-i) +: 8];
      e[46+i] = f_qn[8*(3-i) +: 8];   e[50+i] = ack[8*(3-i) +: 8];
    end
    while (txq.size() < 66 && guard < 2000) begin @(negedge clk); guard++; end
    repeat (20) @(negedge clk);
    chk(txq.size() == 66, $sformatf("fast ACK length %0d", txq.size()));
    if (txq.size() == 66) begin
      bit same = 1;
      for (int i = 0; i < 62; i++) if (txq[i] != e[i]) same = 0;
      chk(same, "fast ACK contents");
      chk(crc_of(txq, 8, 66) == 32'hDEBB20E3, "fast ACK FCS");
      if (same) n_ack++;
    end
  endtask

  // ---------------------------------------------------------------- run
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    for (int n = 0; n < 256; n++) begin
      automatic logic [31:0] c = 32'(n);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB88320 : c >> 1;
      crc_tab[n] = c;
    end
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // protocol recognition first, then the configuration for what was found
    boot_recognition();
    for (int t = 0; t < 2; t++) begin
      logic [31:0] st;
      int lat;
      kind_e kind = (t == 0) ? K_NON_IP : K_TCP;
      build(kind, $urandom_range(6, 40), 0);
      send(8 * t);
      wait_report(lat);
      chk(frame_irq && lat == 3, $sformatf("recognition %0d: reported after %0d clocks", t, lat));
      rd(RD_STATUS, st);
      chk(st[1], $sformatf("recognition %0d: CRC good", t));
      chk(st[7:4] == ((kind == K_TCP) ? 4'b0010 : 4'b0100),
          $sformatf("recognition %0d: hit vector %b", t, st[7:4]));
      if (frame_irq && st[7:4] == ((kind == K_TCP) ? 4'b0010 : 4'b0100)) n_recog++;
      uc_discard = 1; @(negedge clk); uc_discard = 0;
      repeat (5) @(negedge clk);
    end
    boot();

    for (int t = 0; t < 12; t++) begin
      kind_e kind;
      bit bad;
      int noise;
      case (t % 4)
        0, 1: kind = K_TCP;
        2:    kind = K_NON_IP;
        default: kind = K_NON_TCP;
      endcase
      bad = (t % 5 == 4);
      noise = (t % 2) ? 8 * $urandom_range(1, 6) : 0;
      build(kind, $urandom_range(6, 80), bad);
      send(noise);
      if (noise > 0) n_hunt++;
      check_frame(kind, bad, 0, $sformatf("frame %0d", t));
      if (bad) n_crc_err++;
      else if (kind == K_NON_IP) n_non_ip++;
      else if (kind == K_NON_TCP) n_non_tcp++;
      else n_good++;
      if (kind == K_TCP && !bad) check_ack();
      else begin uc_discard = 1; @(negedge clk); uc_discard = 0; end
      repeat (5) @(negedge clk);
    end

    // payload larger than the buffer: good CRC, but dropped
    build(K_TCP, 2100, 0);
    send(0);
    check_frame(K_TCP, 0, 1, "overflow frame");
    rd(RD_ERRORS, d);
    chk(d[31:16] == 1, "overflow counted");
    if (d[31:16] == 1) n_overflow++;
    uc_discard = 1; @(negedge clk); uc_discard = 0;

    // restart in the middle of a frame: the rest of the frame is ignored
    build(K_TCP, 20, 0);
    fork
      send(0);
      begin
        repeat (8 * 30) @(negedge clk);
        uc_restart = 1; @(negedge clk); uc_restart = 0;
        rd(RD_STATUS, d);
        chk(d[11:8] == 0, "restart: back at start line");
        if (d[11:8] == 0) n_restart++;
      end
    join
    repeat (10) @(negedge clk);
    chk(!frame_irq, "restart: interrupted frame is not reported");
    repeat (5) @(negedge clk);
    build(K_TCP, 20, 0);
    send(40);
    check_frame(K_TCP, 0, 0, "after restart");
    check_ack();

    rd(RD_FRAMES, d);
    chk(d[15:0] == 16, $sformatf("frames reported %0d", d[15:0]));
    chk(d[31:16] == 16'(n_ack), "ACK counter");

    chk(n_hunt > 0, "mechanism: preamble hunt over noise");
    chk(n_good > 0, "mechanism: good TCP frame");
    chk(n_crc_err > 0, "mechanism: CRC error");
    chk(n_non_ip > 0, "mechanism: type branch (non-IP)");
    chk(n_non_tcp > 0, "mechanism: protocol branch (IP, not TCP)");
    chk(n_overflow > 0, "mechanism: payload buffer overflow");
    chk(n_restart > 0, "mechanism: restart");
    chk(n_ack > 0, "mechanism: fast ACK");
    chk(n_recog > 0, "mechanism: protocol recognition");
    $display("mechanisms: hunt=%0d good=%0d crc_err=%0d non_ip=%0d non_tcp=%0d overflow=%0d restart=%0d ack=%0d recog=%0d",
             n_hunt, n_good, n_crc_err, n_non_ip, n_non_tcp, n_overflow, n_restart, n_ack, n_recog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

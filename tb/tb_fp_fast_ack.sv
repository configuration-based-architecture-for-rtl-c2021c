// tb_fp_fast_ack: self-checking test of the fast ACK page fp_fast_ack.
//
// Loads a random 62-byte template (8 bytes preamble/delimiter, 14 Ethernet,
// 20 IPv4, 20 TCP), presents random received fields and starts the page.
// The output bytes are collected under a random out_ready and compared with a
// reference frame built here: the template with the Ethernet addresses and IP
// addresses swapped in, the sequence number taken from the received QN and the
// ack number = received BN + payload length, followed by the 4-byte FCS. The
// FCS is checked by running a table-driven CRC-32 over the frame after the
// delimiter, FCS included, which must leave the residue DEBB20E3. Also checks
// out_last, the frame length, that a start while busy is ignored and that
// the ACK counter counts.
module tb_fp_fast_ack;
  localparam int TPL = 62;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_tpl_we = 0, cfg_len_we = 0; logic [4:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0;
  logic start = 0;
  logic [47:0] eth_da = 0, eth_sa = 0;
  logic [31:0] ip_da = 0, ip_sa = 0, tcp_bn = 0, tcp_qn = 0;
  logic [15:0] pay_len = 0;
  logic out_valid, out_last, out_ready = 0, busy;
  logic [7:0] out_data;
  logic [15:0] acks_sent;
  int checks = 0, failures = 0;

  fp_fast_ack #(.TPL_BYTES(64), .FCS_FROM(8)) dut (.*);

  logic [31:0] table_e [256];
  byte unsigned tpl[TPL];
  byte unsigned got[$];
  int last_at = -1;

  always @(posedge clk) if (rst_n) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (out_valid && out_ready) begin
      got.push_back(out_data);
      if (out_last) last_at = got.size();
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte unsigned expq[$];
    logic [31:0] c, ack;
    for (int n = 0; n < 256; n++) begin
      c = 32'(n);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB88320 : c >> 1;
      table_e[n] = c;
    end
    foreach (tpl[i]) tpl[i] = 8'($urandom);
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int w = 0; w < 16; w++) begin
      automatic logic [31:0] d = '0;
      for (int j = 0; j < 4; j++) if (4*w + j < TPL) d[8*j +: 8] = tpl[4*w + j];
      cfg_tpl_we <= 1; cfg_addr <= 5'(w); cfg_wdata <= d; @(posedge clk);
    end
    cfg_tpl_we <= 0;
    cfg_len_we <= 1; cfg_addr <= 0; cfg_wdata <= TPL; @(posedge clk);
    cfg_len_we <= 0;
    for (int t = 0; t < 20; t++) begin
      eth_da <= {$urandom, $urandom}; eth_sa <= {$urandom, $urandom};
      ip_da <= $urandom; ip_sa <= $urandom; tcp_bn <= $urandom; tcp_qn <= $urandom;
      pay_len <= 16'($urandom_range(0, 1500));
      @(posedge clk);
      got.delete(); last_at = -1;
      start <= 1; @(posedge clk); start <= 0;
      // a second start while busy must be ignored
      repeat (3) @(posedge clk); start <= 1; @(posedge clk); start <= 0;
      // reference frame
      expq.delete();
      foreach (tpl[i]) expq.push_back(tpl[i]);
      for (int i = 0; i < 6; i++) begin
        expq[8 + i]  = eth_sa[8*(5-i) +: 8];
        expq[14 + i] = eth_da[8*(5-i) +: 8];
      end
      ack = tcp_bn + 32'(pay_len);
      for (int i = 0; i < 4; i++) begin
        expq[34 + i] = ip_da[8*(3-i) +: 8];
        expq[38 + i] = ip_sa[8*(3-i) +: 8];
        expq[46 + i] = tcp_qn[8*(3-i) +: 8];
        expq[50 + i] = ack[8*(3-i) +: 8];
      end
      while (busy) @(posedge clk);
      repeat (40) @(posedge clk);
      checks++;
      if (got.size() != TPL + 4 || last_at != TPL + 4) begin
        failures++; $display("FAIL length %0d last at %0d", got.size(), last_at);
      end else begin
        for (int i = 0; i < TPL; i++) begin
          checks++;
          if (got[i] !== expq[i]) begin failures++; $display("FAIL byte %0d %h exp %h", i, got[i], expq[i]); end
        end
        c = 32'hFFFFFFFF;
        for (int i = 8; i < TPL + 4; i++) c = table_e[(c ^ got[i]) & 8'hFF] ^ (c >> 8);
        checks++;
        if (c !== 32'hDEBB20E3) begin failures++; $display("FAIL FCS residue %h", c); end
      end
      checks++;
      if (acks_sent != 16'(t + 1)) begin failures++; $display("FAIL acks_sent %0d", acks_sent); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

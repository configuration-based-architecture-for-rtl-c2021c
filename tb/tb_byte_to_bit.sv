// tb_byte_to_bit: self-checking test of byte_to_bit.
//
// Offers frames of random bytes with a valid/ready handshake, sometimes with
// bit_en always high and sometimes with random gaps. The line is sampled at
// every bit_en clock while line_en is high and the bits, LSB first, are
// reassembled into bytes and compared. With bit_en always high a frame of n
// bytes must keep line_en high for exactly 8n clocks (no gap between bytes),
// and line_en must fall between frames.
module tb_byte_to_bit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bit_en = 0, byte_valid = 0, byte_last = 0;
  logic [7:0] byte_data = 0;
  logic byte_ready, line_en, bit_out;
  int checks = 0, failures = 0;

  byte_to_bit dut (.*);

  byte unsigned exp_q[$];
  logic [7:0] sh; int nb = 0; int hi_cycles = 0; int frames_seen = 0;
  logic line_q = 0;

  always @(posedge clk) if (rst_n) begin
    line_q <= line_en;
    if (line_en) hi_cycles++;
    if (line_q && !line_en) frames_seen++;
    if (line_en && bit_en) begin
      sh = {bit_out, sh[7:1]}; nb++;
      if (nb == 8) begin
        nb = 0; checks++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL extra byte"); end
        else begin
          automatic byte unsigned e = exp_q.pop_front();
          if (sh !== e) begin failures++; $display("FAIL got %h exp %h", sh, e); end
        end
      end
    end
  end

  bit gaps = 0;
  always @(posedge clk) bit_en <= gaps ? ($urandom_range(0, 2) == 0) : 1'b1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int f = 0; f < 12; f++) begin
      automatic int n = $urandom_range(1, 20);
      gaps = (f % 2 == 1);
      hi_cycles = 0; nb = 0;
      for (int i = 0; i < n; i++) begin
        automatic logic [7:0] d = 8'($urandom);
        byte_valid <= 1; byte_data <= d; byte_last <= (i == n - 1);
        exp_q.push_back(d);
        do @(negedge clk); while (!byte_ready);
        @(posedge clk);
      end
      byte_valid <= 0; byte_last <= 0;
      do @(negedge clk); while (line_en || line_q);
      repeat (2) @(posedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("FAIL %0d bytes not sent", exp_q.size()); exp_q.delete(); end
      checks++;
      if (frames_seen != f + 1) begin failures++; $display("FAIL frames %0d exp %0d", frames_seen, f + 1); end
      if (!gaps) begin
        checks++;
        if (hi_cycles != 8 * n) begin failures++; $display("FAIL line high %0d clocks exp %0d", hi_cycles, 8 * n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

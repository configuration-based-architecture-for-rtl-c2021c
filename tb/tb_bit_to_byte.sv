// tb_bit_to_byte: self-checking test of bit_to_byte.
//
// Sends frames of random bytes, LSB first, with random gaps in bit_en, plus
// a trailing partial byte on some frames. Checks every received byte against
// the sent one, that a byte appears exactly once per eight bits (rate one
// eighth of the bit rate), that the partial byte is dropped and that
// frame_end pulses once per frame after the last byte.
module tb_bit_to_byte;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic line_en = 0, bit_en = 0, bit_in = 0;
  logic byte_valid, frame_end;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;

  bit_to_byte dut (.*);

  byte unsigned exp_q[$];
  int ends = 0, bytes_seen = 0;

  always @(posedge clk) if (rst_n) begin
    if (byte_valid) begin
      checks++; bytes_seen++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected byte %h", byte_data); end
      else begin
        automatic byte unsigned e = exp_q.pop_front();
        if (byte_data !== e) begin failures++; $display("FAIL byte %h exp %h", byte_data, e); end
      end
    end
    if (frame_end) ends++;
  end

  task automatic send_bit(input logic b);
    while ($urandom_range(0, 3) == 0) begin
      bit_en <= 0; @(posedge clk);
    end
    bit_en <= 1; bit_in <= b; @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nbytes_total = 0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int f = 0; f < 20; f++) begin
      automatic int n = $urandom_range(1, 40);
      automatic int extra = (f % 3 == 0) ? $urandom_range(1, 7) : 0;
      line_en <= 1;
      for (int i = 0; i < n; i++) begin
        automatic byte unsigned b = 8'($urandom);
        exp_q.push_back(b);
        nbytes_total++;
        for (int k = 0; k < 8; k++) send_bit(b[k]);
      end
      for (int k = 0; k < extra; k++) send_bit(1'($urandom));
      line_en <= 0; bit_en <= 0;
      repeat (4) @(posedge clk);
      checks++;
      if (ends != f + 1) begin failures++; $display("FAIL frame_end count %0d at frame %0d", ends, f); end
    end
    checks++;
    if (bytes_seen != nbytes_total || exp_q.size() != 0) begin
      failures++; $display("FAIL byte count %0d exp %0d", bytes_seen, nbytes_total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_data_buffer: self-checking test of data_buffer.
//
// Writes frames of random length; each is then committed or dropped at
// random. A reference queue holds only committed frames. The reader pops at
// random times and every byte must match the reference; bytes of a dropped
// frame must never appear. A frame longer than the free space overflows: it
// must be rolled back even though it is committed, buf_ok must go low during
// it and the overflow counter must count it.
module tb_data_buffer;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, commit = 0, drop = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [$clog2(DEPTH):0] rd_count;
  logic buf_ok; logic [15:0] overflows;
  int checks = 0, failures = 0;

  data_buffer #(.DEPTH(DEPTH)) dut (.*);

  byte unsigned ref_q[$];
  int exp_ovf = 0;

  task automatic drain();
    while (ref_q.size() > 0) begin
      @(negedge clk);
      checks++;
      if (rd_count != ($clog2(DEPTH)+1)'(ref_q.size())) begin
        failures++; $display("FAIL rd_count %0d exp %0d", rd_count, ref_q.size());
      end
      checks++;
      if (rd_data !== ref_q[0]) begin failures++; $display("FAIL rd_data %h exp %h", rd_data, ref_q[0]); end
      void'(ref_q.pop_front());
      rd_en <= 1; @(posedge clk); rd_en <= 0;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte unsigned fr[$];
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      automatic int free = DEPTH - ref_q.size();
      automatic int n = (t % 10 == 9) ? free + 3 : $urandom_range(1, 20);
      automatic bit keep = $urandom_range(0, 2) != 0;
      automatic bit ovf = n > free;
      fr.delete();
      for (int i = 0; i < n; i++) begin
        automatic logic [7:0] b = 8'($urandom);
        fr.push_back(b);
        wr_en <= 1; wr_data <= b; @(posedge clk);
      end
      wr_en <= 0;
      @(negedge clk);
      checks++;
      if (buf_ok !== !ovf) begin failures++; $display("FAIL buf_ok=%b ovf=%b", buf_ok, ovf); end
      if (keep) commit <= 1; else drop <= 1;
      @(posedge clk); commit <= 0; drop <= 0;
      if (ovf) exp_ovf++;
      if (keep && !ovf) foreach (fr[i]) ref_q.push_back(fr[i]);
      if ($urandom_range(0, 2) == 0 || ref_q.size() > DEPTH - 20) drain();
      @(negedge clk);
      checks++;
      if (overflows != 16'(exp_ovf)) begin failures++; $display("FAIL overflows %0d exp %0d", overflows, exp_ovf); end
    end
    drain();
    @(negedge clk);
    checks++;
    if (rd_count != 0) begin failures++; $display("FAIL buffer not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

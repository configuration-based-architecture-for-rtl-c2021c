// tb_fp_payload: self-checking test of the payload page fp_payload.
//
// Runs steps of random length with a random trim of 0..7, some ending with
// a byte (counted step) and some ending alone (end of frame). Checks that
// exactly the step's bytes minus the last `trim` are written, in order, and
// that pay_len equals that count (0 when the step is shorter than trim).
module tb_fp_payload;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic byte_en = 0, start = 0, done = 0;
  logic [2:0] trim = 0;
  logic [7:0][7:0] win = '0;
  logic wr_en; logic [7:0] wr_data; logic [15:0] pay_len; logic len_valid;
  int checks = 0, failures = 0;

  fp_payload #(.N_BYTES(8)) dut (.*);

  byte unsigned got[$];
  always @(posedge clk) if (rst_n && wr_en) got.push_back(wr_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0][7:0] w;
    byte unsigned sent[$];
    w = '0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      automatic int n = (t < 8) ? t + 1 : $urandom_range(1, 60);
      automatic int tr = $urandom_range(0, 7);
      automatic bit eof_end = $urandom_range(0, 1);
      automatic int exp_len = (n > tr) ? n - tr : 0;
      sent.delete(); got.delete();
      trim <= 3'(tr);
      for (int i = 0; i < n; i++) begin
        automatic logic [7:0] b = 8'($urandom);
        w = {w[6:0], b}; sent.push_back(b);
        win <= w; byte_en <= 1; start <= (i == 0); done <= (!eof_end && i == n - 1);
        @(posedge clk);
      end
      byte_en <= 0; start <= 0; done <= eof_end;
      @(posedge clk);
      done <= 0;
      @(negedge clk);
      checks++;
      if (pay_len !== 16'(exp_len) || !len_valid) begin
        failures++; $display("FAIL pay_len %0d exp %0d (n=%0d trim=%0d)", pay_len, exp_len, n, tr);
      end
      checks++;
      if (got.size() != exp_len) begin failures++; $display("FAIL wrote %0d exp %0d", got.size(), exp_len); end
      else for (int i = 0; i < exp_len; i++) begin
        checks++;
        if (got[i] !== sent[i]) begin failures++; $display("FAIL byte %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

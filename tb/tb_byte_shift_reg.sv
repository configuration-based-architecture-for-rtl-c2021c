// tb_byte_shift_reg: self-checking test of byte_shift_reg.
//
// Shifts random bytes in with random gaps and compares the whole window with
// a reference queue after every byte, checks the one-clock latency of
// win_valid and win_end, and checks that the window is cleared at the end
// of a frame.
module tb_byte_shift_reg;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_end = 0;
  logic [7:0] in_data = 0;
  logic win_valid, win_end;
  logic [N-1:0][7:0] win;
  int checks = 0, failures = 0;

  byte_shift_reg #(.N_BYTES(N)) dut (.*);

  logic [7:0] model [N];

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int f = 0; f < 10; f++) begin
      for (int i = 0; i < 30; i++) begin
        in_valid <= 1; in_data <= 8'($urandom);
        @(posedge clk);
        in_valid <= 0;
        for (int k = N - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = in_data;
        @(negedge clk);
        checks++;
        if (!win_valid) begin failures++; $display("FAIL win_valid not one clock after in_valid"); end
        for (int k = 0; k < N; k++) begin
          checks++;
          if (win[k] !== model[k]) begin failures++; $display("FAIL win[%0d]=%h exp %h", k, win[k], model[k]); end
        end
        repeat ($urandom_range(0, 2)) @(posedge clk);
      end
      in_end <= 1; @(posedge clk); in_end <= 0;
      @(negedge clk);
      checks++;
      if (!win_end || win != '0) begin failures++; $display("FAIL end/clear"); end
      foreach (model[i]) model[i] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_fp_extract: self-checking test of the field extraction page fp_extract.
//
// Streams random bytes through a reference window, runs a step of
// FIELD_BYTES bytes starting at a random position (start on its first byte,
// done on its last) and checks that the captured field equals the step's
// bytes in arrival order, that valid drops at the step start and rises the
// clock after done, and that the field holds until the next step.
module tb_fp_extract;
  localparam int FB = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done = 0;
  logic [7:0][7:0] win = '0;
  logic [FB*8-1:0] field; logic valid;
  int checks = 0, failures = 0;

  fp_extract #(.N_BYTES(8), .FIELD_BYTES(FB)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0][7:0] w;
    logic [FB*8-1:0] exp_f;
    w = '0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      automatic int pre = $urandom_range(0, 10);
      for (int i = 0; i < pre; i++) begin
        w = {w[6:0], 8'($urandom)}; win <= w; @(posedge clk);
      end
      exp_f = '0;
      for (int i = 0; i < FB; i++) begin
        automatic logic [7:0] b = 8'($urandom);
        w = {w[6:0], b}; exp_f = {exp_f[FB*8-9:0], b};
        win <= w; start <= (i == 0); done <= (i == FB - 1);
        @(posedge clk);
        start <= 0; done <= 0;
        @(negedge clk);
        if (i == 0) begin
          checks++;
          if (valid !== 1'b0) begin failures++; $display("FAIL valid not cleared at start"); end
        end
      end
      checks++;
      if (valid !== 1'b1 || field !== exp_f) begin
        failures++; $display("FAIL field %h exp %h valid %b", field, exp_f, valid);
      end
      // field holds while other bytes pass
      w = {w[6:0], 8'($urandom)}; win <= w; @(posedge clk); @(negedge clk);
      checks++;
      if (field !== exp_f) begin failures++; $display("FAIL field not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

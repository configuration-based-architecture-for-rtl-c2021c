// tb_fp_match: self-checking test of the matching page fp_match.
//
// Loads four patterns with different masks (full 8-byte preamble, 2-byte
// type code, 1-byte code, and pattern 3 with an all-zero mask that matches
// anything). Then drives windows that are random or that carry a planted
// pattern with random bits outside the mask, and compares y_match and the
// latched hit vector with a bytewise reference comparison. Also checks that
// the flag is 0 while the page is not active.
module tb_fp_match;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0; logic [4:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0;
  logic active = 0, done = 0; logic [1:0] ctrl = 0;
  logic [7:0][7:0] win = '0;
  logic y_match; logic [3:0] hits_q;
  int checks = 0, failures = 0;

  fp_match #(.N_BYTES(8), .MATCH_BYTES(8)) dut (.*);

  logic [63:0] pat [4], mask [4];

  task automatic wr(input int a, input logic [31:0] d);
    cfg_we <= 1; cfg_addr <= 5'(a); cfg_wdata <= d; @(posedge clk);
  endtask

  function automatic bit ref_hit(input logic [63:0] w, input int p);
    for (int b = 0; b < 8; b++)
      for (int i = 0; i < 8; i++)
        if (mask[p][8*b+i] && (w[8*b+i] != pat[p][8*b+i])) return 0;
    return 1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // pattern 0: preamble 55 x7 then D5 (D5 newest, win[0])
    pat[0] = 64'h5555_5555_5555_55D5; mask[0] = '1;
    pat[1] = 64'h0000_0000_0000_0800; mask[1] = 64'h0000_0000_0000_FFFF;
    pat[2] = 64'h0000_0000_0006_0000; mask[2] = 64'h0000_0000_00FF_0000;
    pat[3] = 64'h1234_5678_9abc_def0; mask[3] = '0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int p = 0; p < 4; p++) begin
      wr(4*p,   pat[p][31:0]);  wr(4*p+1, pat[p][63:32]);
      wr(4*p+2, mask[p][31:0]); wr(4*p+3, mask[p][63:32]);
    end
    cfg_we <= 0;
    for (int t = 0; t < 2000; t++) begin
      automatic logic [63:0] w = {$urandom, $urandom};
      automatic int p = $urandom_range(0, 3);
      automatic logic act = ($urandom_range(0, 7) != 0);
      if ($urandom_range(0, 1)) w = (w & ~mask[p]) | (pat[p] & mask[p]);
      win <= w; ctrl <= 2'(p); active <= act; done <= 1;
      @(negedge clk);
      checks++;
      if (y_match !== (act && ref_hit(w, p))) begin
        failures++; $display("FAIL y_match=%b p=%0d w=%h", y_match, p, w);
      end
      @(posedge clk); done <= 0;
      @(negedge clk);
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (hits_q[q] !== ref_hit(w, q)) begin failures++; $display("FAIL hits_q[%0d]", q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_fp_crc: self-checking test of the CRC page fp_crc.
//
// Known values: the CRC-32 check value of the ASCII string "123456789" is
// CBF43926, so the register must end at its complement 340BC6D9. A random
// frame followed by its frame check sequence (the complemented CRC sent
// least significant byte first) must leave the Ethernet residue DEBB20E3 and
// raise crc_ok; a frame with one flipped bit must not. The reference CRC here
// is computed with a 256-entry table, independently of the page's bitwise
// update. A second configuration (CRC-32C polynomial 82F63B78, residue
// B798B438) checks that the polynomial really is configurable.
module tb_fp_crc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0; logic [4:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0;
  logic byte_en = 0, start = 0; logic [7:0] data = 0;
  logic [31:0] crc; logic crc_ok;
  int checks = 0, failures = 0;

  fp_crc dut (.*);

  logic [31:0] table_e [256];
  logic [31:0] table_c [256];

  function automatic logic [31:0] tab_entry(input int n, input logic [31:0] poly);
    logic [31:0] c = 32'(n);
    for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ poly : c >> 1;
    return c;
  endfunction

  function automatic logic [31:0] ref_crc(input byte unsigned d[$], input bit castagnoli);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (d[i]) c = (castagnoli ? table_c[(c ^ d[i]) & 8'hFF] : table_e[(c ^ d[i]) & 8'hFF]) ^ (c >> 8);
    return c;
  endfunction

  task automatic send(input byte unsigned d[$]);
    foreach (d[i]) begin
      byte_en <= 1; start <= (i == 0); data <= d[i]; @(posedge clk);
    end
    byte_en <= 0; start <= 0;
    @(negedge clk);
  endtask

  task automatic wr(input int a, input logic [31:0] v);
    cfg_we <= 1; cfg_addr <= 5'(a); cfg_wdata <= v; @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte unsigned q[$];
    logic [31:0] c;
    for (int n = 0; n < 256; n++) begin
      table_e[n] = tab_entry(n, 32'hEDB88320);
      table_c[n] = tab_entry(n, 32'h82F63B78);
    end
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    q = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    send(q);
    checks++;
    if (crc !== 32'h340BC6D9) begin failures++; $display("FAIL check value %h", crc); end
    for (int cfg = 0; cfg < 2; cfg++) begin
      if (cfg == 1) begin
        wr(0, 32'h82F63B78); wr(1, 32'hFFFFFFFF); wr(2, 32'hB798B438); cfg_we <= 0;
      end
      for (int t = 0; t < 30; t++) begin
        automatic int n = $urandom_range(10, 100);
        automatic bit bad = (t % 3 == 2);
        q.delete();
        for (int i = 0; i < n; i++) q.push_back(8'($urandom));
        c = ~ref_crc(q, cfg == 1);
        for (int i = 0; i < 4; i++) q.push_back(c[8*i +: 8]);
        if (bad) begin
          automatic int p = $urandom_range(0, q.size() - 1);
          q[p] = q[p] ^ (8'd1 << $urandom_range(0, 7));
        end
        send(q);
        checks++;
        if (crc_ok !== !bad) begin failures++; $display("FAIL crc_ok=%b bad=%b crc=%h cfg=%0d", crc_ok, bad, crc, cfg); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_uc_interface: self-checking test of uc_interface.
//
// Checks that each configuration region address raises exactly its own write
// enable with the right local address, that addresses above 0xFF raise none,
// that every read address returns the matching source word, and that only a
// read of the payload data word pops the buffer.
module tb_uc_interface;
  import spsp_pkg::*;
  logic cfg_we = 0; logic [11:0] cfg_addr = 0;
  logic we_lines, we_ctrl, we_match, we_crc, we_ack, we_ackl; logic [4:0] loc_addr;
  logic rd_en = 0; logic [3:0] rd_addr = 0; logic [31:0] rd_data; logic pay_pop;
  logic frame_ready, frame_ok, ack_busy, buf_ok; logic [3:0] match_hits;
  logic [LINE_AW-1:0] line_ptr; logic [15:0] pay_avail;
  logic [47:0] eth_da, eth_sa; logic [31:0] ip_da, ip_sa, tcp_bn, tcp_qn;
  logic [15:0] pay_len; logic [7:0] pay_data; logic [15:0] frames_reported, frames_bad;
  logic [15:0] overflows, acks_sent; logic [5:0] field_valid; logic pay_len_valid;
  logic [7:0] byte_cnt; logic [31:0] crc;
  int checks = 0, failures = 0;

  uc_interface dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      automatic logic [11:0] a = 12'($urandom);
      automatic logic [5:0] exp_we;
      if (t % 2 == 0) a[11:8] = 0;
      cfg_we = $urandom_range(0, 3) != 0; cfg_addr = a;
      #1;
      exp_we = '0;
      if (cfg_we && a[11:8] == 0 && a[7:5] < 6) exp_we[a[7:5]] = 1'b1;
      chk({we_ackl, we_ack, we_crc, we_match, we_ctrl, we_lines} == exp_we, "write enables");
      chk(loc_addr == a[4:0], "local address");
    end
    for (int t = 0; t < 300; t++) begin
      {frame_ready, frame_ok, ack_busy, buf_ok} = 4'($urandom);
      match_hits = 4'($urandom); line_ptr = LINE_AW'($urandom); pay_avail = 16'($urandom);
      eth_da = {$urandom, $urandom}; eth_sa = {$urandom, $urandom};
      ip_da = $urandom; ip_sa = $urandom; tcp_bn = $urandom; tcp_qn = $urandom;
      pay_len = 16'($urandom); pay_data = 8'($urandom);
      frames_reported = 16'($urandom); frames_bad = 16'($urandom);
      overflows = 16'($urandom); acks_sent = 16'($urandom); field_valid = 6'($urandom);
      pay_len_valid = 1'($urandom); byte_cnt = 8'($urandom); crc = $urandom;
      rd_addr = 4'(t % 16); rd_en = $urandom_range(0, 1);
      #1;
      case (rd_addr)
        0:  chk(rd_data == {pay_avail, 4'd0, 4'(line_ptr), match_hits, buf_ok, ack_busy, frame_ok, frame_ready}, "status");
        1:  chk(rd_data == {16'd0, eth_da[47:32]}, "da hi");
        2:  chk(rd_data == eth_da[31:0], "da lo");
        3:  chk(rd_data == {16'd0, eth_sa[47:32]}, "sa hi");
        4:  chk(rd_data == eth_sa[31:0], "sa lo");
        5:  chk(rd_data == ip_da, "ip da");
        6:  chk(rd_data == ip_sa, "ip sa");
        7:  chk(rd_data == tcp_bn, "bn");
        8:  chk(rd_data == tcp_qn, "qn");
        9:  chk(rd_data == {16'd0, pay_len}, "pay len");
        10: chk(rd_data == {24'd0, pay_data}, "pay data");
        11: chk(rd_data == {acks_sent, frames_reported}, "frames");
        12: chk(rd_data == {overflows, frames_bad}, "errors");
        13: chk(rd_data == {16'd0, byte_cnt, 1'b0, pay_len_valid, field_valid}, "valid");
        14: chk(rd_data == crc, "crc");
        default: chk(rd_data == 0, "unused");
      endcase
      chk(pay_pop == (rd_en && rd_addr == 10), "pop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

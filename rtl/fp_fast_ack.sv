// fp_fast_ack: the fast acknowledgement function page (FP0).
//
// The microcontroller loads a template of the acknowledgement frame once, as
// configuration: preamble and start delimiter, Ethernet header, IPv4 header
// and TCP header, up to TPL_BYTES bytes. When the controller starts the page
// for an accepted frame, the page keeps the fields the other pages extracted
// from that frame and sends the template with them substituted, so no program
// has to assemble the answer:
//   Ethernet destination  <- received Ethernet source
//   Ethernet source       <- received Ethernet destination
//   IP source             <- received IP destination
//   IP destination        <- received IP source
//   TCP sequence number   <- received TCP acknowledgement number (QN)
//   TCP ack number        <- received TCP sequence number (BN) + payload length
// Swapping the two IP addresses leaves the IPv4 header checksum unchanged. The
// TCP checksum is taken from the template as it is. After the template the
// page appends a 4-byte Ethernet frame check sequence, computed on the fly over
// the bytes from FCS_FROM (the first byte after the start delimiter) on.
//
// Byte offsets assume the template starts with 8 bytes of preamble and start
// delimiter, then Ethernet II (14 bytes), IPv4 without options (20 bytes) and
// TCP.
//
// Interface: cfg_tpl_we writes template word w (bytes 4w..4w+3, lowest byte in
// bits 7:0); cfg_len_we writes the template length in bytes. start is a
// one-clock pulse; the frame then leaves on out_valid/out_data with a
// valid/ready handshake, one byte per accepted clock, out_last on the final
// FCS byte. A start while busy, or with a template not longer than FCS_FROM,
// is ignored.
//
// A page that builds the acknowledgement from kept DA/SA, IP addresses and TCP
// numbers and sits between shift-in and shift-out follows the architecture;
// the template, the substituted offsets and the TCP arithmetic are this
// design's choices.
module fp_fast_ack
  import spsp_pkg::*;
#(
  parameter int unsigned TPL_BYTES = 64,
  parameter int unsigned FCS_FROM  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_tpl_we,
  input  logic        cfg_len_we,
  input  logic [4:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  input  logic        start,
  input  logic [47:0] eth_da,
  input  logic [47:0] eth_sa,
  input  logic [31:0] ip_da,
  input  logic [31:0] ip_sa,
  input  logic [31:0] tcp_bn,
  input  logic [31:0] tcp_qn,
  input  logic [15:0] pay_len,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_last,
  input  logic        out_ready,
  output logic        busy,
  output logic [15:0] acks_sent
);
  // byte offsets in the template
  localparam int unsigned OFF_ETH_DA = FCS_FROM;        // 6 bytes
  localparam int unsigned OFF_ETH_SA = FCS_FROM + 6;    // 6 bytes
  localparam int unsigned OFF_IP_SA  = FCS_FROM + 26;   // 4 bytes
  localparam int unsigned OFF_IP_DA  = FCS_FROM + 30;   // 4 bytes
  localparam int unsigned OFF_SEQ    = FCS_FROM + 38;   // 4 bytes
  localparam int unsigned OFF_ACK    = FCS_FROM + 42;   // 4 bytes
  localparam int unsigned LW         = $clog2(TPL_BYTES + 5);
  localparam int unsigned TW         = $clog2(TPL_BYTES);

  logic [7:0]    tpl [TPL_BYTES];
  logic [LW-1:0] tpl_len;
  logic [LW-1:0] idx;
  logic [31:0]   crc;
  logic [47:0]   k_da, k_sa;                       // kept received fields
  logic [31:0]   k_ipda, k_ipsa, k_seq, k_ack;
  logic [7:0]    t_byte;                           // template byte at idx
  logic [7:0]    s_byte;                           // byte after substitution
  logic [31:0]   fcs;
  logic [1:0]    k_fcs;                            // FCS byte number

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TPL_BYTES; i++) tpl[i] <= '0;
      tpl_len <= '0;
    end else begin
      if (cfg_tpl_we)
        for (int j = 0; j < 4; j++)
          if (int'(cfg_addr) * 4 + j < TPL_BYTES)
            tpl[int'(cfg_addr) * 4 + j] <= cfg_wdata[8*j +: 8];
      if (cfg_len_we && cfg_addr == 5'd0)
        tpl_len <= (cfg_wdata > TPL_BYTES) ? LW'(TPL_BYTES) : cfg_wdata[LW-1:0];
    end
  end

  assign t_byte = (int'(idx) < TPL_BYTES) ? tpl[idx[TW-1:0]] : 8'h00;

  function automatic logic [7:0] pick48(input logic [47:0] f, input int unsigned pos);
    return f[8*(5-pos) +: 8];
  endfunction

  function automatic logic [7:0] pick32(input logic [31:0] f, input int unsigned pos);
    return f[8*(3-pos) +: 8];
  endfunction

  always_comb begin
    int unsigned i;
    i = int'(idx);
    s_byte = t_byte;
    if      (i >= OFF_ETH_DA && i < OFF_ETH_DA + 6) s_byte = pick48(k_da,   i - OFF_ETH_DA);
    else if (i >= OFF_ETH_SA && i < OFF_ETH_SA + 6) s_byte = pick48(k_sa,   i - OFF_ETH_SA);
    else if (i >= OFF_IP_SA  && i < OFF_IP_SA  + 4) s_byte = pick32(k_ipsa, i - OFF_IP_SA);
    else if (i >= OFF_IP_DA  && i < OFF_IP_DA  + 4) s_byte = pick32(k_ipda, i - OFF_IP_DA);
    else if (i >= OFF_SEQ    && i < OFF_SEQ    + 4) s_byte = pick32(k_seq,  i - OFF_SEQ);
    else if (i >= OFF_ACK    && i < OFF_ACK    + 4) s_byte = pick32(k_ack,  i - OFF_ACK);
  end

  assign fcs      = ~crc;
  assign k_fcs    = 2'(idx - tpl_len);
  assign out_valid = busy;
  assign out_data  = (idx < tpl_len) ? s_byte : fcs[8*k_fcs +: 8];
  assign out_last  = busy && (idx == tpl_len + LW'(3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      idx       <= '0;
      crc       <= 32'hFFFF_FFFF;
      k_da      <= '0;
      k_sa      <= '0;
      k_ipda    <= '0;
      k_ipsa    <= '0;
      k_seq     <= '0;
      k_ack     <= '0;
      acks_sent <= '0;
    end else if (!busy) begin
      if (start && tpl_len > LW'(FCS_FROM)) begin
        busy   <= 1'b1;
        idx    <= '0;
        crc    <= 32'hFFFF_FFFF;
        // received source becomes our destination and vice versa
        k_da   <= eth_sa;
        k_sa   <= eth_da;
        k_ipsa <= ip_da;
        k_ipda <= ip_sa;
        k_seq  <= tcp_qn;
        k_ack  <= tcp_bn + 32'(pay_len);
      end
    end else if (out_ready) begin
      idx <= idx + 1'b1;
      if (idx >= LW'(FCS_FROM) && idx < tpl_len) crc <= crc32_byte(crc, s_byte, 32'hEDB8_8320);
      if (out_last) begin
        busy      <= 1'b0;
        acks_sent <= acks_sent + 16'd1;
      end
    end
  end

  // the output byte stays stable while it waits for out_ready
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule

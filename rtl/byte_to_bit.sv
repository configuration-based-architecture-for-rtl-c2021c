// byte_to_bit: serialises bytes onto the transmit line.
//
// It takes a byte with a valid/ready handshake, then sends its eight bits least
// significant bit first, one bit per enabled clock (bit_en). line_en is high
// while a frame is being sent: the source keeps byte_valid high (byte_last
// marks the final byte) and the next byte is accepted as the eighth bit of
// the current one goes out, so the bits of a frame are back to back.
//
// Timing: a byte accepted on clock k drives its bit 0 from clock k+1 until the
// next enabled bit clock; byte_ready is high when nothing is being sent or the
// eighth bit is leaving. line_en falls after the last bit of the byte marked
// byte_last.
//
// The block is named in the architecture's system diagram; its handshake and
// bit order are choices of this design, matching bit_to_byte.
module byte_to_bit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_en,
  input  logic       byte_valid,
  input  logic [7:0] byte_data,
  input  logic       byte_last,
  output logic       byte_ready,
  output logic       line_en,
  output logic       bit_out
);
  logic [7:0] sh;
  logic [2:0] cnt;
  logic       busy;
  logic       last_q;

  // ready when idle, or when the eighth bit of a non-final byte leaves now
  assign byte_ready = !busy || (bit_en && cnt == 3'd7 && !last_q);
  assign line_en    = busy;
  assign bit_out    = sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh     <= '0;
      cnt    <= '0;
      busy   <= 1'b0;
      last_q <= 1'b0;
    end else begin
      if (busy && bit_en) begin
        cnt <= cnt + 3'd1;
        sh  <= sh >> 1;
        if (cnt == 3'd7 && (last_q || !byte_valid)) busy <= 1'b0;
      end
      if (byte_valid && byte_ready) begin
        sh     <= byte_data;
        cnt    <= '0;
        busy   <= 1'b1;
        last_q <= byte_last;
      end
    end
  end
endmodule

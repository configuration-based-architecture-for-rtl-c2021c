// bit_to_byte: deserialises the received line bit stream into bytes.
//
// The physical layer delivers one bit per enabled clock (bit_en) while the
// frame is present (line_en). Bits arrive least significant bit first, as on
// an Ethernet line, and every eighth bit completes a byte, so the byte rate is
// one eighth of the bit rate. The bit counter restarts whenever line_en is low,
// so a frame always starts on a byte boundary; a trailing partial byte is
// dropped. When line_en falls, frame_end pulses for one clock after the last
// byte, telling the pipeline that the frame is over.
//
// Timing: byte_valid and byte_data are registered and appear the clock after
// the eighth bit is sampled. frame_end appears the clock after line_en is seen
// low following a frame.
//
// The conversion to byte format and the one-eighth rate follow the
// architecture; the LSB-first order and the line_en/bit_en interface are
// choices of this design.
module bit_to_byte (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       line_en,    // frame present on the line
  input  logic       bit_en,     // a new bit is on bit_in
  input  logic       bit_in,
  output logic       byte_valid, // one-clock strobe with byte_data
  output logic [7:0] byte_data,
  output logic       frame_end   // one-clock strobe after the frame's last byte
);
  logic [2:0] cnt;
  logic [6:0] sh;       // bits received so far, newest at bit 6
  logic       line_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      sh         <= '0;
      line_q     <= 1'b0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
      frame_end  <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      frame_end  <= line_q && !line_en;
      line_q     <= line_en;
      if (!line_en) begin
        cnt <= '0;
      end else if (bit_en) begin
        cnt <= cnt + 3'd1;
        sh  <= {bit_in, sh[6:1]};
        if (cnt == 3'd7) begin
          byte_valid <= 1'b1;
          byte_data  <= {bit_in, sh};
        end
      end
    end
  end
endmodule

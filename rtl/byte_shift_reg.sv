// byte_shift_reg: the byte based shift register that feeds every function page.
//
// Each received byte is shifted in at position 0 and the older bytes move one
// position up, so the register holds the last N_BYTES bytes of the frame
// (8 x N_BYTES bits). All function pages see the whole window at once; a page
// that needs a multi-byte field takes it from the window in one clock when the
// field's last byte has arrived. The register is cleared when the frame ends
// so that bytes of one frame never match in the next.
//
// Interface: in_valid/in_data/in_end come from bit_to_byte. win_valid pulses
// for one clock after each shift, with win[0] the newest byte; win_end pulses
// one clock after in_end. Latency from in_valid to win_valid is one clock.
//
// The shift register itself and its feeding of all pages follow the
// architecture; its depth (the architecture leaves it open) is a parameter chosen
// to hold the widest field compared in one clock, the 8-byte preamble.
module byte_shift_reg #(
  parameter int unsigned N_BYTES = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [7:0]              in_data,
  input  logic                    in_end,
  output logic                    win_valid,
  output logic                    win_end,
  output logic [N_BYTES-1:0][7:0] win
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win       <= '0;
      win_valid <= 1'b0;
      win_end   <= 1'b0;
    end else begin
      win_valid <= in_valid;
      win_end   <= in_end;
      if (in_end)        win <= '0;
      else if (in_valid) win <= {win[N_BYTES-2:0], in_data};
    end
  end
endmodule

// fp_payload: the payload function page (FP9), which makes the lower protocol
// levels transparent and manages the payload.
//
// The controller runs this page over the upper-level payload, typically from
// the end of the last extracted header to the end of the frame. Each byte is
// written to the data buffer. Because such a step often ends only when the
// frame ends, the trailing check bytes (the Ethernet frame check sequence)
// would be taken as payload; the page therefore writes the byte that is
// `trim` positions back in the shift register window, and the last `trim`
// bytes of the step are never written. `trim` is the controller's control code
// for this page (ctrl[2:0]), 4 for Ethernet. At the end of the step the
// payload length in bytes (step length minus trim, never below 0) is loaded
// into pay_len.
//
// Interface: byte_en/start/done are the controller's strobes for this page;
// done may come with a byte (counted step) or alone (step that ends with the
// frame). wr_en/wr_data go to data_buffer in the clock of the byte. pay_len
// and len_valid change the clock after done.
//
// Extracting the upper-level payload and measuring its length follow the
// architecture; the trim mechanism is this design's choice.
module fp_payload #(
  parameter int unsigned N_BYTES = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    byte_en,
  input  logic                    start,
  input  logic                    done,
  input  logic [2:0]              trim,
  input  logic [N_BYTES-1:0][7:0] win,
  output logic                    wr_en,
  output logic [7:0]              wr_data,
  output logic [15:0]             pay_len,
  output logic                    len_valid
);
  logic [15:0] cnt;      // bytes of this step before the current clock
  logic [15:0] cnt_now;  // bytes including the current one

  always_comb begin
    cnt_now = start ? 16'd0 : cnt;
    if (byte_en) cnt_now = cnt_now + 16'd1;
  end

  assign wr_en   = byte_en && (cnt_now > 16'(trim));
  assign wr_data = win[trim];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      pay_len   <= '0;
      len_valid <= 1'b0;
    end else begin
      if (byte_en) cnt <= cnt_now;
      if (done) begin
        pay_len   <= (cnt_now > 16'(trim)) ? cnt_now - 16'(trim) : 16'd0;
        len_valid <= 1'b1;
      end else if (start) begin
        len_valid <= 1'b0;
      end
    end
  end

  initial assert (N_BYTES >= 8);
endmodule

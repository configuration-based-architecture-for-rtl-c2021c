// fp_extract: a field extraction function page (FP2/FP3 Ethernet DA/SA,
// FP5/FP6 IP DA/SA, FP7/FP8 TCP BN/QN).
//
// The counter and controller runs this page for exactly the bytes of its
// field. When the step ends, the last FIELD_BYTES bytes of the shift register
// window are the field, and the page loads them in one clock. The first
// received byte of the field becomes the most significant byte (network
// order). valid goes low when a new step of this page starts and high when
// the field is loaded, so a reader can tell a field of the current frame from
// a stale one.
//
// Window bytes above FIELD_BYTES are not read (a lint tool reports them as
// unused); the whole window is passed so every page has the same port.
//
// Interface: start and done are the controller's strobes for this page; win is
// the shift register window (win[0] newest). field and valid are registered
// and change the clock after done.
//
// Extraction of these fields by dedicated pages follows the architecture; the
// parallel load from the window and the valid bit are this design's choices.
module fp_extract #(
  parameter int unsigned N_BYTES     = 8,
  parameter int unsigned FIELD_BYTES = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      done,
  input  logic [N_BYTES-1:0][7:0]   win,
  output logic [FIELD_BYTES*8-1:0]  field,
  output logic                      valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      field <= '0;
      valid <= 1'b0;
    end else if (done) begin
      field <= win[FIELD_BYTES-1:0];
      valid <= 1'b1;
    end else if (start) begin
      valid <= 1'b0;
    end
  end

  initial assert (FIELD_BYTES <= N_BYTES);
endmodule

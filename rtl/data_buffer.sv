// data_buffer: the data buffer register between the SPSP and the
// microcontroller.
//
// A byte FIFO with two write pointers. Payload bytes are written at the
// speculative pointer while the frame is still being received; only when the
// controller reports the frame good (commit) does the committed pointer move
// up and the bytes become visible to the reader. A frame reported bad, or one
// that ends unreported (drop), is rolled back by moving the speculative
// pointer back to the committed one. If the buffer fills up during a frame,
// further bytes are lost, buf_ok goes low, and the frame is rolled back even
// if it is committed; the overflow counter counts such frames.
//
// Interface: wr_en/wr_data from the payload page; commit/drop from the
// controller; rd_en pops the oldest committed byte, rd_data shows it
// combinationally and rd_count is the number of committed bytes.
//
// The buffer between the pages and the microcontroller is named in the
// architecture's data-flow figure; the commit/rollback scheme and the depth
// (enough for one 1500-byte Ethernet payload) are this design's choices.
module data_buffer #(
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [7:0]               wr_data,
  input  logic                     commit,
  input  logic                     drop,
  input  logic                     rd_en,
  output logic [7:0]               rd_data,
  output logic [$clog2(DEPTH):0]   rd_count,
  output logic                     buf_ok,
  output logic [15:0]              overflows
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0]  mem [DEPTH];
  logic [AW:0] wr_ptr, cmt_ptr, rd_ptr;
  logic        full, ovf;

  assign full     = (wr_ptr - rd_ptr) == (AW+1)'(DEPTH);
  assign rd_count = cmt_ptr - rd_ptr;
  assign rd_data  = mem[rd_ptr[AW-1:0]];
  assign buf_ok   = !ovf;

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      cmt_ptr   <= '0;
      rd_ptr    <= '0;
      ovf       <= 1'b0;
      overflows <= '0;
    end else begin
      if (wr_en) begin
        if (!full) wr_ptr <= wr_ptr + 1'b1;
        else       ovf    <= 1'b1;
      end
      if (commit && !ovf) begin
        cmt_ptr <= wr_ptr;
      end else if (commit || drop) begin
        wr_ptr <= cmt_ptr;
      end
      if (commit || drop) begin
        ovf <= 1'b0;
        if (ovf) overflows <= overflows + 16'd1;
      end
      if (rd_en && rd_count != '0) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // a frame is either committed or dropped, never both at once
  assert property (@(posedge clk) disable iff (!rst_n) !(commit && drop));
endmodule

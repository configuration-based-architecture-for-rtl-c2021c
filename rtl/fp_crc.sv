// fp_crc: the CRC check function page (FP4).
//
// While active it runs every received byte through a 32-bit CRC register in
// the reflected (least significant bit first) form used by Ethernet. The
// polynomial, the initial value and the expected residue are configuration
// registers, so other 32-bit CRCs can be checked too. The register restarts
// from the initial value on the first byte of the step. When the frame check
// sequence itself has been included, a frame without errors leaves a fixed
// residue in the register (0xDEBB20E3 for Ethernet); crc_ok compares the
// register with the configured residue.
//
// Interface: cfg words 0, 1, 2 are polynomial (reflected), initial value and
// residue. byte_en/start are the controller's strobes, data is the newest
// window byte. crc_ok is combinational from the registered CRC, so it is valid
// the clock after the last byte.
//
// A CRC page that stays active for the whole frame follows the architecture;
// the bit-serial update unrolled over a byte and the configurable residue are
// this design's choices.
module fp_crc
  import spsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [4:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  input  logic        byte_en,
  input  logic        start,
  input  logic [7:0]  data,
  output logic [31:0] crc,
  output logic        crc_ok
);
  logic [31:0] poly, init, residue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poly    <= 32'hEDB8_8320;
      init    <= 32'hFFFF_FFFF;
      residue <= 32'hDEBB_20E3;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        5'd0:    poly    <= cfg_wdata;
        5'd1:    init    <= cfg_wdata;
        5'd2:    residue <= cfg_wdata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       crc <= 32'hFFFF_FFFF;
    else if (byte_en) crc <= crc32_byte(start ? init : crc, data, poly);
  end

  assign crc_ok = (crc == residue);
endmodule
